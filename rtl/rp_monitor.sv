// rp_monitor: Reference Point Monitor of the Hard Deadline Enforcer.
//
// Identifies the reference point (RP) the critical task has just passed by
// comparing the Executed Program Counter (EPC) with the RP addresses. One
// address can carry several RPs in different iterations of a loop, so the
// monitor keeps a "cycle state" (iteration counter) per loop:
//   - the EPC equals the loop's clear address (the instruction before the
//     loop is entered): its cycle state is cleared;
//   - the EPC equals the loop's increment address (the instruction before
//     the loop is left or taken again): its cycle state is incremented;
//   - the EPC equals RP_ADDR[i] and, if RP_USE_CS[i] is set, the cycle state
//     of loop RP_LOOP[i] equals RP_CS[i]: RP_ID becomes i;
//   - RP 0 is the first instruction of the task: RP_ID becomes 0 and a
//     task_start pulse is given (other RPs are only taken while running);
//   - the EPC equals END_ADDR (the instruction before the end of the task),
//     or after reset: RP_ID becomes NUM_RP, which means "task not running".
// The RP table, loop addresses and end address are constants of one
// critical task, given as parameters (the HDE is generated per task). The
// defaults are the three-RP example of the document: RP0 at 10, RP1 at 22 in
// iteration 0, RP2 at 22 in iteration 5, end at 38. The loop clear and
// increment addresses (19 and 30) are this design's choice for that example.
//
// Timing: the EPC is sampled on epc_strobe (one pulse per executed
// instruction); rp_id and task_start are registered, one cycle after the
// strobe. Cycle states (16 bits by default, enough for
// the 10000 iterations of the largest evaluated loop) saturate at their maximum.
module rp_monitor
  import hde_pkg::*;
#(
  parameter int unsigned NUM_RP    = 3,
  parameter int unsigned NUM_LOOPS = 1,
  parameter int unsigned CS_W      = 16,
  parameter int unsigned RPID_W    = $clog2(NUM_RP + 1),
  parameter logic [NUM_RP-1:0][EPC_W-1:0]    RP_ADDR   = {30'd22, 30'd22, 30'd10},
  parameter logic [NUM_RP-1:0]               RP_USE_CS = 3'b110,
  parameter logic [NUM_RP-1:0][7:0]          RP_LOOP   = {8'd0, 8'd0, 8'd0},
  parameter logic [NUM_RP-1:0][CS_W-1:0]     RP_CS     = {16'd5, 16'd0, 16'd0},
  parameter logic [NUM_LOOPS-1:0][EPC_W-1:0] LOOP_CLR_ADDR = {30'd19},
  parameter logic [NUM_LOOPS-1:0][EPC_W-1:0] LOOP_INC_ADDR = {30'd30},
  parameter logic [EPC_W-1:0]                END_ADDR  = 30'd38
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [EPC_W-1:0]  epc,
  input  logic              epc_strobe,
  output logic [RPID_W-1:0] rp_id,       // NUM_RP when the task is not running
  output logic              rp_hit,      // pulse: rp_id was (re)loaded with an RP
  output logic              task_start   // pulse: RP 0 reached
);

  localparam logic [RPID_W-1:0] IDLE_ID = RPID_W'(NUM_RP);

  logic [NUM_LOOPS-1:0][CS_W-1:0] cs_q;
  logic                           running;

  assign running = (rp_id != IDLE_ID);

  // Cycle states of the loops.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_q <= '0;
    end else if (epc_strobe) begin
      for (int l = 0; l < int'(NUM_LOOPS); l++) begin
        if (epc == LOOP_CLR_ADDR[l])
          cs_q[l] <= '0;
        else if (epc == LOOP_INC_ADDR[l] && cs_q[l] != '1)
          cs_q[l] <= cs_q[l] + 1'b1;
      end
    end
  end

  // RP identification.
  logic [RPID_W-1:0] next_id;
  logic              next_hit;
  logic              next_start;

  always_comb begin
    next_id    = rp_id;
    next_hit   = 1'b0;
    next_start = 1'b0;
    if (epc_strobe) begin
      if (epc == END_ADDR) begin
        next_id = IDLE_ID;
      end else if (epc == RP_ADDR[0]) begin
        next_id    = '0;
        next_hit   = 1'b1;
        next_start = 1'b1;
      end else if (running) begin
        for (int i = 1; i < int'(NUM_RP); i++) begin
          if (epc == RP_ADDR[i] &&
              (!RP_USE_CS[i] || cs_q[RP_LOOP[i]] == RP_CS[i])) begin
            next_id  = RPID_W'(i);
            next_hit = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp_id      <= IDLE_ID;
      rp_hit     <= 1'b0;
      task_start <= 1'b0;
    end else begin
      rp_id      <= next_id;
      rp_hit     <= next_hit;
      task_start <= next_start;
    end
  end

endmodule
