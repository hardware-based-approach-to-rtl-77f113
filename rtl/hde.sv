// hde: Hard Deadline Enforcer.
//
// Lets non-critical cores share the bus with the critical core for as long
// as the critical task can still meet its deadline when run alone from the
// point it has reached. Three blocks in series:
//   rp_monitor        EPC -> RP_ID (which reference point was passed last)
//   rp_time_ctrl      RP_ID -> CT(RP_ID), CTaskStart, CTaskEnd
//   deadline_enforcer elapsed time vs. CT -> Warning; vs. deadline -> miss
// Warning drives the "force" input of the bus controller. The reference
// points and their WCET_R values are constants of one critical task (the
// HDE is generated per task); the defaults describe a small example task
// with three RPs, one loop and a 165-cycle deadline.
//
// Timing: an RP executed in cycle t changes Warning in cycle t+3; T_OVER
// (default 4) adds the cycle the bus controller needs to follow it.
module hde
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
  parameter logic [EPC_W-1:0]                END_ADDR  = 30'd38,
  parameter logic [TIME_W-1:0]               DEADLINE  = 32'd165,
  parameter logic [TIME_W-1:0]               T_OVER    = 32'd4,
  parameter logic [NUM_RP-1:0][TIME_W-1:0]   WCETR     = {32'd43, 32'd98, 32'd110}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [EPC_W-1:0]  epc,
  input  logic              epc_strobe,
  output logic              warning,        // to the bus controller (force)
  output logic              deadline_miss,  // error indication
  output logic              deadline_reached, // deadline instant passed
  output logic              ctask_start,    // pulse at task start
  output logic              ctask_end,      // low while the task runs
  output logic [RPID_W-1:0] rp_id,          // last RP passed (NUM_RP: idle)
  output logic              rp_hit,         // pulse: an RP was passed
  output logic [TIME_W-1:0] ct,             // its critical time
  output logic [TIME_W-1:0] elapsed         // cycles since RP 0
);

  logic task_start;


  rp_monitor #(
    .NUM_RP(NUM_RP), .NUM_LOOPS(NUM_LOOPS), .CS_W(CS_W), .RPID_W(RPID_W),
    .RP_ADDR(RP_ADDR), .RP_USE_CS(RP_USE_CS), .RP_LOOP(RP_LOOP), .RP_CS(RP_CS),
    .LOOP_CLR_ADDR(LOOP_CLR_ADDR), .LOOP_INC_ADDR(LOOP_INC_ADDR),
    .END_ADDR(END_ADDR)
  ) u_monitor (
    .clk, .rst_n, .epc, .epc_strobe,
    .rp_id, .rp_hit, .task_start
  );

  rp_time_ctrl #(
    .NUM_RP(NUM_RP), .RPID_W(RPID_W), .DEADLINE(DEADLINE), .T_OVER(T_OVER),
    .WCETR(WCETR)
  ) u_time_ctrl (
    .clk, .rst_n, .rp_id, .task_start,
    .ct, .ctask_start, .ctask_end
  );

  deadline_enforcer #(
    .DEADLINE(DEADLINE), .START_LAT(HDE_DETECT_LAT)
  ) u_enforcer (
    .clk, .rst_n, .ct, .ctask_start, .ctask_end,
    .elapsed, .warning, .deadline_miss, .deadline_reached
  );

endmodule
