// rp_time_ctrl: Reference Point Time Controller of the Hard Deadline Enforcer.
//
// Maps the current reference point identifier RP_ID to its critical time
//   CT(RP) = DEADLINE - WCET_R(RP) - T_OVER
// where WCET_R(RP) is the remaining worst-case execution time of the
// critical task from that RP to its end, analysed off line for the core
// running alone, and T_OVER covers the detection latency of the HDE plus the
// reaction time of the bus controller. The table is computed at elaboration
// from the WCET_R parameter array and read like a ROM (a block RAM when the
// table is large). A CT that would be negative is clamped to 0, so the bus
// stays in stand-alone mode from that RP on.
// The block also reports when the critical task starts (ctask_start, one
// pulse) and whether it is not running (ctask_end, a level that is low while
// the task runs).
//
// Defaults: T_OVER = 4 cycles (1 cycle of bus switching plus 3 of HDE
// detection), as measured for the dual-core system. DEADLINE and WCET_R are
// this design's example for the three-RP default task of rp_monitor (worst
// case 110 cycles, deadline 150 % of it).
//
// Timing: ct, ctask_start and ctask_end are registered, one cycle after
// rp_id / task_start.
module rp_time_ctrl
  import hde_pkg::*;
#(
  parameter int unsigned NUM_RP   = 3,
  parameter int unsigned RPID_W   = $clog2(NUM_RP + 1),
  parameter logic [TIME_W-1:0] DEADLINE = 32'd165,
  parameter logic [TIME_W-1:0] T_OVER   = 32'd4,
  parameter logic [NUM_RP-1:0][TIME_W-1:0] WCETR = {32'd43, 32'd98, 32'd110}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [RPID_W-1:0] rp_id,
  input  logic              task_start,
  output logic [TIME_W-1:0] ct,          // CT of the last RP passed
  output logic              ctask_start, // pulse: critical task started
  output logic              ctask_end    // high while the task is not running
);

  // one word per rp_id code, so that rp_id indexes the table at full width;
  // the codes from NUM_RP up are never read
  typedef logic [TIME_W-1:0] ct_table_t [2**RPID_W];

  function automatic ct_table_t build_ct();
    ct_table_t t;
    t = '{default: '0};
    for (int i = 0; i < int'(NUM_RP); i++) begin
      if (DEADLINE >= WCETR[i] + T_OVER) t[i] = DEADLINE - WCETR[i] - T_OVER;
      else                               t[i] = '0;
    end
    return t;
  endfunction

  localparam ct_table_t CT_ROM = build_ct();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct          <= '0;
      ctask_start <= 1'b0;
      ctask_end   <= 1'b1;
    end else begin
      if (rp_id < RPID_W'(NUM_RP)) ct <= CT_ROM[rp_id];
      ctask_start <= task_start;
      ctask_end   <= (rp_id >= RPID_W'(NUM_RP));
    end
  end

endmodule
