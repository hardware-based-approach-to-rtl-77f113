// deadline_enforcer: Deadline Enforcer block of the Hard Deadline Enforcer.
//
// Counts the elapsed time of the critical task clock by clock from its start
// and compares it with the critical time CT of the last reference point:
//   elapsed <  CT        -> Warning low: the bus stays in shared mode;
//   elapsed >= CT        -> Warning high: the bus controller switches to
//                           stand-alone mode (critical core only);
//   elapsed >  DEADLINE  -> deadline_miss (the error indication).
// A later RP with a larger CT drops Warning again, returning the bus to the
// shared mode. When the task ends Warning is dropped. The count goes on
// after the end until it reaches DEADLINE, so that deadline_reached marks
// the deadline instant of every run (elapsed >= DEADLINE since RP 0), as in
// a simulation trace of the system where the deadline signal rises after the
// task has finished. deadline_miss stays high until the next task start
// (this design's choice).
//
// Timing: ctask_start arrives START_LAT-1 cycles after the executed RP 0
// instruction (two register stages: RP monitor, RP time controller), so the
// count is started at that value and equals the cycles since RP 0. Warning
// and deadline_miss are registered: for an RP passed at cycle t, Warning
// reflects its CT at cycle t+3, the detection latency of the HDE.
module deadline_enforcer
  import hde_pkg::*;
#(
  parameter logic [TIME_W-1:0] DEADLINE  = 32'd165,
  parameter int unsigned       START_LAT = HDE_DETECT_LAT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TIME_W-1:0] ct,
  input  logic              ctask_start,
  input  logic              ctask_end,
  output logic [TIME_W-1:0] elapsed,       // cycles since RP 0
  output logic              warning,          // request stand-alone mode
  output logic              deadline_miss,    // elapsed passed the deadline while running
  output logic              deadline_reached  // the deadline instant of this run has passed
);

  logic [TIME_W-1:0] elapsed_q;
  logic [TIME_W-1:0] elapsed_now;
  logic              running;
  logic              started_q;

  assign running     = ctask_start || !ctask_end;
  assign elapsed_now = ctask_start ? TIME_W'(START_LAT - 1) : elapsed_q;
  assign elapsed     = elapsed_q;
  assign deadline_reached = started_q && (elapsed_q >= DEADLINE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elapsed_q     <= '0;
      started_q     <= 1'b0;
      warning       <= 1'b0;
      deadline_miss <= 1'b0;
    end else begin
      if (ctask_start) started_q <= 1'b1;
      if ((running || (started_q && elapsed_now < DEADLINE)) && elapsed_now != '1)
        elapsed_q <= elapsed_now + 1'b1;
      warning <= running && (elapsed_now >= ct);
      if (ctask_start)
        deadline_miss <= (elapsed_now > DEADLINE);
      else if (running && elapsed_now > DEADLINE)
        deadline_miss <= 1'b1;
    end
  end

endmodule
