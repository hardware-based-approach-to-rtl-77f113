// tb_deadline_enforcer: self-checking testbench of deadline_enforcer
// (deadline 165 cycles, default).
// Runs critical-task "runs" of random length (some longer than the
// deadline) with the critical time changing at random points, as the RP time
// controller would drive it. A cycle model here tracks the time since RP 0
// (CTaskStart arrives two cycles after RP 0) and predicts, one cycle ahead,
// Warning (elapsed >= CT), the deadline miss (elapsed > 165) and the
// elapsed count and the deadline instant (elapsed >= 165, also after the
// task has ended), which are compared every cycle.
module tb_deadline_enforcer;
  import hde_pkg::*;

  localparam longint DEADLINE = 165;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] ct = '0;
  logic        ctask_start = 1'b0;
  logic        ctask_end = 1'b1;
  logic [31:0] elapsed;
  logic        warning;
  logic        deadline_miss;
  logic        deadline_reached;

  int checks = 0;
  int failures = 0;
  int n_warn = 0, n_miss = 0, n_release = 0, n_reached_idle = 0;
  // model
  longint t_since;      // cycles since RP 0 in the current cycle
  bit     exp_warn, exp_miss, was_warn, started;
  longint exp_elapsed;

  deadline_enforcer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: warn=%0b/%0b miss=%0b/%0b elapsed=%0d/%0d ct=%0d",
               what, $time, warning, exp_warn, deadline_miss, exp_miss,
               elapsed, exp_elapsed, ct);
    end
  endtask

  // Apply inputs for one cycle, update the model, check after the edge.
  task automatic cycle(input bit start, input bit end_lvl, input logic [31:0] ct_v);
    bit running;
    @(negedge clk);
    ctask_start = start;
    ctask_end   = end_lvl;
    ct          = ct_v;
    if (start) begin t_since = 2; started = 1; end
    running = start || !end_lvl;
    @(posedge clk); #1;
    exp_warn = running && (t_since >= longint'(ct_v));
    if (start) exp_miss = (t_since > DEADLINE);
    else if (running && t_since > DEADLINE) exp_miss = 1;
    if (running || (started && t_since < DEADLINE)) begin
      exp_elapsed = t_since + 1;
      t_since++;
    end
    check(warning == exp_warn, "warning");
    check(deadline_miss == exp_miss, "deadline miss");
    check(elapsed == 32'(exp_elapsed), "elapsed");
    check(deadline_reached == (started && exp_elapsed >= DEADLINE), "deadline reached");
    if (deadline_reached && !running) n_reached_idle++;
    if (warning && !was_warn) n_warn++;
    if (!warning && was_warn && running) n_release++;
    if (deadline_miss) n_miss++;
    was_warn = warning;
  endtask

  initial begin
    t_since = 0; exp_warn = 0; exp_miss = 0; exp_elapsed = 0; was_warn = 0; started = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      int len;
      logic [31:0] c;
      len = $urandom_range(20, 230);
      c   = 32'($urandom_range(0, 120));
      cycle(1'b1, 1'b1, c);                    // CTaskStart with the RP 0 CT
      for (int k = 1; k < len; k++) begin
        if ($urandom_range(0, 15) == 0) c = 32'($urandom_range(0, 200));
        cycle(1'b0, 1'b0, c);
      end
      // idle gap, sometimes long enough to pass the deadline instant
      repeat ($urandom_range(0, 3) == 0 ? $urandom_range(100, 200) : $urandom_range(1, 6))
        cycle(1'b0, 1'b1, c);
    end
    check(n_warn > 10 && n_release > 3 && n_miss > 3 && n_reached_idle > 3, "all situations seen");
    $display("warnings=%0d releases=%0d miss_cycles=%0d", n_warn, n_release, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
