// tb_rp_monitor: self-checking testbench of rp_monitor at its default
// configuration (RP0 at 10, RP1 at 22 in loop iteration 0, RP2 at 22 in
// iteration 5, loop cleared at 19 and incremented at 30, end at 38).
// It executes the example task (10..19, loop body 20..30 repeated 1..8
// times, 31..39) with random gaps between instructions and random EPC
// values on cycles without a strobe, and checks RP_ID one cycle after every
// executed instruction against the RP expected from the task position.
module tb_rp_monitor;
  import hde_pkg::*;

  localparam int NUM_RP = 3;
  localparam int IDLE   = NUM_RP;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [EPC_W-1:0] epc = '0;
  logic             epc_strobe = 1'b0;
  logic [1:0]       rp_id;
  logic             rp_hit;
  logic             task_start;

  int checks = 0;
  int failures = 0;
  int exp_id;
  int seen_rp [NUM_RP+1];

  rp_monitor dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: rp_id=%0d exp=%0d epc=%0d", what, $time, rp_id, exp_id, epc);
    end
  endtask

  // Execute one instruction: optional idle cycles with junk EPC, then one
  // strobe; check the RP one cycle later.
  task automatic exec(input int pc, input int new_id);
    int gap;
    logic exp_hit;
    gap = $urandom_range(0, 2);
    repeat (gap) begin
      @(negedge clk);
      epc        = ($urandom_range(0, 1) == 1) ? EPC_W'(22) : EPC_W'($urandom_range(0, 40));
      epc_strobe = 1'b0;
      @(posedge clk); #1;
      check(rp_id == 2'(exp_id), "no change without strobe");
    end
    @(negedge clk);
    epc        = EPC_W'(pc);
    epc_strobe = 1'b1;
    exp_hit    = (new_id >= 0 && new_id < NUM_RP);
    if (new_id >= 0) exp_id = new_id;
    @(posedge clk); #1;
    epc_strobe = 1'b0;
    check(rp_id == 2'(exp_id), "rp_id after strobe");
    check(rp_hit == exp_hit, "rp_hit");
    check(task_start == (pc == 10), "task_start");
    seen_rp[exp_id]++;
  endtask

  task automatic run_task(input int iters);
    for (int pc = 10; pc <= 19; pc++) exec(pc, pc == 10 ? 0 : -1);
    for (int it = 0; it < iters; it++)
      for (int pc = 20; pc <= 30; pc++)
        exec(pc, (pc == 22 && it == 0) ? 1 : (pc == 22 && it == 5) ? 2 : -1);
    for (int pc = 31; pc <= 39; pc++) exec(pc, pc == 38 ? IDLE : -1);
  endtask

  initial begin
    exp_id = IDLE;
    foreach (seen_rp[i]) seen_rp[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(rp_id == 2'(IDLE), "idle after reset");
    // RP addresses outside a run are ignored
    exec(22, -1);
    exec(30, -1);
    for (int r = 0; r < 24; r++) run_task((r % 8) + 1);
    // a task that leaves the loop early and is restarted
    run_task(3);
    check(seen_rp[2] > 0 && seen_rp[1] > 0 && seen_rp[0] > 0, "all RPs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
