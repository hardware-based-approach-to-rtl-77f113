// tb_hde: self-checking testbench of the Hard Deadline Enforcer (defaults:
// RP0 at 10, RP1 at 22 in iteration 0, RP2 at 22 in iteration 5, end at 38,
// deadline 165, WCET_R 110/98/43, T_OVER 4).
// The example task (10..19, loop 20..30 run 1..8 times, 31..39) is executed
// here with a simple bus model: while the bus is in stand-alone mode (Warning
// seen one cycle earlier) one instruction completes per cycle, in shared
// mode one in 2 or 3 cycles. Phase 1 obeys Warning: every run must end by
// its deadline and Deadline Miss must stay low. Phase 2 ignores Warning and
// runs slowly, so runs overrun and Deadline Miss must rise. In both phases
// Warning and Deadline Miss are compared every cycle with a model that
// knows which RP the task passed (from its position in the task, not from
// cycle states) and applies CT = deadline - WCET_R - T_OVER with the 3-cycle
// detection latency.
module tb_hde;
  import hde_pkg::*;

  localparam int     IDLE     = 3;
  localparam longint DEADLINE = 165;
  localparam int     MAXC     = 200000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [EPC_W-1:0] epc = '0;
  logic             epc_strobe = 1'b0;
  logic             warning, deadline_miss, deadline_reached, ctask_start, ctask_end, rp_hit;
  logic [1:0]       rp_id;
  logic [31:0]      ct, elapsed;

  int checks = 0;
  int failures = 0;
  longint ct_tab [3];
  longint wcetr [3] = '{110, 98, 43};

  // model state
  longint cyc = 0;
  int     rp_hist [MAXC];
  longint t0 = -1000, te = -1000;
  bit     obey = 1;
  int     shared_div = 2;
  int     n_sa = 0, n_rel = 0, n_miss_runs = 0, n_ok_runs = 0, n_rp2 = 0;
  bit     prev_warn = 0;
  bit     prev_em = 0;
  bit     prev_er = 0;

  hde dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d: warn=%0b miss=%0b rp_id=%0d ct=%0d elapsed=%0d",
               what, cyc, warning, deadline_miss, rp_id, ct, elapsed);
    end
  endtask

  // one clock; strobe an instruction if pc >= 0; new_rp >= 0 updates the
  // model's RP
  task automatic tick(input int pc, input int new_rp);
    @(negedge clk);
    epc_strobe = (pc >= 0);
    if (pc >= 0) epc = EPC_W'(pc);
    rp_hist[cyc] = (cyc > 0) ? rp_hist[cyc-1] : IDLE;
    if (new_rp >= 0) rp_hist[cyc] = new_rp;
    if (pc == 10) t0 = cyc;
    if (pc == 38) te = cyc;
    @(posedge clk); #1;
    cyc++;
    // expected outputs of cycle 'cyc' (registered at the edge just passed)
    if (cyc >= 3) begin
      int  r;
      bit  ew;
      bit  em;
      bit  er;
      longint last_run;
      r  = rp_hist[cyc-3];
      ew = (r != IDLE) && (cyc - 3 >= t0) && ((longint'(cyc) - 1 - t0) >= ct_tab[r]);
      last_run = (te >= t0) ? ((longint'(cyc) - 1 < te + 1) ? longint'(cyc) - 1 : te + 1)
                            : longint'(cyc) - 1;
      // until the new run's CTaskStart is seen the old indication stays
      em = (cyc >= t0 + 3) ? ((last_run - t0) > DEADLINE) : prev_em;
      prev_em = em;
      // deadline instant: DEADLINE cycles after RP 0, also after the end
      er = (t0 < 0) ? 1'b0 : (cyc >= t0 + 3) ? ((longint'(cyc) - t0) >= DEADLINE) : prev_er;
      prev_er = er;
      check(warning == ew, "warning");
      check(deadline_miss == em, "deadline miss");
      check(deadline_reached == er, "deadline reached");
    end
    if (warning && !prev_warn) n_sa++;
    if (!warning && prev_warn && !ctask_end) n_rel++;
    prev_warn = warning;
  endtask

  // execute one instruction at the rate of the current bus mode
  task automatic exec(input int pc, input int new_rp);
    int wait_c;
    wait_c = (obey && warning) ? 0 : shared_div - 1;
    repeat (wait_c) tick(-1, -1);
    tick(pc, new_rp);
  endtask

  task automatic run_task(input int iters);
    longint t_end;
    for (int pc = 10; pc <= 19; pc++) exec(pc, pc == 10 ? 0 : -1);
    for (int it = 0; it < iters; it++)
      for (int pc = 20; pc <= 30; pc++) begin
        exec(pc, (pc == 22 && it == 0) ? 1 : (pc == 22 && it == 5) ? 2 : -1);
        if (pc == 22 && it == 5) n_rp2++;
      end
    for (int pc = 31; pc <= 39; pc++) exec(pc, pc == 38 ? IDLE : -1);
    t_end = cyc - 1;                    // cycle of the last instruction
    if (obey) begin
      check(t_end - t0 <= DEADLINE, "run meets its deadline");
      n_ok_runs++;
    end
    repeat (5) tick(-1, -1);
    if (deadline_miss) n_miss_runs++;
    check(ctask_end, "task ended");
  endtask

  initial begin
    for (int i = 0; i < 3; i++) ct_tab[i] = DEADLINE - wcetr[i] - 4;
    rp_hist[0] = IDLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) tick(-1, -1);
    // phase 1: bus follows Warning
    for (int r = 0; r < 32; r++) begin
      shared_div = (r % 3 == 2) ? 3 : 2;
      run_task((r % 8) + 1);
    end
    check(n_miss_runs == 0, "no deadline miss while obeyed");
    // phase 2: Warning ignored, slow bus
    obey = 0;
    shared_div = 3;
    for (int r = 0; r < 6; r++) run_task(8);
    check(n_miss_runs == 6, "deadline miss when Warning ignored");
    check(n_sa > 10 && n_rel > 5 && n_rp2 > 5, "mode switches and RP2 seen");
    $display("stand-alone entries=%0d releases=%0d rp2=%0d missed runs=%0d",
             n_sa, n_rel, n_rp2, n_miss_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
