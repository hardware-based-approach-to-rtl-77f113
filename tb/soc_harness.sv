// soc_harness: models and checkers for a test of mcs_soc (not
// synthesizable). It provides the critical core model (master 0), the
// secondary core model (master 1) and the shared memory model, runs N_RUNS
// executions of the example critical task and checks, cycle by cycle:
//   - the bus follows Warning: one cycle after Warning is seen the grant is
//     master 0's, and the bus-mode output follows Warning with that delay;
//   - CTaskEnd falls two cycles after RP 0 executes and rises two cycles
//     after the instruction before the end (address 38) executes;
//   - when SAFE, every run ends within DEADLINE cycles of RP 0;
//   - Deadline Miss at the end of a run is high exactly when the HDE's
//     elapsed time passed DEADLINE while the run was still being tracked;
//   - deadline_reached rises exactly DEADLINE cycles after RP 0;
//   - the results sampler's records equal the per-run waiting statistics of
//     master 1 counted here.
// It counts how often each mechanism happened: stand-alone entries, returns
// to the shared mode during a run, the loop-iteration RP (RP 2), annulled
// instructions, cycles in which both cores used the bus during a run,
// deadline misses and a full sample memory. The system itself is
// instantiated by the testbench, so that one testbench can keep all of its
// parameters at their defaults.
module soc_harness
  import hde_pkg::*;
#(
  parameter int     N_RUNS   = 8,
  parameter longint DEADLINE = 165,
  parameter int     SAMPLES  = 512,
  parameter bit     SAFE     = 1'b1,
  parameter int     SMP_W    = $clog2(SAMPLES),
  parameter int     RPID_W   = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // to / from the system under test
  output ahb_mst_out_t     mst_out [2],
  input  ahb_slv_out_t     mst_in,
  input  logic [1:0]       hgrant,
  input  ahb_slv_in_t      mem_in,
  output ahb_slv_out_t     mem_out,
  output logic [EPC_W-1:0] x_pc,
  output logic             x_annul,
  output logic             x_valid,
  input  logic             warning,
  input  logic             standalone,
  input  logic             deadline_miss,
  input  logic             deadline_reached,
  input  logic             ctask_start,
  input  logic             ctask_end,
  input  logic [RPID_W-1:0] rp_id,
  input  logic             rp_hit,
  output logic [SMP_W-1:0] rs_rd_addr,
  input  sample_t          rs_rd_data,
  input  logic [SMP_W:0]   rs_n_samples,
  input  logic             rs_full,
  // results
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_sa_entry,
  output int   n_sa_release,
  output int   n_rp2,
  output int   n_annul,
  output int   n_concurrent,
  output int   n_miss,
  output int   n_full
);

  logic core_done;
  int   n_xfers, n_reads, n_writes;

  crit_core_model #(.N_RUNS(N_RUNS)) u_crit (
    .clk, .rst_n, .hgrant(hgrant[0]), .mst_in, .mst_out(mst_out[0]),
    .x_pc, .x_annul, .x_valid, .done(core_done));

  sec_core_model u_sec (
    .clk, .rst_n, .hgrant(hgrant[1]), .mst_in, .mst_out(mst_out[1]), .n_xfers);

  ahb_mem_model u_mem (
    .clk, .rst_n, .slv_in(mem_in), .slv_out(mem_out), .n_reads, .n_writes);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %m %s at %0t", what, $time);
    end
  endtask

  // ---- cycle-level checking -------------------------------------------
  longint cyc = 0;
  longint t0 = -100, t38 = -100, t39 = -100;
  bit     prev_warn = 0, prev_end = 1;
  int     run_i = 0;
  sample_t exp_rec [$];
  sample_t cur;
  int     streak;
  bit     rd_phase = 0;

  initial begin
    checks = 0; failures = 0; n_sa_entry = 0; n_sa_release = 0; n_rp2 = 0;
    n_annul = 0; n_concurrent = 0; n_miss = 0; n_full = 0; done = 0;
    rs_rd_addr = '0; cur = '0; streak = 0;
  end

  always @(posedge clk) begin
    if (rst_n && !rd_phase) begin
      cyc++;
      // bus follows Warning (values of the cycle that just ended)
      if (prev_warn) check(hgrant == 2'b01, "stand-alone grant");
      check(standalone == prev_warn, "bus mode output");
      // executed instructions
      if (x_valid && x_annul) n_annul++;
      if (x_valid && !x_annul) begin
        if (x_pc == 10) t0 = cyc;
        if (x_pc == 38) t38 = cyc;
        if (x_pc == 39) begin
          t39 = cyc;
          if (SAFE) check(t39 - t0 <= DEADLINE, "run ends by its deadline");
        end
      end
      if (cyc == t0 + 2) check(!ctask_end && ctask_start, "CTaskEnd falls 2 cycles after RP 0");
      if (cyc == t0 + DEADLINE - 1) check(!deadline_reached, "deadline instant not yet reached");
      if (cyc == t0 + DEADLINE) check(deadline_reached, "deadline instant reached");
      if (cyc == t38 + 2) begin
        check(ctask_end, "CTaskEnd rises 2 cycles after the end address");
        check(deadline_miss == ((t38 + 1 - t0) > DEADLINE), "deadline miss indication");
        if (deadline_miss) n_miss++;
        run_i++;
      end
      if (rp_hit && rp_id == RPID_W'(2)) n_rp2++;
      if (warning && !prev_warn) n_sa_entry++;
      if (!warning && prev_warn && !ctask_end) n_sa_release++;
      if (!ctask_end && mst_out[1].htrans == HTRANS_NONSEQ && hgrant[1]) n_concurrent++;
      // waiting statistics of master 1 per run
      if (!ctask_end) begin
        if (prev_end) begin cur = '0; streak = 0; end
        cur.run_cycles++;
        if (mst_out[1].hbusreq && !hgrant[1]) begin
          streak++;
          cur.sum_wait++;
          if (32'(streak) > cur.max_wait) cur.max_wait = 32'(streak);
        end else begin
          streak = 0;
          if (mst_out[1].hbusreq) cur.n_grants++;
        end
      end else if (!prev_end) begin
        exp_rec.push_back(cur);
      end
      prev_warn = warning;
      prev_end  = ctask_end;
      if (rs_full) n_full++;
    end
  end

  // ---- read back the sampler once all runs are done ---------------------
  initial begin
    wait (rst_n);
    wait (core_done);
    repeat (10) @(posedge clk);
    rd_phase = 1;
    check(run_i == N_RUNS, "all runs observed");
    check(int'(rs_n_samples) == ((N_RUNS < SAMPLES) ? N_RUNS : SAMPLES), "sample count");
    check(n_xfers > 0 && n_reads > 0 && n_writes > 0, "memory traffic");
    for (int i = 0; i < exp_rec.size() && i < SAMPLES; i++) begin
      @(negedge clk);
      rs_rd_addr = SMP_W'(i);
      @(posedge clk); #1;
      check(rs_rd_data == exp_rec[i], $sformatf("sampler record %0d", i));
    end
    done = 1;
  end

endmodule
