// tb_mcs_soc_deadlines: how the deadline and the number of reference points
// change the service the secondary core gets.
// Three systems run the same critical task (the three-RP example, 1..8 loop
// iterations per run, 32 runs) next to a secondary core that always wants
// the bus:
//   d) deadline 121 cycles (110 % of the 110-cycle WCET), 3 RPs;
//   e) deadline 165 cycles (150 %), 3 RPs;
//   f) deadline 165 cycles, 9 RPs: RP 0 plus one RP at address 22 in every
//      loop iteration 0..7, with WCET_R = 98 - 11 * iteration.
// Each system is checked cycle by cycle by the same harness as the other
// system testbenches (every run meets its deadline, the bus follows
// Warning, sampler records match). Then, per run, the longest unbroken wait
// of the secondary core divided by the run length ("maximum waiting ratio")
// and its total waiting cycles per granted cycle ("average wait") are
// averaged over the runs and compared:
//   - a longer deadline gives a smaller maximum ratio and average wait
//     (d against e);
//   - more RPs give a smaller maximum ratio at the same deadline (f against e).
// The per-run figures are computed here from the bus signals.
module tb_mcs_soc_deadlines;
  import hde_pkg::*;

  localparam int NR  = 32;
  localparam int SW  = 9;
  localparam int NRP_F = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // RP table of system f
  function automatic logic [NRP_F-1:0][EPC_W-1:0] f_addr();
    for (int i = 0; i < NRP_F; i++) f_addr[i] = (i == 0) ? EPC_W'(10) : EPC_W'(22);
  endfunction
  function automatic logic [NRP_F-1:0][15:0] f_cs();
    for (int i = 0; i < NRP_F; i++) f_cs[i] = (i == 0) ? 16'd0 : 16'(i - 1);
  endfunction
  function automatic logic [NRP_F-1:0][31:0] f_wcetr();
    for (int i = 0; i < NRP_F; i++) f_wcetr[i] = (i == 0) ? 32'd110 : 32'(98 - 11 * (i - 1));
  endfunction

  // ---- per-system signals -------------------------------------------------
  ahb_mst_out_t     mo [3][2];
  ahb_slv_out_t     mi [3], mso [3];
  logic [1:0]       hg [3];
  ahb_slv_in_t      msi [3];
  logic [EPC_W-1:0] xpc [3];
  logic             xan [3], xv [3], wr [3], sa [3], dm [3], dr [3], cs [3], ce [3], hit [3], hm [3];
  logic [1:0]       rp_d, rp_e;
  logic [3:0]       rp_f;
  logic [31:0]      ct [3], el [3];
  logic [SW-1:0]    ra [3];
  sample_t          rd [3];
  logic [SW:0]      ns [3];
  logic             fu [3];
  logic             done [3];
  int               ck [3], fl [3], nsa [3], nrl [3], nrp2 [3], nan [3], ncc [3], nms [3], nfu [3];

  mcs_soc #(.DEADLINE(32'd121)) u_soc_d (
    .clk, .rst_n, .crit_x_pc(xpc[0]), .crit_x_annul(xan[0]), .crit_x_valid(xv[0]),
    .mst_out(mo[0]), .mst_in(mi[0]), .hgrant(hg[0]), .mem_in(msi[0]), .mem_out(mso[0]),
    .warning(wr[0]), .standalone(sa[0]), .deadline_miss(dm[0]), .deadline_reached(dr[0]),
    .ctask_start(cs[0]), .ctask_end(ce[0]), .rp_id(rp_d), .rp_hit(hit[0]), .ct(ct[0]),
    .elapsed(el[0]), .hmaster(hm[0]), .rs_rd_addr(ra[0]), .rs_rd_data(rd[0]),
    .rs_n_samples(ns[0]), .rs_full(fu[0]));

  soc_harness #(.N_RUNS(NR), .DEADLINE(121)) h_d (
    .clk, .rst_n, .mst_out(mo[0]), .mst_in(mi[0]), .hgrant(hg[0]), .mem_in(msi[0]),
    .mem_out(mso[0]), .x_pc(xpc[0]), .x_annul(xan[0]), .x_valid(xv[0]),
    .warning(wr[0]), .standalone(sa[0]), .deadline_miss(dm[0]), .deadline_reached(dr[0]),
    .ctask_start(cs[0]), .ctask_end(ce[0]), .rp_id(rp_d), .rp_hit(hit[0]),
    .rs_rd_addr(ra[0]), .rs_rd_data(rd[0]), .rs_n_samples(ns[0]), .rs_full(fu[0]),
    .done(done[0]), .checks(ck[0]), .failures(fl[0]), .n_sa_entry(nsa[0]),
    .n_sa_release(nrl[0]), .n_rp2(nrp2[0]), .n_annul(nan[0]), .n_concurrent(ncc[0]),
    .n_miss(nms[0]), .n_full(nfu[0]));

  mcs_soc u_soc_e (
    .clk, .rst_n, .crit_x_pc(xpc[1]), .crit_x_annul(xan[1]), .crit_x_valid(xv[1]),
    .mst_out(mo[1]), .mst_in(mi[1]), .hgrant(hg[1]), .mem_in(msi[1]), .mem_out(mso[1]),
    .warning(wr[1]), .standalone(sa[1]), .deadline_miss(dm[1]), .deadline_reached(dr[1]),
    .ctask_start(cs[1]), .ctask_end(ce[1]), .rp_id(rp_e), .rp_hit(hit[1]), .ct(ct[1]),
    .elapsed(el[1]), .hmaster(hm[1]), .rs_rd_addr(ra[1]), .rs_rd_data(rd[1]),
    .rs_n_samples(ns[1]), .rs_full(fu[1]));

  soc_harness #(.N_RUNS(NR), .DEADLINE(165)) h_e (
    .clk, .rst_n, .mst_out(mo[1]), .mst_in(mi[1]), .hgrant(hg[1]), .mem_in(msi[1]),
    .mem_out(mso[1]), .x_pc(xpc[1]), .x_annul(xan[1]), .x_valid(xv[1]),
    .warning(wr[1]), .standalone(sa[1]), .deadline_miss(dm[1]), .deadline_reached(dr[1]),
    .ctask_start(cs[1]), .ctask_end(ce[1]), .rp_id(rp_e), .rp_hit(hit[1]),
    .rs_rd_addr(ra[1]), .rs_rd_data(rd[1]), .rs_n_samples(ns[1]), .rs_full(fu[1]),
    .done(done[1]), .checks(ck[1]), .failures(fl[1]), .n_sa_entry(nsa[1]),
    .n_sa_release(nrl[1]), .n_rp2(nrp2[1]), .n_annul(nan[1]), .n_concurrent(ncc[1]),
    .n_miss(nms[1]), .n_full(nfu[1]));

  mcs_soc #(
    .NUM_RP(NRP_F), .RP_ADDR(f_addr()), .RP_USE_CS(9'b111111110),
    .RP_LOOP('0), .RP_CS(f_cs()), .WCETR(f_wcetr())
  ) u_soc_f (
    .clk, .rst_n, .crit_x_pc(xpc[2]), .crit_x_annul(xan[2]), .crit_x_valid(xv[2]),
    .mst_out(mo[2]), .mst_in(mi[2]), .hgrant(hg[2]), .mem_in(msi[2]), .mem_out(mso[2]),
    .warning(wr[2]), .standalone(sa[2]), .deadline_miss(dm[2]), .deadline_reached(dr[2]),
    .ctask_start(cs[2]), .ctask_end(ce[2]), .rp_id(rp_f), .rp_hit(hit[2]), .ct(ct[2]),
    .elapsed(el[2]), .hmaster(hm[2]), .rs_rd_addr(ra[2]), .rs_rd_data(rd[2]),
    .rs_n_samples(ns[2]), .rs_full(fu[2]));

  soc_harness #(.N_RUNS(NR), .DEADLINE(165), .RPID_W(4)) h_f (
    .clk, .rst_n, .mst_out(mo[2]), .mst_in(mi[2]), .hgrant(hg[2]), .mem_in(msi[2]),
    .mem_out(mso[2]), .x_pc(xpc[2]), .x_annul(xan[2]), .x_valid(xv[2]),
    .warning(wr[2]), .standalone(sa[2]), .deadline_miss(dm[2]), .deadline_reached(dr[2]),
    .ctask_start(cs[2]), .ctask_end(ce[2]), .rp_id(rp_f), .rp_hit(hit[2]),
    .rs_rd_addr(ra[2]), .rs_rd_data(rd[2]), .rs_n_samples(ns[2]), .rs_full(fu[2]),
    .done(done[2]), .checks(ck[2]), .failures(fl[2]), .n_sa_entry(nsa[2]),
    .n_sa_release(nrl[2]), .n_rp2(nrp2[2]), .n_annul(nan[2]), .n_concurrent(ncc[2]),
    .n_miss(nms[2]), .n_full(nfu[2]));

  // ---- per-run waiting figures of the secondary core -----------------------
  real    sum_ratio [3];
  real    sum_avg   [3];
  int     n_runs    [3];
  int     run_len   [3], streak [3], max_str [3], waits [3], grants [3];
  bit     in_run    [3];

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < 3; s++) begin
        if (!ce[s]) begin
          if (!in_run[s]) begin
            in_run[s] = 1; run_len[s] = 0; streak[s] = 0; max_str[s] = 0;
            waits[s] = 0; grants[s] = 0;
          end
          run_len[s]++;
          if (mo[s][1].hbusreq && !hg[s][1]) begin
            streak[s]++;
            waits[s]++;
            if (streak[s] > max_str[s]) max_str[s] = streak[s];
          end else begin
            streak[s] = 0;
            if (mo[s][1].hbusreq) grants[s]++;
          end
        end else if (in_run[s]) begin
          in_run[s] = 0;
          n_runs[s]++;
          sum_ratio[s] += real'(max_str[s]) / real'(run_len[s]);
          sum_avg[s]   += real'(waits[s]) / real'((grants[s] > 0) ? grants[s] : 1);
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      sum_ratio[s] = 0.0; sum_avg[s] = 0.0; n_runs[s] = 0; in_run[s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    for (int s = 0; s < 3; s++) begin
      checks   += ck[s];
      failures += fl[s];
      check(nms[s] == 0, "no deadline missed");
      check(n_runs[s] == NR, "all runs seen");
      check(nsa[s] > 0, "stand-alone mode used");
    end
    check(nrl[2] > 0, "9-RP system returned to the shared mode during a run");
    for (int s = 0; s < 3; s++)
      $display("system %s: max waiting ratio %0.3f, average wait %0.3f, stand-alone entries %0d, returns %0d",
               (s == 0) ? "110%/3 RPs" : (s == 1) ? "150%/3 RPs" : "150%/9 RPs",
               sum_ratio[s] / NR, sum_avg[s] / NR, nsa[s], nrl[s]);
    check(sum_ratio[1] < sum_ratio[0], "longer deadline: smaller maximum waiting ratio");
    check(sum_avg[1] < sum_avg[0], "longer deadline: smaller average wait");
    check(sum_ratio[2] < sum_ratio[1], "more RPs: smaller maximum waiting ratio");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
