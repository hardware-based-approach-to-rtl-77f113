// tb_mcs_soc: end-to-end testbench of the mixed-criticality system.
// Three systems run side by side on the example critical task and a
// secondary core that keeps the bus busy:
//   a) default parameters, 24 runs: the HDE must keep every run within its
//      165-cycle deadline while the bus switches between shared and
//      stand-alone mode;
//   b) a 4-entry sample memory, 8 runs: the sampler fills up;
//   c) remaining WCETs configured far too low (an unsafe configuration),
//      8 runs: the HDE warns too late and must report deadline misses.
// Each mechanism (stand-alone entry, return to shared mode, loop-iteration
// RP, annulled instruction, concurrent bus use, deadline miss, full sample
// memory) must happen at least once.
module tb_mcs_soc;
  import hde_pkg::*;

  localparam int SW_a = 9;
  localparam int SW_b = 2;
  localparam int SW_c = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- system a ----
  ahb_mst_out_t     mo_a [2];
  ahb_slv_out_t     mi_a, mso_a;
  logic [1:0]       hg_a;
  ahb_slv_in_t      msi_a;
  logic [EPC_W-1:0] xpc_a;
  logic             xan_a, xv_a, wr_a, sa_a, dm_a, dr_a, cs_a, ce_a, hit_a, hm_a;
  logic [1:0]       rp_a;
  logic [31:0]      ct_a, el_a;
  logic [SW_a-1:0] ra_a;
  sample_t          rd_a;
  logic [SW_a:0]   ns_a;
  logic             fu_a;
  logic             done_a;
  int               ck_a, fl_a, nsa_a, nrl_a, nrp2_a, nan_a, ncc_a, nms_a, nfu_a;

  mcs_soc #(.SAMPLES(512)) u_soc_a (
    .clk, .rst_n, .crit_x_pc(xpc_a), .crit_x_annul(xan_a), .crit_x_valid(xv_a),
    .mst_out(mo_a), .mst_in(mi_a), .hgrant(hg_a), .mem_in(msi_a), .mem_out(mso_a),
    .warning(wr_a), .standalone(sa_a), .deadline_miss(dm_a), .deadline_reached(dr_a), .ctask_start(cs_a),
    .ctask_end(ce_a), .rp_id(rp_a), .rp_hit(hit_a), .ct(ct_a), .elapsed(el_a),
    .hmaster(hm_a), .rs_rd_addr(ra_a), .rs_rd_data(rd_a), .rs_n_samples(ns_a),
    .rs_full(fu_a));

  soc_harness #(.N_RUNS(24)) h_a (
    .clk, .rst_n, .mst_out(mo_a), .mst_in(mi_a), .hgrant(hg_a), .mem_in(msi_a),
    .mem_out(mso_a), .x_pc(xpc_a), .x_annul(xan_a), .x_valid(xv_a),
    .warning(wr_a), .standalone(sa_a), .deadline_miss(dm_a), .deadline_reached(dr_a), .ctask_start(cs_a),
    .ctask_end(ce_a), .rp_id(rp_a), .rp_hit(hit_a), .rs_rd_addr(ra_a),
    .rs_rd_data(rd_a), .rs_n_samples(ns_a), .rs_full(fu_a),
    .done(done_a), .checks(ck_a), .failures(fl_a), .n_sa_entry(nsa_a),
    .n_sa_release(nrl_a), .n_rp2(nrp2_a), .n_annul(nan_a), .n_concurrent(ncc_a),
    .n_miss(nms_a), .n_full(nfu_a));
  // ---- system b ----
  ahb_mst_out_t     mo_b [2];
  ahb_slv_out_t     mi_b, mso_b;
  logic [1:0]       hg_b;
  ahb_slv_in_t      msi_b;
  logic [EPC_W-1:0] xpc_b;
  logic             xan_b, xv_b, wr_b, sa_b, dm_b, dr_b, cs_b, ce_b, hit_b, hm_b;
  logic [1:0]       rp_b;
  logic [31:0]      ct_b, el_b;
  logic [SW_b-1:0] ra_b;
  sample_t          rd_b;
  logic [SW_b:0]   ns_b;
  logic             fu_b;
  logic             done_b;
  int               ck_b, fl_b, nsa_b, nrl_b, nrp2_b, nan_b, ncc_b, nms_b, nfu_b;

  mcs_soc #(.SAMPLES(4)) u_soc_b (
    .clk, .rst_n, .crit_x_pc(xpc_b), .crit_x_annul(xan_b), .crit_x_valid(xv_b),
    .mst_out(mo_b), .mst_in(mi_b), .hgrant(hg_b), .mem_in(msi_b), .mem_out(mso_b),
    .warning(wr_b), .standalone(sa_b), .deadline_miss(dm_b), .deadline_reached(dr_b), .ctask_start(cs_b),
    .ctask_end(ce_b), .rp_id(rp_b), .rp_hit(hit_b), .ct(ct_b), .elapsed(el_b),
    .hmaster(hm_b), .rs_rd_addr(ra_b), .rs_rd_data(rd_b), .rs_n_samples(ns_b),
    .rs_full(fu_b));

  soc_harness #(.N_RUNS(8), .SAMPLES(4)) h_b (
    .clk, .rst_n, .mst_out(mo_b), .mst_in(mi_b), .hgrant(hg_b), .mem_in(msi_b),
    .mem_out(mso_b), .x_pc(xpc_b), .x_annul(xan_b), .x_valid(xv_b),
    .warning(wr_b), .standalone(sa_b), .deadline_miss(dm_b), .deadline_reached(dr_b), .ctask_start(cs_b),
    .ctask_end(ce_b), .rp_id(rp_b), .rp_hit(hit_b), .rs_rd_addr(ra_b),
    .rs_rd_data(rd_b), .rs_n_samples(ns_b), .rs_full(fu_b),
    .done(done_b), .checks(ck_b), .failures(fl_b), .n_sa_entry(nsa_b),
    .n_sa_release(nrl_b), .n_rp2(nrp2_b), .n_annul(nan_b), .n_concurrent(ncc_b),
    .n_miss(nms_b), .n_full(nfu_b));
  // ---- system c ----
  ahb_mst_out_t     mo_c [2];
  ahb_slv_out_t     mi_c, mso_c;
  logic [1:0]       hg_c;
  ahb_slv_in_t      msi_c;
  logic [EPC_W-1:0] xpc_c;
  logic             xan_c, xv_c, wr_c, sa_c, dm_c, dr_c, cs_c, ce_c, hit_c, hm_c;
  logic [1:0]       rp_c;
  logic [31:0]      ct_c, el_c;
  logic [SW_c-1:0] ra_c;
  sample_t          rd_c;
  logic [SW_c:0]   ns_c;
  logic             fu_c;
  logic             done_c;
  int               ck_c, fl_c, nsa_c, nrl_c, nrp2_c, nan_c, ncc_c, nms_c, nfu_c;

  mcs_soc #(.WCETR({32'd5, 32'd10, 32'd20})) u_soc_c (
    .clk, .rst_n, .crit_x_pc(xpc_c), .crit_x_annul(xan_c), .crit_x_valid(xv_c),
    .mst_out(mo_c), .mst_in(mi_c), .hgrant(hg_c), .mem_in(msi_c), .mem_out(mso_c),
    .warning(wr_c), .standalone(sa_c), .deadline_miss(dm_c), .deadline_reached(dr_c), .ctask_start(cs_c),
    .ctask_end(ce_c), .rp_id(rp_c), .rp_hit(hit_c), .ct(ct_c), .elapsed(el_c),
    .hmaster(hm_c), .rs_rd_addr(ra_c), .rs_rd_data(rd_c), .rs_n_samples(ns_c),
    .rs_full(fu_c));

  soc_harness #(.N_RUNS(8), .SAFE(1'b0)) h_c (
    .clk, .rst_n, .mst_out(mo_c), .mst_in(mi_c), .hgrant(hg_c), .mem_in(msi_c),
    .mem_out(mso_c), .x_pc(xpc_c), .x_annul(xan_c), .x_valid(xv_c),
    .warning(wr_c), .standalone(sa_c), .deadline_miss(dm_c), .deadline_reached(dr_c), .ctask_start(cs_c),
    .ctask_end(ce_c), .rp_id(rp_c), .rp_hit(hit_c), .rs_rd_addr(ra_c),
    .rs_rd_data(rd_c), .rs_n_samples(ns_c), .rs_full(fu_c),
    .done(done_c), .checks(ck_c), .failures(fl_c), .n_sa_entry(nsa_c),
    .n_sa_release(nrl_c), .n_rp2(nrp2_c), .n_annul(nan_c), .n_concurrent(ncc_c),
    .n_miss(nms_c), .n_full(nfu_c));

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_a && done_b && done_c);
    checks   += ck_a + ck_b + ck_c;
    failures += fl_a + fl_b + fl_c;
    $display("default : stand-alone entries=%0d returns to shared=%0d RP2=%0d annulled=%0d concurrent=%0d misses=%0d",
             nsa_a, nrl_a, nrp2_a, nan_a, ncc_a, nms_a);
    $display("small   : cycles with full sample memory=%0d", nfu_b);
    $display("unsafe  : deadline misses=%0d", nms_c);
    need(nsa_a, "switch to stand-alone mode");
    need(nrl_a, "return to shared mode during a run");
    need(nrp2_a, "RP selected by loop cycle state");
    need(nan_a, "annulled instruction ignored");
    need(ncc_a, "concurrent bus use during the critical task");
    need(nms_c, "deadline miss indication");
    need(nfu_b, "sample memory full");
    checks++;
    if (nms_a != 0) begin failures++; $display("FAIL deadline missed with the safe configuration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
