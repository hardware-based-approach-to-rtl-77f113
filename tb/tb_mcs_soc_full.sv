// tb_mcs_soc_full: full-size testbench of the mixed-criticality system.
// The system is instantiated with every parameter at its default (two
// masters, 512-sample memory, the three-RP example task with a 165-cycle
// deadline) and runs the critical task 64 times with 1 to 8 loop iterations
// while the secondary core keeps the bus busy. Every run must meet its
// deadline with no Deadline Miss, the bus must follow Warning, and all 64
// sampler records must match the waiting times counted by the harness.
module tb_mcs_soc_full;
  import hde_pkg::*;

  localparam int SW_f = 9;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- system f ----
  ahb_mst_out_t     mo_f [2];
  ahb_slv_out_t     mi_f, mso_f;
  logic [1:0]       hg_f;
  ahb_slv_in_t      msi_f;
  logic [EPC_W-1:0] xpc_f;
  logic             xan_f, xv_f, wr_f, sa_f, dm_f, dr_f, cs_f, ce_f, hit_f, hm_f;
  logic [1:0]       rp_f;
  logic [31:0]      ct_f, el_f;
  logic [SW_f-1:0] ra_f;
  sample_t          rd_f;
  logic [SW_f:0]   ns_f;
  logic             fu_f;
  logic             done_f;
  int               ck_f, fl_f, nsa_f, nrl_f, nrp2_f, nan_f, ncc_f, nms_f, nfu_f;

  mcs_soc u_soc_f (
    .clk, .rst_n, .crit_x_pc(xpc_f), .crit_x_annul(xan_f), .crit_x_valid(xv_f),
    .mst_out(mo_f), .mst_in(mi_f), .hgrant(hg_f), .mem_in(msi_f), .mem_out(mso_f),
    .warning(wr_f), .standalone(sa_f), .deadline_miss(dm_f), .deadline_reached(dr_f), .ctask_start(cs_f),
    .ctask_end(ce_f), .rp_id(rp_f), .rp_hit(hit_f), .ct(ct_f), .elapsed(el_f),
    .hmaster(hm_f), .rs_rd_addr(ra_f), .rs_rd_data(rd_f), .rs_n_samples(ns_f),
    .rs_full(fu_f));

  soc_harness #(.N_RUNS(64)) h_f (
    .clk, .rst_n, .mst_out(mo_f), .mst_in(mi_f), .hgrant(hg_f), .mem_in(msi_f),
    .mem_out(mso_f), .x_pc(xpc_f), .x_annul(xan_f), .x_valid(xv_f),
    .warning(wr_f), .standalone(sa_f), .deadline_miss(dm_f), .deadline_reached(dr_f), .ctask_start(cs_f),
    .ctask_end(ce_f), .rp_id(rp_f), .rp_hit(hit_f), .rs_rd_addr(ra_f),
    .rs_rd_data(rd_f), .rs_n_samples(ns_f), .rs_full(fu_f),
    .done(done_f), .checks(ck_f), .failures(fl_f), .n_sa_entry(nsa_f),
    .n_sa_release(nrl_f), .n_rp2(nrp2_f), .n_annul(nan_f), .n_concurrent(ncc_f),
    .n_miss(nms_f), .n_full(nfu_f));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_f);
    checks   += ck_f + 3;
    failures += fl_f;
    if (nsa_f == 0) begin failures++; $display("FAIL no stand-alone mode"); end
    if (nrl_f == 0) begin failures++; $display("FAIL no return to shared mode"); end
    if (nms_f != 0) begin failures++; $display("FAIL deadline missed"); end
    $display("stand-alone entries=%0d returns to shared=%0d RP2=%0d concurrent=%0d misses=%0d",
             nsa_f, nrl_f, nrp2_f, ncc_f, nms_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
