// hde_flat_unit: one HDE generated for a synthetic task without loops, as in
// the area-scaling experiments on loopless code: NRP reference points on
// NRP consecutive instructions (RP 0 is the first), followed by the end
// address and a final instruction. No RP uses a cycle state; the single
// cycle-state counter the HDE keeps is driven by addresses outside the task.
// Used by tb_hde_scaling (not synthesizable).
// The unit executes the task twice and checks RP_ID one cycle and CT two
// cycles after every RP against the generated tables
// (WCET_R(i) = (NRP - i) * 10, deadline 12 * NRP + 100).
module hde_flat_unit
  import hde_pkg::*;
#(
  parameter int NRP = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int RPID_W = $clog2(NRP + 1);
  localparam int BASE   = 100;
  localparam logic [TIME_W-1:0] DL = TIME_W'(12 * NRP + 100);

  typedef logic [NRP-1:0][EPC_W-1:0]  addr_arr_t;
  typedef logic [NRP-1:0][TIME_W-1:0] time_arr_t;

  function automatic addr_arr_t gen_addr();
    addr_arr_t a;
    for (int i = 0; i < NRP; i++) a[i] = EPC_W'(BASE + i);
    return a;
  endfunction
  function automatic time_arr_t gen_wcetr();
    time_arr_t w;
    for (int i = 0; i < NRP; i++) w[i] = TIME_W'((NRP - i) * 10);
    return w;
  endfunction

  logic [EPC_W-1:0]  epc;
  logic              epc_strobe;
  logic              warning, deadline_miss, deadline_reached, ctask_start, ctask_end, rp_hit;
  logic [RPID_W-1:0] rp_id;
  logic [TIME_W-1:0] ct, elapsed;

  hde #(
    .NUM_RP(NRP), .NUM_LOOPS(1), .CS_W(1),
    .RP_ADDR(gen_addr()), .RP_USE_CS('0), .RP_LOOP('0), .RP_CS('0),
    .LOOP_CLR_ADDR(EPC_W'(1)), .LOOP_INC_ADDR(EPC_W'(2)),
    .END_ADDR(EPC_W'(BASE + NRP)), .DEADLINE(DL), .WCETR(gen_wcetr())
  ) u_hde (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m %s: rp_id=%0d ct=%0d", what, rp_id, ct);
    end
  endtask

  int n_rps_seen;

  // execute one instruction; for an RP, check RP_ID and CT
  task automatic exec(input int pc, input int exp_rp);
    @(negedge clk);
    epc = EPC_W'(pc);
    epc_strobe = 1'b1;
    @(posedge clk); #1;
    epc_strobe = 1'b0;
    if (exp_rp >= 0) begin
      check(rp_id == RPID_W'(exp_rp), "RP_ID");
      @(posedge clk); #1;
      check(ct == DL - TIME_W'((NRP - exp_rp) * 10) - 4, "CT");
      n_rps_seen++;
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_rps_seen = 0;
    epc = '0; epc_strobe = 0;
    wait (rst_n);
    repeat (2) @(posedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < NRP; i++) exec(BASE + i, i);
      exec(BASE + NRP, -1);
      #1 check(rp_id == RPID_W'(NRP), "idle after the end address");
      exec(BASE + NRP + 1, -1);
      check(ctask_end && !deadline_miss, "ended in time");
    end
    check(n_rps_seen == 2 * NRP, "every RP seen");
    done = 1;
  end
endmodule
