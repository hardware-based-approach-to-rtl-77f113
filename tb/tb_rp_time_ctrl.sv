// tb_rp_time_ctrl: self-checking testbench of rp_time_ctrl.
// Three instances.
// The default one (deadline 165, WCET_R 110/98/43, T_OVER 4)
// and one with a 100-cycle deadline whose first two critical times would be
// negative and must be clamped to 0. Random RP_IDs are applied and CT,
// CTaskStart and CTaskEnd are compared one cycle later with values computed
// here from CT = deadline - WCET_R - T_OVER.
// The third holds the idealised two-RP example (deadline 9, T_OVER 0,
// WCET_R 8 and 2) and must give its critical times 1 and 7.
module tb_rp_time_ctrl;
  import hde_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [1:0]  rp_id = 2'd3;
  logic        task_start = 1'b0;
  logic [31:0] ct_a, ct_b;
  logic        st_a, st_b, end_a, end_b;

  int checks = 0;
  int failures = 0;
  longint exp_a [3];
  longint exp_b [3];
  longint wcetr [3] = '{110, 98, 43};
  logic [31:0] last_a, last_b, last_c;
  // idealised two-RP example: deadline 9, no turn-over cost,
  // WCET_R 8 and 2, printed critical times 1 and 7
  logic [1:0]  rp_id_c = 2'd2;
  logic [31:0] ct_c;
  logic        st_c, end_c;
  longint      ct_tab1 [2] = '{1, 7};

  rp_time_ctrl dut_a (
    .clk, .rst_n, .rp_id, .task_start,
    .ct(ct_a), .ctask_start(st_a), .ctask_end(end_a));

  rp_time_ctrl #(.DEADLINE(32'd100)) dut_b (
    .clk, .rst_n, .rp_id, .task_start,
    .ct(ct_b), .ctask_start(st_b), .ctask_end(end_b));

  rp_time_ctrl #(.NUM_RP(2), .DEADLINE(32'd9), .T_OVER(32'd0),
                 .WCETR({32'd2, 32'd8})) dut_c (
    .clk, .rst_n, .rp_id(rp_id_c), .task_start,
    .ct(ct_c), .ctask_start(st_c), .ctask_end(end_c));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rp_id=%0d ct_a=%0d ct_b=%0d", what, rp_id, ct_a, ct_b);
    end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin
      exp_a[i] = 165 - wcetr[i] - 4;
      exp_b[i] = 100 - wcetr[i] - 4;
      if (exp_b[i] < 0) exp_b[i] = 0;
    end
    last_a = '0;
    last_b = '0;
    last_c = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(end_a && end_b && !st_a, "idle after reset");
    for (int n = 0; n < 500; n++) begin
      logic [1:0] id;
      logic       st;
      @(negedge clk);
      id = 2'($urandom_range(0, 3));
      st = (id == 0) && ($urandom_range(0, 1) == 1);
      rp_id      = id;
      rp_id_c    = (id < 2) ? id : 2'd2;
      task_start = st;
      @(posedge clk); #1;
      if (id < 3) begin
        last_a = 32'(exp_a[id]);
        last_b = 32'(exp_b[id]);
      end
      if (id < 2) last_c = 32'(ct_tab1[id[0]]);
      check(ct_a == last_a, "CT default");
      check(ct_b == last_b, "CT clamped");
      check(ct_c == last_c, "CT of the two-RP example");
      check(end_c == (id >= 2), "CTaskEnd of the two-RP example");
      check(st_a == st && st_b == st, "CTaskStart");
      check(end_a == (id == 3) && end_b == (id == 3), "CTaskEnd");
    end
    check(exp_a[0] == 51 && exp_a[1] == 63 && exp_a[2] == 118, "table");
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
