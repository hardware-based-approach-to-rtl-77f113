// tb_hde_scaling: runs HDEs generated for the reference-point counts of the
// area-scaling experiments: 1 loop x 10 RPs (12 RPs), 10 loops x 10 RPs
// (102 RPs), 100 loops x 10 RPs (1002 RPs) and 1 loop x 1000 RPs per loop
// (1002 RPs in 1000 iterations of one loop), and loopless tasks with an RP
// on every instruction, 10 and 1000 RPs. Each HDE executes its synthetic
// task and checks every RP and its critical time.
module tb_hde_scaling;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d1, d2, d3, d4, d5, d6;
  int c1, c2, c3, c4, c5, c6, f1, f2, f3, f4, f5, f6;

  hde_scaling_unit #(.LOOPS(1),   .RPL(10))   u1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  hde_scaling_unit #(.LOOPS(10),  .RPL(10))   u2 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));
  hde_scaling_unit #(.LOOPS(100), .RPL(10))   u3 (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3));
  hde_scaling_unit #(.LOOPS(1),   .RPL(1000)) u4 (.clk, .rst_n, .done(d4), .checks(c4), .failures(f4));
  hde_flat_unit    #(.NRP(10))                u5 (.clk, .rst_n, .done(d5), .checks(c5), .failures(f5));
  hde_flat_unit    #(.NRP(1000))              u6 (.clk, .rst_n, .done(d6), .checks(c6), .failures(f6));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d1 && d2 && d3 && d4 && d5 && d6);
    $display("12 RPs: %0d checks, 102 RPs: %0d, 1002 RPs (100 loops): %0d, 1002 RPs (1 loop): %0d",
             c1, c2, c3, c4);
    $display("loopless: 10 RPs: %0d checks, 1000 RPs: %0d", c5, c6);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4 + c5 + c6, f1 + f2 + f3 + f4 + f5 + f6);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4 + c5 + c6, f1 + f2 + f3 + f4 + f5 + f6 + 1);
    $finish;
  end
endmodule
