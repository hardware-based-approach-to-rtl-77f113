// tb_epc_capture: self-checking testbench of epc_capture.
// Drives random exception-stage PCs with random annul and valid bits and
// checks that the EPC follows the PC of every executed (valid, not
// annulled) instruction, holds it otherwise, and that epc_strobe marks
// exactly the executed instructions.
module tb_epc_capture;
  import hde_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [EPC_W-1:0] x_pc = '0;
  logic             x_annul = 1'b0;
  logic             x_valid = 1'b0;
  logic [EPC_W-1:0] epc;
  logic             epc_strobe;

  int checks = 0;
  int failures = 0;
  int n_exec = 0;
  int n_annul = 0;
  logic [EPC_W-1:0] last_exec;

  epc_capture dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: epc=%0h strobe=%0b pc=%0h annul=%0b valid=%0b exp_epc=%0h",
               what, epc, epc_strobe, x_pc, x_annul, x_valid, last_exec);
    end
  endtask

  initial begin
    last_exec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(epc == '0, "reset value");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      x_pc    = EPC_W'($urandom);
      x_annul = ($urandom_range(0, 3) == 0);
      x_valid = ($urandom_range(0, 3) != 0);
      #1;
      if (x_valid && !x_annul) begin
        last_exec = x_pc;
        n_exec++;
      end
      if (x_valid && x_annul) n_annul++;
      check(epc == last_exec, "epc value");
      check(epc_strobe == (x_valid && !x_annul), "strobe");
    end
    check(n_exec > 100 && n_annul > 100, "stimulus covered both cases");
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
