// tb_results_sampler: self-checking testbench of results_sampler.
// Two instances, the default 512-sample one and a 4-sample one that fills
// up. Random critical-task runs (CTaskEnd low) are applied with random
// request/grant patterns of the secondary core; the per-run record
// (run length, longest wait, total wait, granted cycles) is computed here
// and compared with what is read back from the sample memory afterwards.
module tb_results_sampler;
  import hde_pkg::*;

  localparam int RUNS = 20;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ctask_end = 1'b1;
  logic        sec_req = 1'b0;
  logic        sec_grant = 1'b0;
  logic [8:0]  rd_addr = '0;
  logic [1:0]  rd_addr_s = '0;
  sample_t     rd_data, rd_data_s;
  logic [9:0]  n_samples;
  logic [2:0]  n_samples_s;
  logic        full, full_s;

  int checks = 0;
  int failures = 0;
  sample_t exp_rec [RUNS];

  results_sampler dut (.clk, .rst_n, .ctask_end, .sec_req, .sec_grant,
                       .rd_addr, .rd_data, .n_samples, .full);
  results_sampler #(.DEPTH(4)) dut_s (.clk, .rst_n, .ctask_end, .sec_req, .sec_grant,
                       .rd_addr(rd_addr_s), .rd_data(rd_data_s),
                       .n_samples(n_samples_s), .full(full_s));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < RUNS; r++) begin
      int len, streak;
      sample_t e;
      e = '0;
      streak = 0;
      len = $urandom_range(1, 300);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        ctask_end = 1'b0;
        // bursts of waiting, like a core held off the bus
        sec_req   = ($urandom_range(0, 7) != 0);
        sec_grant = ($urandom_range(0, 2) == 0) || (r % 5 == 4);
        e.run_cycles++;
        if (sec_req && !sec_grant) begin
          streak++;
          e.sum_wait++;
          if (32'(streak) > e.max_wait) e.max_wait = 32'(streak);
        end else begin
          streak = 0;
          if (sec_req) e.n_grants++;
        end
      end
      exp_rec[r] = e;
      // idle between runs: activity here must not count
      repeat ($urandom_range(1, 5)) begin
        @(negedge clk);
        ctask_end = 1'b1;
        sec_req   = 1'($urandom);
        sec_grant = 1'($urandom);
      end
      @(posedge clk); #1;
      check(n_samples == 10'(r + 1), "sample count");
      check(n_samples_s == 3'((r + 1 > 4) ? 4 : r + 1), "small sampler count");
    end
    check(full_s && !full, "full flags");
    for (int r = 0; r < RUNS; r++) begin
      @(negedge clk);
      rd_addr   = 9'(r);
      rd_addr_s = 2'(r % 4);
      @(posedge clk); #1;
      check(rd_data == exp_rec[r], $sformatf("record %0d", r));
      check(rd_data_s == exp_rec[r % 4], $sformatf("small record %0d", r % 4));
    end
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
