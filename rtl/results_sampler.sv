// results_sampler: bus waiting-time recorder for the secondary core.
//
// Measures how long the non-critical (secondary) core has to wait for the
// bus during each run of the critical task, as the validation system does.
// A run is the time CTaskEnd (from the HDE) is low. During a run, a cycle in
// which the secondary core requests the bus (sec_req) without holding the
// grant (sec_grant) is a waiting cycle. Per run the sampler keeps:
//   run_cycles  length of the run
//   max_wait    longest unbroken stretch of waiting cycles
//   sum_wait    all waiting cycles
//   n_grants    requesting cycles in which the core held the grant
// The average wait per transfer is sum_wait / n_grants; the waiting-time
// ratio of a run is max_wait / run_cycles. When the run ends the record is
// written to a DEPTH-entry memory (512 samples, one block RAM's worth); once
// it is full further runs are not stored. The memory is read back through
// rd_addr/rd_data. Using the request as well as the grant is this design's
// choice; waits still open when the run ends are counted up to that cycle.
//
// Timing: rd_data is registered (one cycle after rd_addr). A record is
// written in the cycle after CTaskEnd rises and counted in n_samples then.
module results_sampler
  import hde_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ctask_end,   // low while the critical task runs
  input  logic            sec_req,     // hbusreq of the secondary core
  input  logic            sec_grant,   // hgrant of the secondary core
  input  logic [ADDR_W-1:0] rd_addr,
  output sample_t         rd_data,
  output logic [ADDR_W:0] n_samples,   // records stored
  output logic            full
);

  sample_t           mem [DEPTH];
  sample_t           cur_q;
  logic [31:0]       streak_q;
  logic              end_q;            // ctask_end, one cycle ago
  logic              running;

  assign running = !ctask_end;
  assign full    = (n_samples == (ADDR_W+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q     <= '0;
      streak_q  <= '0;
      end_q     <= 1'b1;
      n_samples <= '0;
    end else begin
      end_q <= ctask_end;
      if (end_q && running) begin
        // first cycle of a run
        cur_q            <= '0;
        cur_q.run_cycles <= 32'd1;
        streak_q         <= '0;
        if (sec_req && !sec_grant) begin
          cur_q.max_wait <= 32'd1;
          cur_q.sum_wait <= 32'd1;
          streak_q       <= 32'd1;
        end else if (sec_req) begin
          cur_q.n_grants <= 32'd1;
        end
      end else if (running) begin
        cur_q.run_cycles <= cur_q.run_cycles + 1;
        if (sec_req && !sec_grant) begin
          streak_q       <= streak_q + 1;
          cur_q.sum_wait <= cur_q.sum_wait + 1;
          if (streak_q + 1 > cur_q.max_wait) cur_q.max_wait <= streak_q + 1;
        end else begin
          streak_q <= '0;
          if (sec_req) cur_q.n_grants <= cur_q.n_grants + 1;
        end
      end else if (!end_q && !full) begin
        // run just ended: store its record
        n_samples <= n_samples + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!end_q && ctask_end && !full) mem[n_samples[ADDR_W-1:0]] <= cur_q;
    rd_data <= mem[rd_addr];
  end

endmodule
