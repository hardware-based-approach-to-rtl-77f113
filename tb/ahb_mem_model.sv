// ahb_mem_model: behavioural model of the shared on-chip AHB RAM for the
// system testbenches (not synthesizable). Zero wait states, OKAY responses;
// a write stores hwdata in the data phase, a read returns the stored word
// (or the word address when never written) in the data phase.
module ahb_mem_model
  import hde_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ahb_slv_in_t  slv_in,
  output ahb_slv_out_t slv_out,
  output int           n_reads,
  output int           n_writes
);

  logic [31:0] mem [logic [29:0]];
  logic        dp_act, dp_wr;
  logic [29:0] dp_a;

  initial begin dp_act = 0; dp_wr = 0; dp_a = '0; n_reads = 0; n_writes = 0; end

  always_comb begin
    slv_out.hready = 1'b1;
    slv_out.hresp  = 1'b0;
    slv_out.hrdata = (dp_act && !dp_wr) ? (mem.exists(dp_a) ? mem[dp_a] : {2'b00, dp_a}) : 32'h0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (dp_act && dp_wr) begin mem[dp_a] = slv_in.hwdata; n_writes <= n_writes + 1; end
      if (dp_act && !dp_wr) n_reads <= n_reads + 1;
      dp_act <= slv_in.hsel && slv_in.htrans == HTRANS_NONSEQ;
      dp_wr  <= slv_in.hwrite;
      dp_a   <= slv_in.haddr[31:2];
    end
  end
endmodule
