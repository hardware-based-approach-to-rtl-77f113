// sec_core_model: behavioural model of the secondary (non-critical) core for
// the system testbenches (not synthesizable). It keeps requesting the bus,
// like a bubble sort running from uncached memory, and issues one single
// transfer per granted cycle; now and then it pauses for a few cycles.
// It counts the transfers it completed.
module sec_core_model
  import hde_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hgrant,
  input  ahb_slv_out_t mst_in,
  output ahb_mst_out_t mst_out,
  output int           n_xfers
);

  int  pause;
  logic [31:0] addr;

  logic want;

  always_comb begin
    mst_out         = '0;
    mst_out.hbusreq = want;
    mst_out.htrans  = (want && hgrant) ? HTRANS_NONSEQ : HTRANS_IDLE;
    mst_out.haddr   = addr;
    mst_out.hwrite  = addr[2];
    mst_out.hsize   = 3'd2;
    mst_out.hwdata  = ~addr;
  end

  initial begin pause = 0; addr = 32'h4000_1000; n_xfers = 0; want = 0; end

  always @(posedge clk) begin
    if (rst_n && mst_in.hready) begin
      if (want && hgrant) begin
        n_xfers <= n_xfers + 1;
        addr    <= addr + 4;
      end
      if (pause > 0) pause = pause - 1;
      else if ($urandom_range(0, 63) == 0) pause = $urandom_range(1, 4);
      want <= (pause == 0);
    end
  end
endmodule
