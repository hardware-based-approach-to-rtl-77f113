// ahb_ctrl: AHB bus controller (arbiter and multiplexer) with stand-alone mode.
//
// Arbitrates NMST masters round-robin onto one slave, the shared memory. In
// round-robin mode, when no master requests the bus it stays with its last
// owner. When force_sa is high the bus is in "stand-alone" mode: it is
// granted only to master 0, the critical core, whatever the others request.
// The round-robin sequence is paused during stand-alone mode and resumes
// where it stopped when the bus returns to the shared mode.
//
// Bus subset (this design's choice): AHB single transfers with an address
// phase and a data phase; one slave selected for every non-IDLE transfer;
// no bursts, locking, split or retry. hgrant[i] is high while master i owns
// the address phase; its transfer is taken when it drives NONSEQ and hready
// is high. The slave's hready/hresp/hrdata are returned to all masters.
//
// Timing: the owner of the address phase (hmaster) is registered and only
// changes when hready is high, so a change of force_sa reaches the grant one
// cycle later (the 1-cycle switching latency of the controller). hwdata is
// taken from the owner of the data phase.
module ahb_ctrl
  import hde_pkg::*;
#(
  parameter int unsigned NMST  = 2,            // 2 to 16 masters
  parameter int unsigned MST_W = (NMST > 1) ? $clog2(NMST) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 force_sa,           // Warning of the HDE
  input  ahb_mst_out_t         mst_out [NMST],     // from the masters
  output ahb_slv_out_t         mst_in,             // to every master
  output logic [NMST-1:0]      hgrant,
  output logic [MST_W-1:0]     hmaster,            // address-phase owner
  output logic                 standalone,         // bus mode: 1 = stand-alone
  output ahb_slv_in_t          slv_in,             // to the shared memory
  input  ahb_slv_out_t         slv_out             // from the shared memory
);

  logic [MST_W-1:0] rr_last_q;    // last owner in the round-robin sequence
  logic [MST_W-1:0] hmaster_d_q;  // data-phase owner
  logic [MST_W-1:0] next_master;
  logic [NMST-1:0]  req;

  always_comb begin
    for (int i = 0; i < int'(NMST); i++)
      req[i] = mst_out[i].hbusreq || (mst_out[i].htrans != HTRANS_IDLE && hmaster == MST_W'(i));
  end

  // Round-robin choice after rr_last_q; the last owner keeps the bus when
  // nobody requests it.
  always_comb begin
    next_master = hmaster;
    if (force_sa) begin
      next_master = '0;
    end else begin
      for (int k = int'(NMST); k >= 1; k--) begin
        if (req[(int'(rr_last_q) + k) % int'(NMST)])
          next_master = MST_W'((int'(rr_last_q) + k) % int'(NMST));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hmaster     <= '0;
      hmaster_d_q <= '0;
      rr_last_q   <= '0;
      standalone  <= 1'b0;
    end else if (slv_out.hready) begin
      hmaster     <= next_master;
      hmaster_d_q <= hmaster;
      standalone  <= force_sa;
      if (!force_sa) rr_last_q <= next_master;
    end
  end

  always_comb begin
    hgrant = '0;
    hgrant[hmaster] = 1'b1;
  end

  assign slv_in.hsel   = (mst_out[hmaster].htrans != HTRANS_IDLE);
  assign slv_in.htrans = mst_out[hmaster].htrans;
  assign slv_in.haddr  = mst_out[hmaster].haddr;
  assign slv_in.hwrite = mst_out[hmaster].hwrite;
  assign slv_in.hsize  = mst_out[hmaster].hsize;
  assign slv_in.hwdata = mst_out[hmaster_d_q].hwdata;
  assign mst_in        = slv_out;

  // Exactly one master owns the address phase; stand-alone mode grants
  // master 0 from the cycle after force_sa is seen with hready.
  a_grant_onehot : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(hgrant));
  a_force_master0 : assert property (@(posedge clk) disable iff (!rst_n)
    (force_sa && slv_out.hready) |=> hgrant[0]);

endmodule
