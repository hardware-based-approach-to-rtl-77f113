// mcs_soc: mixed-criticality multicore bus system with a Hard Deadline
// Enforcer.
//
// One critical core (AHB master 0) runs a hard real-time task while the
// other cores (masters 1..NMST-1) run less-critical work on the same shared
// memory bus. The HDE follows the critical task through the Executed Program
// Counter of master 0 and, as soon as the task could no longer meet its
// deadline if the bus stayed shared, forces the bus controller into
// stand-alone mode; it releases the bus again when a later reference point
// shows the task is ahead of its worst case. The results sampler records
// how long master 1 waited for the bus in each run of the critical task.
//
// The processor cores and the shared memory are not part of this RTL: their
// AHB signals (and the critical core's exception-stage PC, annul and valid)
// are ports. Structure:
//   epc_capture -> hde --warning--> ahb_ctrl.force_sa
//   hde.ctask_end, ahb_ctrl.hgrant[1], master 1 hbusreq -> results_sampler
//
// Timing: an executed reference point changes the grant 4 cycles later
// (3 cycles in the HDE, 1 in the bus controller), the default T_OVER.
module mcs_soc
  import hde_pkg::*;
#(
  parameter int unsigned NMST      = 2,
  parameter int unsigned MST_W     = (NMST > 1) ? $clog2(NMST) : 1,
  parameter int unsigned SAMPLES   = 512,
  parameter int unsigned SMP_W     = $clog2(SAMPLES),
  parameter int unsigned NUM_RP    = 3,
  parameter int unsigned NUM_LOOPS = 1,
  parameter int unsigned CS_W      = 16,
  parameter int unsigned RPID_W    = $clog2(NUM_RP + 1),
  parameter logic [NUM_RP-1:0][EPC_W-1:0]    RP_ADDR   = {30'd22, 30'd22, 30'd10},
  parameter logic [NUM_RP-1:0]               RP_USE_CS = 3'b110,
  parameter logic [NUM_RP-1:0][7:0]          RP_LOOP   = {8'd0, 8'd0, 8'd0},
  parameter logic [NUM_RP-1:0][CS_W-1:0]     RP_CS     = {16'd5, 16'd0, 16'd0},
  parameter logic [NUM_LOOPS-1:0][EPC_W-1:0] LOOP_CLR_ADDR = {30'd19},
  parameter logic [NUM_LOOPS-1:0][EPC_W-1:0] LOOP_INC_ADDR = {30'd30},
  parameter logic [EPC_W-1:0]                END_ADDR  = 30'd38,
  parameter logic [TIME_W-1:0]               DEADLINE  = 32'd165,
  parameter logic [TIME_W-1:0]               T_OVER    = 32'd4,
  parameter logic [NUM_RP-1:0][TIME_W-1:0]   WCETR     = {32'd43, 32'd98, 32'd110}
) (
  input  logic              clk,
  input  logic              rst_n,
  // critical core (master 0) exception stage
  input  logic [EPC_W-1:0]  crit_x_pc,
  input  logic              crit_x_annul,
  input  logic              crit_x_valid,
  // AHB masters (cores)
  input  ahb_mst_out_t      mst_out [NMST],
  output ahb_slv_out_t      mst_in,
  output logic [NMST-1:0]   hgrant,
  // AHB slave (shared memory)
  output ahb_slv_in_t       mem_in,
  input  ahb_slv_out_t      mem_out,
  // HDE status
  output logic              warning,
  output logic              standalone,     // bus mode: 1 = stand-alone
  output logic              deadline_miss,
  output logic              deadline_reached, // deadline instant of the run passed
  output logic              ctask_start,    // pulse: critical task started
  output logic              ctask_end,      // low while the task runs
  output logic [RPID_W-1:0] rp_id,          // last RP passed
  output logic              rp_hit,         // pulse: an RP was passed
  output logic [TIME_W-1:0] ct,             // critical time of that RP
  output logic [TIME_W-1:0] elapsed,        // cycles since RP 0
  output logic [MST_W-1:0]  hmaster,        // address-phase bus owner
  // results sampler read-back
  input  logic [SMP_W-1:0]  rs_rd_addr,
  output sample_t           rs_rd_data,
  output logic [SMP_W:0]    rs_n_samples,
  output logic              rs_full
);

  logic [EPC_W-1:0]  epc;
  logic              epc_strobe;

  epc_capture u_epc (
    .clk, .rst_n,
    .x_pc(crit_x_pc), .x_annul(crit_x_annul), .x_valid(crit_x_valid),
    .epc, .epc_strobe
  );

  hde #(
    .NUM_RP(NUM_RP), .NUM_LOOPS(NUM_LOOPS), .CS_W(CS_W), .RPID_W(RPID_W),
    .RP_ADDR(RP_ADDR), .RP_USE_CS(RP_USE_CS), .RP_LOOP(RP_LOOP), .RP_CS(RP_CS),
    .LOOP_CLR_ADDR(LOOP_CLR_ADDR), .LOOP_INC_ADDR(LOOP_INC_ADDR),
    .END_ADDR(END_ADDR), .DEADLINE(DEADLINE), .T_OVER(T_OVER), .WCETR(WCETR)
  ) u_hde (
    .clk, .rst_n, .epc, .epc_strobe,
    .warning, .deadline_miss, .deadline_reached, .ctask_start, .ctask_end,
    .rp_id, .rp_hit, .ct, .elapsed
  );

  ahb_ctrl #(.NMST(NMST), .MST_W(MST_W)) u_ahb (
    .clk, .rst_n, .force_sa(warning),
    .mst_out, .mst_in, .hgrant, .hmaster, .standalone,
    .slv_in(mem_in), .slv_out(mem_out)
  );

  results_sampler #(.DEPTH(SAMPLES), .ADDR_W(SMP_W)) u_sampler (
    .clk, .rst_n, .ctask_end,
    .sec_req(mst_out[1].hbusreq), .sec_grant(hgrant[1]),
    .rd_addr(rs_rd_addr), .rd_data(rs_rd_data),
    .n_samples(rs_n_samples), .full(rs_full)
  );

endmodule
