// hde_pkg: types and constants shared by the Hard Deadline Enforcer (HDE),
// the AHB controller with stand-alone mode and the results sampler.
//
// The HDE watches the Executed Program Counter (EPC) of the critical core,
// decodes which reference point (RP) the critical task has reached, and
// raises a Warning that forces the shared AHB bus into "stand-alone" mode
// (only the critical core, master 0, is granted) whenever the elapsed time
// has reached the critical time CT(RP) = Deadline - WCET_R(RP) - t_over.
//
// The bus is a reduced AMBA AHB: single transfers (no bursts, no split or
// retry, OKAY responses only), which is what the critical core issues with
// its caches disabled. The field set below is this design's choice.
package hde_pkg;

  // Width of the word address seen by the EPC (PC bits 31..2).
  localparam int unsigned EPC_W   = 30;
  // Width of time values (elapsed time, CT, deadline). The CTs are kept as
  // 32-bit words, as in a 512 x 32 block RAM.
  localparam int unsigned TIME_W  = 32;
  // Detection latency of the HDE, EPC strobe to Warning, in clock cycles.
  localparam int unsigned HDE_DETECT_LAT = 3;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // Signals driven by one AHB master.
  typedef struct packed {
    logic        hbusreq;
    htrans_e     htrans;
    logic [31:0] haddr;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
  } ahb_mst_out_t;

  // Signals driven towards a master (and by the slave).
  typedef struct packed {
    logic        hready;
    logic        hresp;    // 0 = OKAY, 1 = ERROR
    logic [31:0] hrdata;
  } ahb_slv_out_t;

  // Address-phase signals the controller forwards to the slave.
  typedef struct packed {
    logic        hsel;
    htrans_e     htrans;
    logic [31:0] haddr;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
  } ahb_slv_in_t;

  // One record of the results sampler: one critical-task run.
  typedef struct packed {
    logic [31:0] run_cycles;   // length of the run (CTaskEnd low)
    logic [31:0] max_wait;     // longest continuous wait for a grant
    logic [31:0] sum_wait;     // all cycles spent waiting
    logic [31:0] n_grants;     // granted requesting cycles (transfers)
  } sample_t;

endpackage
