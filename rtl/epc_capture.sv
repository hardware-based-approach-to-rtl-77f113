// epc_capture: Executed Program Counter (EPC) export of the critical core.
//
// The critical core's exception-stage program counter is passed on as the
// EPC whenever the instruction in that stage is not annulled, and the EPC
// keeps its last value while annulled instructions (or bubbles) pass. This
// follows the core modification the HDE relies on: only the PC and the
// annul bit of the exception stage are needed from the processor.
//
// This design adds a one-cycle strobe, epc_strobe, that marks each executed
// instruction. The core signals with x_valid that a new instruction is in
// the exception stage in this cycle (it is high once per instruction, also
// when the pipeline is held). The strobe lets the reference-point monitor
// count loop iterations even when one instruction stays several cycles in
// the stage.
//
// Timing: epc and epc_strobe follow x_pc/x_annul/x_valid in the same cycle
// (no added latency); the held value is registered. Reset clears the EPC.
module epc_capture
  import hde_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [EPC_W-1:0] x_pc,       // PC(31:2) of the exception stage
  input  logic             x_annul,    // instruction in that stage annulled
  input  logic             x_valid,    // a new instruction is in that stage
  output logic [EPC_W-1:0] epc,        // executed program counter
  output logic             epc_strobe  // one pulse per executed instruction
);

  logic [EPC_W-1:0] epc_q;
  logic             executed;

  assign executed   = x_valid && !x_annul;
  assign epc        = executed ? x_pc : epc_q;
  assign epc_strobe = executed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        epc_q <= '0;
    else if (executed) epc_q <= x_pc;
  end

endmodule
