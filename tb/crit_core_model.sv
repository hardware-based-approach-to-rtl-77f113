// crit_core_model: behavioural model of the critical core for the system
// testbenches (not synthesizable). It runs the example critical task
// N_RUNS times: instructions 10..19, a loop body 20..30 executed ITERS times
// (run r uses 1 + (5*r mod 8) iterations, so 1..8), then 31..39. Caches are
// off, so every instruction is fetched over the AHB bus with one single read
// transfer; a fetched instruction reaches the exception stage PIPE_D cycles
// after its data phase, where x_valid/x_pc report it. After each run one
// wrong-path instruction at address 10 is fetched and annulled. Between runs
// the core idles for a random number of cycles.
module crit_core_model
  import hde_pkg::*;
#(
  parameter int N_RUNS = 8,
  parameter int PIPE_D = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             hgrant,
  input  ahb_slv_out_t     mst_in,
  output ahb_mst_out_t     mst_out,
  output logic [EPC_W-1:0] x_pc,
  output logic             x_annul,
  output logic             x_valid,
  output logic             done
);

  typedef struct { int pc; bit annul; } instr_t;

  instr_t prog [$];
  int     fetch_i;        // next instruction to fetch
  int     run;
  int     idle_left;
  bit     dp_valid;       // data phase in progress
  int     dp_idx;
  int     pipe_idx [PIPE_D];
  bit     pipe_v   [PIPE_D];

  function automatic void build_run(input int r);
    int iters;
    iters = 1 + ((5 * r) % 8);
    prog.delete();
    for (int pc = 10; pc <= 19; pc++) prog.push_back('{pc, 1'b0});
    for (int it = 0; it < iters; it++)
      for (int pc = 20; pc <= 30; pc++) prog.push_back('{pc, 1'b0});
    for (int pc = 31; pc <= 39; pc++) prog.push_back('{pc, 1'b0});
    prog.push_back('{10, 1'b1});
  endfunction

  logic        want;        // registered view of the fetch request
  logic [31:0] fetch_addr;

  always_comb begin
    mst_out         = '0;
    mst_out.hbusreq = want;
    mst_out.htrans  = (want && hgrant) ? HTRANS_NONSEQ : HTRANS_IDLE;
    mst_out.haddr   = fetch_addr;
    mst_out.hsize   = 3'd2;
  end

  initial begin
    run = 0; fetch_i = 0; idle_left = 5; dp_valid = 0; dp_idx = 0; done = 0;
    x_pc = '0; x_annul = 0; x_valid = 0; want = 0; fetch_addr = '0;
    foreach (pipe_v[i]) begin pipe_v[i] = 0; pipe_idx[i] = 0; end
    build_run(0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // exception stage
      x_valid <= pipe_v[PIPE_D-1];
      x_pc    <= pipe_v[PIPE_D-1] ? EPC_W'(prog[pipe_idx[PIPE_D-1]].pc) : x_pc;
      x_annul <= pipe_v[PIPE_D-1] ? prog[pipe_idx[PIPE_D-1]].annul : 1'b0;
      for (int i = PIPE_D - 1; i > 0; i--) begin
        pipe_v[i]   = pipe_v[i-1];
        pipe_idx[i] = pipe_idx[i-1];
      end
      pipe_v[0] = 1'b0;
      if (mst_in.hready) begin
        if (dp_valid) begin
          pipe_v[0]   = 1'b1;
          pipe_idx[0] = dp_idx;
        end
        dp_valid = 1'b0;
        if (want && hgrant && fetch_i < prog.size()) begin
          dp_valid = 1'b1;
          dp_idx   = fetch_i;
          fetch_i++;
        end
      end
      if (idle_left > 0) idle_left--;
      // next run once the last instruction has left the pipeline
      if (fetch_i == prog.size() && !dp_valid && !pipe_v.or() && !done) begin
        run++;
        if (run == N_RUNS) done <= 1'b1;
        else begin
          build_run(run);
          fetch_i   = 0;
          idle_left = $urandom_range(3, 20);
        end
      end
      want       <= !done && run < N_RUNS && idle_left == 0 && fetch_i < prog.size();
      fetch_addr <= (fetch_i < prog.size()) ? {prog[fetch_i].pc[29:0], 2'b00} : 32'h0;
    end
  end

endmodule
