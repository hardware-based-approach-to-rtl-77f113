// hde_scaling_unit: one HDE generated for a synthetic task with LOOPS loops
// and RPL reference points per loop, as in the area-scaling experiments
// (total RPs = LOOPS * RPL + 2: RP 0 at the task start, RPL RPs on one
// address of each loop in iterations 0..RPL-1, and one RP after the loops).
// Used by tb_hde_scaling (not synthesizable).
// Task layout (word addresses): start 100; loop l occupies 20 addresses from
// 101 + 20*l: its clear address first, its body of 10 instructions next, the
// RP on the 3rd body instruction, the increment on the last one; after the
// loops come the last RP, the end address and the final instruction.
// The unit executes the task twice and checks RP_ID one cycle and CT two
// cycles after every RP against the generated tables.
module hde_scaling_unit
  import hde_pkg::*;
#(
  parameter int LOOPS = 1,
  parameter int RPL   = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NRP    = LOOPS * RPL + 2;
  localparam int RPID_W = $clog2(NRP + 1);
  localparam int BASE   = 100;
  localparam int AFTER  = BASE + 1 + 20 * LOOPS;   // first address after the loops
  localparam int CSW    = 16;

  typedef logic [NRP-1:0][EPC_W-1:0]   addr_arr_t;
  typedef logic [NRP-1:0][CSW-1:0]     cs_arr_t;
  typedef logic [NRP-1:0][7:0]         loop_arr_t;
  typedef logic [NRP-1:0][TIME_W-1:0]  time_arr_t;
  typedef logic [LOOPS-1:0][EPC_W-1:0] laddr_arr_t;

  function automatic int rp_addr_of(int i);
    if (i == 0) return BASE;
    if (i == NRP - 1) return AFTER;
    return BASE + 1 + 20 * ((i - 1) / RPL) + 3;
  endfunction

  function automatic addr_arr_t gen_addr();
    addr_arr_t a;
    for (int i = 0; i < NRP; i++) a[i] = EPC_W'(rp_addr_of(i));
    return a;
  endfunction
  function automatic cs_arr_t gen_cs();
    cs_arr_t c;
    c = '0;
    for (int i = 1; i < NRP - 1; i++) c[i] = CSW'((i - 1) % RPL);
    return c;
  endfunction
  function automatic loop_arr_t gen_loop();
    loop_arr_t c;
    c = '0;
    for (int i = 1; i < NRP - 1; i++) c[i] = 8'((i - 1) / RPL);
    return c;
  endfunction
  function automatic logic [NRP-1:0] gen_use();
    logic [NRP-1:0] u;
    u = '1;
    u[0] = 1'b0;
    u[NRP-1] = 1'b0;
    return u;
  endfunction
  function automatic time_arr_t gen_wcetr();
    time_arr_t w;
    for (int i = 0; i < NRP; i++) w[i] = TIME_W'((NRP - i) * 10);
    return w;
  endfunction
  function automatic laddr_arr_t gen_clr();
    laddr_arr_t a;
    for (int l = 0; l < LOOPS; l++) a[l] = EPC_W'(BASE + 1 + 20 * l);
    return a;
  endfunction
  function automatic laddr_arr_t gen_inc();
    laddr_arr_t a;
    for (int l = 0; l < LOOPS; l++) a[l] = EPC_W'(BASE + 1 + 20 * l + 10);
    return a;
  endfunction

  localparam int NINSTR = 4 + LOOPS * (1 + RPL * 10);
  localparam logic [TIME_W-1:0] DL = TIME_W'(2 * NINSTR + NRP * 10 + 100);

  logic [EPC_W-1:0]  epc;
  logic              epc_strobe;
  logic              warning, deadline_miss, deadline_reached, ctask_start, ctask_end, rp_hit;
  logic [RPID_W-1:0] rp_id;
  logic [TIME_W-1:0] ct, elapsed;

  hde #(
    .NUM_RP(NRP), .NUM_LOOPS(LOOPS), .CS_W(CSW),
    .RP_ADDR(gen_addr()), .RP_USE_CS(gen_use()), .RP_LOOP(gen_loop()), .RP_CS(gen_cs()),
    .LOOP_CLR_ADDR(gen_clr()), .LOOP_INC_ADDR(gen_inc()),
    .END_ADDR(EPC_W'(AFTER + 1)), .DEADLINE(DL), .WCETR(gen_wcetr())
  ) u_hde (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m %s: rp_id=%0d ct=%0d", what, rp_id, ct);
    end
  endtask

  int n_rps_seen;

  task automatic exec(input int pc, input int exp_rp);
    @(negedge clk);
    epc = EPC_W'(pc);
    epc_strobe = 1'b1;
    @(posedge clk); #1;
    epc_strobe = 1'b0;
    if (exp_rp >= 0) begin
      check(rp_id == RPID_W'(exp_rp), "RP_ID");
      @(posedge clk); #1;
      check(ct == DL - TIME_W'((NRP - exp_rp) * 10) - 4, "CT");
      n_rps_seen++;
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_rps_seen = 0;
    epc = '0; epc_strobe = 0;
    wait (rst_n);
    repeat (2) @(posedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      exec(BASE, 0);
      for (int l = 0; l < LOOPS; l++) begin
        exec(BASE + 1 + 20 * l, -1);                      // clear
        for (int it = 0; it < RPL; it++)
          for (int k = 1; k <= 10; k++)
            exec(BASE + 1 + 20 * l + k, (k == 3) ? 1 + l * RPL + it : -1);
      end
      exec(AFTER, NRP - 1);
      exec(AFTER + 1, -1);
      #1 check(rp_id == RPID_W'(NRP), "idle after the end address");
      exec(AFTER + 2, -1);
      check(ctask_end && !deadline_miss, "ended in time");
    end
    check(n_rps_seen == 2 * NRP, "every RP seen");
    done = 1;
  end
endmodule
