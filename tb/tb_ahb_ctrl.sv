// tb_ahb_ctrl: self-checking testbench of ahb_ctrl with 2 (default) and
// 4 masters. Random bus requests, random stand-alone (force) periods and
// random slave wait states are applied. A reference arbiter written here
// (round-robin after the last shared-mode owner, last owner kept when nobody
// requests, master 0 in stand-alone mode, changes only with hready) predicts
// the address-phase owner; the address/control and write-data multiplexing,
// the bus-mode output and the response fan-out are checked every cycle.
module tb_ahb_ctrl;
  import hde_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic force_sa = 1'b0;
  ahb_slv_out_t slv_out;

  ahb_mst_out_t m2 [2];
  ahb_mst_out_t m4 [4];
  ahb_slv_out_t mi2, mi4;
  logic [1:0]   g2;
  logic [3:0]   g4;
  logic         hm2;
  logic [1:0]   hm4;
  logic         sa2, sa4;
  ahb_slv_in_t  si2, si4;

  int checks = 0;
  int failures = 0;
  int n_force = 0, n_grants [4], n_keep = 0;

  ahb_ctrl dut2 (.clk, .rst_n, .force_sa, .mst_out(m2), .mst_in(mi2),
                 .hgrant(g2), .hmaster(hm2), .standalone(sa2),
                 .slv_in(si2), .slv_out(slv_out));
  ahb_ctrl #(.NMST(4)) dut4 (.clk, .rst_n, .force_sa, .mst_out(m4), .mst_in(mi4),
                 .hgrant(g4), .hmaster(hm4), .standalone(sa4),
                 .slv_in(si4), .slv_out(slv_out));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: g2=%b g4=%b hm4=%0d", what, $time, g2, g4, hm4);
    end
  endtask

  // reference arbiter state
  int own2 = 0, last2 = 0, dph2 = 0;
  int own4 = 0, last4 = 0, dph4 = 0;
  bit exp_sa = 0;

  function automatic int ref_next(input int n, input int own, input int last,
                                  input bit frc, input bit req [4]);
    if (frc) return 0;
    for (int k = 1; k <= n; k++)
      if (req[(last + k) % n]) return (last + k) % n;
    return own;
  endfunction

  initial begin
    bit req2 [4];
    bit req4 [4];
    int f_left;
    foreach (n_grants[i]) n_grants[i] = 0;
    slv_out = '{hready: 1'b1, hresp: 1'b0, hrdata: 32'h0};
    foreach (m2[i]) m2[i] = '0;
    foreach (m4[i]) m4[i] = '0;
    f_left = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // stimulus
      if (f_left > 0) f_left--;
      else if ($urandom_range(0, 40) == 0) f_left = $urandom_range(1, 12);
      force_sa = (f_left > 0);
      slv_out.hready = ($urandom_range(0, 5) != 0);
      slv_out.hrdata = $urandom;
      for (int i = 0; i < 4; i++) begin
        m4[i].hbusreq = ($urandom_range(0, 2) != 0) && !(n > 3000 && n < 3100);
        m4[i].htrans  = (g4[i] && m4[i].hbusreq) ? HTRANS_NONSEQ : HTRANS_IDLE;
        m4[i].haddr   = {8'(i), 24'($urandom)};
        m4[i].hwrite  = 1'($urandom);
        m4[i].hsize   = 3'd2;
        m4[i].hwdata  = $urandom;
        if (i < 2) begin
          m2[i] = m4[i];
          m2[i].htrans = (g2[i] && m2[i].hbusreq) ? HTRANS_NONSEQ : HTRANS_IDLE;
        end
      end
      #1;
      // combinational checks in this cycle
      check(g2 == 2'(1 << own2) && g4 == 4'(1 << own4), "grant is the reference owner");
      check(si4.haddr == m4[own4].haddr && si4.htrans == m4[own4].htrans &&
            si4.hwrite == m4[own4].hwrite, "address phase mux (4)");
      check(si2.haddr == m2[own2].haddr, "address phase mux (2)");
      check(si4.hwdata == m4[dph4].hwdata && si2.hwdata == m2[dph2].hwdata, "write data mux");
      check(si4.hsel == (m4[own4].htrans != HTRANS_IDLE), "hsel");
      check(mi4.hrdata == slv_out.hrdata && mi2.hready == slv_out.hready, "response fan-out");
      check(sa2 == exp_sa && sa4 == exp_sa, "bus mode");
      // reference update at the next edge
      for (int i = 0; i < 4; i++) begin
        req4[i] = m4[i].hbusreq || (m4[i].htrans != HTRANS_IDLE && own4 == i);
        req2[i] = (i < 2) ? (m2[i].hbusreq || (m2[i].htrans != HTRANS_IDLE && own2 == i)) : 1'b0;
      end
      if (slv_out.hready) begin
        int nx2, nx4;
        nx2 = ref_next(2, own2, last2, force_sa, req2);
        nx4 = ref_next(4, own4, last4, force_sa, req4);
        if (!force_sa) begin last2 = nx2; last4 = nx4; end
        if (nx4 == own4 && !req4[own4]) n_keep++;
        dph2 = own2; dph4 = own4;
        own2 = nx2; own4 = nx4;
        exp_sa = force_sa;
        if (force_sa) n_force++;
        n_grants[own4]++;
      end
    end
    check(n_force > 50 && n_keep > 5 && n_grants[3] > 200, "coverage");
    $display("force cycles=%0d kept-owner=%0d grants=%0d/%0d/%0d/%0d", n_force, n_keep,
             n_grants[0], n_grants[1], n_grants[2], n_grants[3]);
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
