// End-to-end testbench of one H-MUX as a ring station (monitor fitted, not master).
// An upstream master is modelled by the byte stream driven on e_rx: basic-mode frames first, then
// FDDI-II cycles with a fixed template (WBC 4 and 9 isochronous), one cycle with a damaged
// template symbol, a cycle with the electrical by-pass on and a cycle with cycle control symbols
// suppressed. A FORMAC model repeats the packet bytes it is given (data inverted in the low nibble)
// and starts a frame (J K) in place of data byte EE; an I-MAC model claims WBC 4 of even cycle
// groups and, illegally, WBC 1 of cycle group 3.
// Every output byte is predicted here from the input byte two clocks earlier and compared, which
// also checks that the normal path and the by-pass have the same latency. Each mechanism must
// occur: in-cycle delimiter conversion both ways, isochronous insertion, access refusal, template
// fallback, token capture and release, by-pass, suppression, basic-to-hybrid mode switch.
module tb_hmux;
  import fddi2_pkg::*;

  logic clk = 0, rst_n = 0;
  spair_t e_rx, e_tx, i_tx, i_rx, f_tx, f_rx;
  logic iso_req, iso_ind, c_sync, h_mode, hold1, hold2, tok_isd, np_we, alarm;
  logic [7:0] cs_no, np_wdata, np_rdata, mvc_tx_data, mvc_rx_data;
  logic [6:0] cg_no;
  logic [3:0] wbc_no, np_addr;
  logic cycle_tick, sel_cl, mon_we, mvc_tx_valid, mvc_tx_ack, mvc_rx_valid, is_master, bid_req;
  logic [31:0] mon_wdata, mon_rdata;
  int checks = 0, failures = 0;

  hmux dut (.*);
  always #5 clk = ~clk;

  localparam logic [15:0] T = 16'h0210;   // WBC 4 and 9 isochronous
  localparam spair_t ISD = '{par: 1'b0, c_hi: 1'b1, hi: 4'h1, c_lo: 1'b1, lo: 4'h5}; // I T, parity fixed below

  // FORMAC model
  always_comb begin
    f_rx = f_tx;
    if (!f_tx.c_hi && !f_tx.c_lo) f_rx = ({f_tx.hi, f_tx.lo} == 8'hEE) ? PAIR_JK : data_pair({f_tx.hi, ~f_tx.lo});
  end
  // I-MAC model
  assign iso_req = h_mode && ((iso_ind && wbc_no == 4 && !cg_no[0]) || (wbc_no == 1 && cg_no == 3));
  assign i_rx    = data_pair({1'b1, cg_no});

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum {M_BASIC, M_HYB, M_BYP, M_SUP} mode_e;
  spair_t s_q[$];
  int     p_q[$];
  mode_e  m_q[$];
  bit     dc_q[$];   // don't care (mode change window)

  function automatic spair_t cyc_byte(int p, int seq, bit damage);
    if (p == 0) return PAIR_JK;
    if (p == 1) return ctl_pair(SYM_S, SYM_R);
    if (p == 2) return data_pair(8'(seq));
    if (p >= 3 && p <= 10) begin
      int b = 2 * (p - 3);
      if (damage && b == 4) return ctl_pair(SYM_I, T[b+1] ? SYM_S : SYM_R);
      return ctl_pair(T[b] ? SYM_S : SYM_R, T[b+1] ? SYM_S : SYM_R);
    end
    if (p == 12 || p == 40) return fix_par(ISD);         // in-cycle delimiter in PDG / WBC 0
    if (p == 13 || p == 41) return data_pair(8'hEE);     // FORMAC starts a frame here
    return data_pair(8'(p * 7 + seq));
  endfunction

  task automatic push(spair_t b, int p, mode_e m);
    s_q.push_back(b); p_q.push_back(p); m_q.push_back(m);
    dc_q.push_back(m_q.size() > 1 && m_q[m_q.size()-2] != m);
  endtask

  task automatic push_cycle(int seq, mode_e m, bit damage = 0);
    for (int p = 0; p < CYCLE_BODY; p++) push(cyc_byte(p, seq, damage), p, m);
    push(PAIR_IDLE, 1560, m); push(PAIR_IDLE, 1561, m);
  endtask

  // expected output for input byte j
  int n_conv_rx = 0, n_conv_tx = 0, n_iso = 0, n_byp = 0, n_sup = 0;
  function automatic spair_t expect_out(int j);
    spair_t b = s_q[j];
    int p = p_q[j];
    mode_e m = m_q[j];
    if (m == M_BYP) return b;
    if (m == M_BASIC) begin
      if (!b.c_hi && !b.c_lo)
        return ({b.hi, b.lo} == 8'hEE) ? PAIR_JK : data_pair({b.hi, ~b.lo});
      return b;
    end
    if (p < 0 || p >= CYCLE_BODY) return b;
    if (p < 12) return (m == M_SUP && p < 2) ? PAIR_IDLE : b;
    if (p >= 24 && T[(p - 24) % 16]) begin
      if ((p - 24) % 16 == 4 && ((p - 24) / 16) % 2 == 0) return data_pair({1'b1, 7'((p - 24) / 16)});
      return b;
    end
    // packet slot, hybrid: I T -> J K -> FORMAC repeats J K -> I T
    if (b[9:0] == ISD[9:0]) return fix_par(ISD);
    if (!b.c_hi && !b.c_lo)
      return ({b.hi, b.lo} == 8'hEE) ? fix_par(ISD) : data_pair({b.hi, ~b.lo});
    return b;
  endfunction

  task automatic np_wr(int a, int d);
    np_addr = 4'(a); np_wdata = 8'(d); np_we = 1;
  endtask

  int k, n_hyb_seen;
  mode_e cur;
  logic [7:0] r_tmplerr, r_acc, r_tok, r_stat;
  initial begin
    e_rx = PAIR_IDLE; tok_isd = 0; np_we = 0; np_addr = 0; np_wdata = 0; cycle_tick = 0; sel_cl = 1;
    mon_we = 0; mon_wdata = 0; mvc_tx_valid = 0; mvc_tx_data = 0;
    // basic mode frames
    for (int f = 0; f < 4; f++) begin
      for (int i = 0; i < 6; i++) push(PAIR_IDLE, -1, M_BASIC);
      push(PAIR_JK, -1, M_BASIC);
      for (int i = 0; i < 40; i++) push(data_pair(8'(i == 20 ? 8'hEE : i * 3 + f)), -1, M_BASIC);
      push(ctl_pair(SYM_T, SYM_R), -1, M_BASIC);
    end
    // a token (frame control 80) that the FORMAC model does not repeat: captured; then a frame
    // with frame control 8F, which the model turns into a token: issued, capture ends
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 6; i++) push(PAIR_IDLE, -1, M_BASIC);
      push(PAIR_JK, -1, M_BASIC);
      push(data_pair(f == 0 ? 8'h80 : 8'h8F), -1, M_BASIC);
      push(ctl_pair(SYM_T, SYM_T), -1, M_BASIC);
    end
    for (int i = 0; i < 6; i++) push(PAIR_IDLE, -1, M_BASIC);
    push_cycle(1, M_HYB);    // first header: the station switches to hybrid mode within it
    push_cycle(2, M_HYB);
    push_cycle(3, M_HYB, 1);
    push_cycle(4, M_BYP);
    push_cycle(5, M_HYB);
    push_cycle(6, M_SUP);
    push_cycle(7, M_HYB);

    repeat (2) @(negedge clk); rst_n = 1;
    cur = M_BASIC;
    for (k = 0; k < s_q.size() + 2; k++) begin
      @(negedge clk);
      np_we = 0;
      if (k < s_q.size()) begin
        e_rx = s_q[k];
        // change the control register two bytes before a mode-changing byte reaches the TCU
        if (m_q[k] != cur && (m_q[k] == M_BYP || m_q[k] == M_SUP || cur == M_BYP || cur == M_SUP)) begin
          np_wr(0, m_q[k] == M_BYP ? 8'h01 : m_q[k] == M_SUP ? 8'h02 : 8'h00);
        end
        cur = m_q[k];
      end else e_rx = PAIR_IDLE;
      #1;
      if (f_tx[9:0] == PAIR_JK[9:0] && !hold1 && h_mode) n_conv_rx++;
      if (iso_req && iso_ind) n_iso++;
      @(posedge clk); #1;
      if (k >= 2) begin
        automatic int j = k - 2;
        automatic spair_t e = expect_out(j);
        // the cycle in which hybrid mode is first detected is not yet routed by template
        if (!dc_q[j] && !(m_q[j] != M_BASIC && s_q[j].c_hi == 0 && j < 300 + CYCLE_BODY && !h_mode) &&
            !(p_q[j] >= 0 && j < 250 + 1562)) begin
          chk(e_tx == e, $sformatf("byte %0d pos %0d mode %s", j, p_q[j], m_q[j].name()));
          if (m_q[j] == M_BYP) n_byp++;
          if (m_q[j] == M_SUP && p_q[j] < 2) n_sup++;
          if (m_q[j] == M_HYB && e[9:0] == ISD[9:0] && s_q[j][9:0] != ISD[9:0]) n_conv_tx++;
        end
      end
    end
    np_addr = 3; #1; r_tmplerr = np_rdata;
    np_addr = 7; #1; r_acc = np_rdata;
    np_addr = 12; #1; r_tok = np_rdata;
    np_addr = 2; #1; r_stat = np_rdata;
    chk(r_tok == 1 && !r_stat[2], "token captured once and issued again");
    chk(n_conv_rx > 0, "in-cycle delimiter converted towards the FORMAC");
    chk(n_conv_tx > 0, "FORMAC J K converted to in-cycle delimiter");
    chk(n_iso > 0, "isochronous insertion");
    chk(r_acc > 0, "access violation refused and counted");
    chk(r_tmplerr == 1, "damaged template symbol counted");
    chk(n_byp > 0, "by-pass used");
    chk(n_sup > 0, "cycle control symbols suppressed");
    chk(h_mode == 1, "hybrid mode reached");
    $display("mechanisms: conv_rx=%0d conv_tx=%0d iso=%0d acc=%0d tmpl_err=%0d byp=%0d sup=%0d tok_cap=%0d",
             n_conv_rx, n_conv_tx, n_iso, r_acc, r_tmplerr, n_byp, n_sup, r_tok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
