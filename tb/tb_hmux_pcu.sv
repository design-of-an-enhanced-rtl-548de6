// Testbench of the H-MUX packet control unit. Checks the hold of the FORMAC outside packet slots,
// the in-cycle delimiter conversion in both directions for several programmed delimiters, the
// unchanged pass-through in basic mode, PS stop, and the token capture detection: random byte
// streams rich in starting delimiters and token frame control bytes are compared with a reference
// model, then a directed sequence captures a token, holds it across non-packet bytes and issues it.
module tb_hmux_pcu;
  import fddi2_pkg::*;

  logic clk = 0, rst_n = 0;
  spair_t rx_byte, f_tx, f_rx, pkt_byte;
  route_e route;
  logic hyb_mode, ps_stop, hold1, hold2, pkt_valid, tok_cap, tok_cap_ev;
  logic [3:0] isd_hi, isd_lo;
  int checks = 0, failures = 0, n_conv_rx = 0, n_conv_tx = 0, n_cap = 0, n_rel = 0;

  hmux_pcu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic spair_t pick();
    case ($urandom_range(0, 5))
      0: return PAIR_JK;
      1: return ctl_pair(ctl_sym_e'(isd_hi), ctl_sym_e'(isd_lo));
      2: return PAIR_IDLE;
      3: return data_pair(($urandom_range(0, 1) != 0) ? 8'h80 : 8'hC0);
      default: return data_pair(8'($urandom));
    endcase
  endfunction

  function automatic bit tok_fc(spair_t p);
    spair_t a = data_pair(8'h80), b = data_pair(8'hC0);
    return p[9:0] == a[9:0] || p[9:0] == b[9:0];
  endfunction

  // reference state of the token detection
  bit m_rx_sd = 0, m_tx_sd = 0, m_cap = 0;

  // one byte: drive, check, clock
  task automatic step(spair_t rx, spair_t fr, route_e r, bit hm, bit stop, spair_t isd);
    spair_t exp_ftx, exp_pkt;
    bit slot, t_in, t_out, ev;
    rx_byte = rx; f_rx = fr; route = r; hyb_mode = hm; ps_stop = stop;
    #1;
    slot = r == ROUTE_PKT && !stop;
    exp_ftx = PAIR_IDLE;
    if (slot) exp_ftx = (hm && rx[9:0] == isd[9:0]) ? PAIR_JK : rx;
    exp_pkt = (hm && fr[9:0] == PAIR_JK[9:0]) ? isd : fr;
    if (slot && hm && rx[9:0] == isd[9:0]) n_conv_rx++;
    if (slot && hm && fr[9:0] == PAIR_JK[9:0]) n_conv_tx++;
    chk(f_tx == exp_ftx, "byte to FORMAC");
    chk(!slot || pkt_byte == exp_pkt, "byte from FORMAC");
    chk(hold1 == !slot && hold2 == !slot && pkt_valid == slot, "hold");
    t_in  = slot && m_rx_sd && tok_fc(exp_ftx);
    t_out = slot && m_tx_sd && tok_fc(fr);
    ev    = t_in && fr[9:0] != exp_ftx[9:0] && !t_out;
    chk(tok_cap_ev == ev, "token capture event");
    chk(tok_cap == m_cap, "token captured flag");
    if (ev) n_cap++;
    if (t_out && m_cap && !ev) n_rel++;
    if (slot) begin
      m_rx_sd = exp_ftx[9:0] == PAIR_JK[9:0];
      m_tx_sd = fr[9:0] == PAIR_JK[9:0];
    end
    if (ev) m_cap = 1; else if (t_out) m_cap = 0;
    @(negedge clk);
  endtask

  initial begin
    ctl_sym_e isd2 [4] = '{SYM_T, SYM_R, SYM_S, SYM_L};
    spair_t isd, rx;
    isd_hi = SYM_I; isd_lo = SYM_T;
    rx_byte = PAIR_IDLE; f_rx = PAIR_IDLE; route = ROUTE_RING; hyb_mode = 0; ps_stop = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 8000; i++) begin
      isd_hi = SYM_I; isd_lo = isd2[(i / 8) % 4];
      isd = ctl_pair(SYM_I, isd2[(i / 8) % 4]);
      rx = pick();
      step(rx, $urandom_range(0, 2) == 0 ? rx : pick(), route_e'($urandom_range(0, 2)),
           1'((i / 400) % 2), $urandom_range(0, 7) == 0, isd);
    end
    // directed: basic mode, token arrives and is stripped, ring bytes between, token issued
    isd_hi = SYM_I; isd_lo = SYM_T; isd = ctl_pair(SYM_I, SYM_T);
    step(PAIR_IDLE, PAIR_IDLE, ROUTE_PKT, 0, 0, isd);
    if (m_cap) begin
      step(PAIR_JK, PAIR_JK, ROUTE_PKT, 0, 0, isd);
      step(PAIR_IDLE, PAIR_JK, ROUTE_PKT, 0, 0, isd);
      step(PAIR_IDLE, data_pair(8'h80), ROUTE_PKT, 0, 0, isd);
    end
    chk(!tok_cap, "no token held before the directed sequence");
    // hybrid: in-cycle delimiter + token FC in packet slots, ring bytes in between
    step(isd, PAIR_JK, ROUTE_PKT, 1, 0, isd);
    step(data_pair(8'h80), PAIR_IDLE, ROUTE_ISO, 1, 0, isd);   // not a packet slot
    step(data_pair(8'h80), PAIR_IDLE, ROUTE_PKT, 1, 0, isd);   // stripped: captured
    chk(tok_cap, "token captured");
    repeat (5) step(data_pair(8'h33), data_pair(8'h44), ROUTE_PKT, 1, 0, isd);
    step(PAIR_IDLE, PAIR_JK, ROUTE_PKT, 1, 0, isd);
    step(PAIR_IDLE, PAIR_IDLE, ROUTE_RING, 1, 0, isd);
    step(PAIR_IDLE, data_pair(8'hC0), ROUTE_PKT, 1, 0, isd);   // restricted token issued
    chk(!tok_cap, "token issued, capture ended");
    // a repeated token is not captured
    step(isd, isd, ROUTE_PKT, 1, 0, isd);
    step(data_pair(8'h80), data_pair(8'h80), ROUTE_PKT, 1, 0, isd);
    chk(!tok_cap, "repeated token not captured");
    chk(n_conv_rx > 0 && n_conv_tx > 0, "both conversions happened");
    chk(n_cap > 1 && n_rel > 0, "token captures and releases happened");
    $display("mechanisms: conv_rx=%0d conv_tx=%0d capture=%0d release=%0d", n_conv_rx, n_conv_tx, n_cap, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
