// Testbench of the H-MUX control unit. Feeds template bytes and byte tags directly and checks the
// decoded template, the per-symbol fallback on invalid symbols, the routing of every byte class
// in hybrid and basic mode, the register file (reset values, counters, sticky flags and their
// clearing, alarm comparator, token capture counter) and the rule that the by-pass only changes
// without a captured token, reported either by the FORMAC or by the packet channel detection.
module tb_hmux_hcu;
  import fddi2_pkg::*;

  logic clk = 0, rst_n = 0;
  spair_t rx_byte;
  tag_t rx_tag;
  logic hyb_mode, par_err, seq_err, sync_err, acc_viol, tok_isd, tok_cap, tok_cap_ev;
  logic [3:0] np_addr;
  logic [7:0] np_wdata, np_rdata;
  logic np_we;
  route_e route;
  logic [15:0] tmpl;
  logic tmpl_err, bypass_active, hyb_disable, ps_stop, alarm;
  logic [3:0] isd_hi, isd_lo;
  int checks = 0, failures = 0;

  hmux_hcu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic np_write(int a, int d);
    @(negedge clk); np_addr = 4'(a); np_wdata = 8'(d); np_we = 1;
    @(negedge clk); np_we = 0;
  endtask

  // combinational read of all registers into rv[]
  logic [7:0] rv [16];
  task automatic rd_all();
    for (int a = 0; a < 16; a++) begin
      np_addr = 4'(a); #1;
      rv[a] = np_rdata;
    end
  endtask

  function automatic tag_t mk_tag(int p);
    tag_t t = '0;
    t.in_cycle = 1; t.pos = 11'(p); t.cyc_start = p == 0; t.is_hdr = p < 12; t.hdr_idx = 4'(p);
    t.is_pdg = p >= 12 && p < 24; t.is_wbc = p >= 24;
    t.wbc_no = 4'((p - 24) % 16); t.cg_no = 7'((p - 24) / 16);
    return t;
  endfunction

  // send a template; symbol pair number bad_pair (0..7) gets an idle symbol in its second half
  task automatic send_tmpl(logic [15:0] t, int bad_pair);
    for (int p = 0; p < 12; p++) begin
      @(negedge clk);
      rx_tag = mk_tag(p);
      if (p == 0) rx_byte = PAIR_JK;
      else if (p >= 3 && p <= 10)
        rx_byte = ctl_pair(t[2*(p-3)] ? SYM_S : SYM_R,
                           (p - 3 == bad_pair) ? SYM_I : (t[2*(p-3)+1] ? SYM_S : SYM_R));
      else rx_byte = data_pair(8'(p));
    end
    @(negedge clk); rx_tag = '0; rx_byte = PAIR_IDLE;
  endtask

  logic [15:0] exp_t;
  int nbyp;
  initial begin
    {hyb_mode, par_err, seq_err, sync_err, acc_viol, tok_isd, tok_cap, tok_cap_ev, np_we} = '0;
    np_addr = 0; np_wdata = 0; rx_byte = PAIR_IDLE; rx_tag = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    rd_all();
    chk(rv[1] == {SYM_I, SYM_T}, "ISD reset value I T");
    rd_all();
    chk(rv[11] == 8'hff, "threshold reset value");
    // basic mode: everything to the packet MAC
    rx_tag = mk_tag(30); #1; chk(route == ROUTE_PKT, "basic mode routes to PKT");
    hyb_mode = 1;
    send_tmpl(16'hA5C3, -1);
    chk(tmpl == 16'hA5C3, "template decoded");
    rd_all();
    chk(rv[8] == 8'hC3 && rv[9] == 8'hA5, "template registers");
    rd_all();
    chk(rv[10] == 8'd1, "cycle counter");
    for (int p = 0; p < CYCLE_BODY; p += 7) begin
      route_e e;
      rx_tag = mk_tag(p); #1;
      if (p < 12) e = ROUTE_RING;
      else if (p < 24) e = ROUTE_PKT;
      else e = tmpl[(p - 24) % 16] ? ROUTE_ISO : ROUTE_PKT;
      chk(route == e, $sformatf("route at pos %0d", p));
    end
    rx_tag = '0; #1; chk(route == ROUTE_RING, "preamble repeated");
    // damaged template: pair 2 has an invalid second symbol -> bit 5 keeps its old value
    send_tmpl(16'h5A3C, 2);
    exp_t = 16'h5A3C; exp_t[5] = 1'b0;   // old value of bit 5 (0xA5C3 bit 5 = 0)
    chk(tmpl == exp_t, $sformatf("fallback template %h", tmpl));
    send_tmpl(16'h5A3C ^ 16'h0020, 2);   // now old bit 5 stays 0 while new says 1
    exp_t = 16'h5A3C ^ 16'h0020; exp_t[5] = 1'b0;
    chk(tmpl == exp_t, "fallback keeps the last valid value");
    rd_all();
    chk(rv[3] == 8'd2, "template error counter");
    rd_all();
    chk(rv[2][3] == 1'b1, "template sticky flag");
    send_tmpl(16'h0020, -1);
    send_tmpl(16'h0000, 2);
    chk(tmpl == 16'h0020, "fallback keeps a set bit");
    // counters and alarm
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); seq_err = 1; @(negedge clk); seq_err = 0;
    end
    @(negedge clk); sync_err = 1; par_err = 1; acc_viol = 1; @(negedge clk); {sync_err, par_err, acc_viol} = '0;
    rd_all();
    chk(rv[4] == 8'd3, "sequence error counter");
    rd_all();
    chk(rv[5] == 8'd1 && rv[6] == 8'd1 && rv[7] == 8'd1, "sync/parity/access counters");
    rd_all();
    chk(rv[2][7:4] == 4'hF, "sticky flags");
    chk(!alarm, "no alarm while disabled");
    np_write(11, 3); np_write(0, 8'h08);
    chk(alarm, "alarm at threshold");
    np_write(4, 0); np_write(3, 0);
    rd_all();
    chk(rv[4] == 0 && !alarm, "counter cleared, alarm gone");
    np_write(2, 0);
    rd_all();
    chk(rv[2][7:3] == 0, "sticky cleared");
    // by-pass only without token
    tok_isd = 1;
    np_write(0, 8'h01);
    repeat (3) @(negedge clk);
    chk(!bypass_active, "by-pass held while token captured");
    tok_isd = 0; @(negedge clk);
    chk(bypass_active, "by-pass active after token release");
    rd_all();
    chk(rv[2][1:0] == 2'b11, "status shows by-pass and hybrid");
    // token capture detected in the packet channel also holds the by-pass, and is counted
    @(negedge clk); tok_cap = 1; tok_cap_ev = 1; @(negedge clk); tok_cap_ev = 0;
    np_write(0, 8'h00);
    repeat (3) @(negedge clk);
    chk(bypass_active, "by-pass kept while token captured (detected)");
    rd_all();
    chk(rv[2][2] == 1'b1 && rv[12] == 8'd1, "status shows token, capture counted");
    @(negedge clk); tok_cap = 0; @(negedge clk);
    chk(!bypass_active, "by-pass removed after token release");
    @(negedge clk); tok_cap_ev = 1; @(negedge clk); tok_cap_ev = 0;
    rd_all();
    chk(rv[12] == 8'd2 && rv[2][2] == 1'b0, "second capture counted");
    np_write(12, 0);
    rd_all();
    chk(rv[12] == 8'd0, "capture counter cleared");
    np_write(0, 8'h01); @(negedge clk);
    np_write(0, 8'h06); @(negedge clk);
    chk(!bypass_active && hyb_disable && ps_stop, "control bits");
    np_write(1, {SYM_I, SYM_S});
    chk(isd_hi == SYM_I && isd_lo == SYM_S, "ISD programmable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
