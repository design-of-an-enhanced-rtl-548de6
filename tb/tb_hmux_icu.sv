// Testbench of the H-MUX isochronous control unit. Random bytes, routes and I-MAC requests; checks
// that an I-MAC byte replaces the ring byte only in isochronous slots (with fresh parity), that a
// request elsewhere is refused and flagged, and that the cycle position reaches the I-MAC.
module tb_hmux_icu;
  import fddi2_pkg::*;

  spair_t rx_byte, i_tx, i_rx, iso_byte;
  tag_t rx_tag;
  route_e route;
  logic hyb_mode, iso_ind, c_sync, h_mode, iso_req, acc_viol;
  logic [7:0] cs_no_in, cs_no;
  logic [6:0] cg_no;
  logic [3:0] wbc_no;
  int checks = 0, failures = 0, n_ins = 0, n_viol = 0;

  hmux_icu dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      spair_t exp_b;
      rx_byte  = spair_t'($urandom);
      i_rx     = spair_t'($urandom);
      rx_tag   = tag_t'({$urandom, $urandom});
      route    = route_e'($urandom_range(0, 2));
      iso_req  = 1'($urandom);
      hyb_mode = 1'($urandom);
      cs_no_in = 8'($urandom);
      #1;
      if (iso_req && route == ROUTE_ISO) begin
        exp_b = i_rx; exp_b.par = ~^{i_rx.c_hi, i_rx.hi, i_rx.c_lo, i_rx.lo};
        n_ins++;
      end else exp_b = rx_byte;
      if (iso_req && route != ROUTE_ISO) n_viol++;
      chk(iso_byte == exp_b, "iso byte");
      chk(acc_viol == (iso_req && route != ROUTE_ISO), "access check");
      chk(iso_ind == (route == ROUTE_ISO) && i_tx == rx_byte, "iso_ind / i_tx");
      chk(cg_no == rx_tag.cg_no && wbc_no == rx_tag.wbc_no && cs_no == cs_no_in &&
          c_sync == rx_tag.cyc_start && h_mode == hyb_mode, "position signals");
    end
    chk(n_ins > 0 && n_viol > 0, "insertions and violations both happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
