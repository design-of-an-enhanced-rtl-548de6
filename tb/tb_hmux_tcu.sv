// Testbench of the H-MUX transmit unit. Random inputs each clock; checks the byte selected for each
// slot class, the regenerated parity, the suppression of J K and C1 C2 with hyb_disable, and that
// the electrical by-pass output is the raw input delayed by exactly two clock edges, i.e. three
// register stages counting the receive unit, the same as the normal path.
module tb_hmux_tcu;
  import fddi2_pkg::*;

  logic clk = 0, rst_n = 0;
  spair_t e_rx, rx_byte, pkt_byte, iso_byte, e_tx;
  tag_t rx_tag, tx_tag;
  logic pkt_valid, hyb_disable, bypass_active;
  route_e route;
  int checks = 0, failures = 0, n_sup = 0, n_byp = 0;

  hmux_tcu dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  spair_t hist [$];
  initial begin
    e_rx = PAIR_IDLE; rx_byte = PAIR_IDLE; pkt_byte = PAIR_IDLE; iso_byte = PAIR_IDLE;
    rx_tag = '0; pkt_valid = 0; hyb_disable = 0; bypass_active = 0; route = ROUTE_RING;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      spair_t exp_b;
      @(negedge clk);
      e_rx = spair_t'($urandom); rx_byte = spair_t'($urandom);
      pkt_byte = spair_t'($urandom); iso_byte = spair_t'($urandom);
      rx_tag = tag_t'({$urandom, $urandom});
      if ($urandom_range(0, 3) == 0) begin rx_tag.is_hdr = 1; rx_tag.hdr_idx = 4'($urandom_range(0, 3)); end
      route = route_e'($urandom_range(0, 2));
      pkt_valid = route == ROUTE_PKT && $urandom_range(0, 5) != 0;
      hyb_disable = 1'($urandom);
      bypass_active = (i / 500) % 2 == 1;
      hist.push_back(e_rx);
      if (pkt_valid) exp_b = pkt_byte;
      else if (route == ROUTE_ISO) exp_b = iso_byte;
      else exp_b = rx_byte;
      if (hyb_disable && rx_tag.is_hdr && rx_tag.hdr_idx < 2) begin exp_b = PAIR_IDLE; n_sup++; end
      exp_b.par = ~^exp_b[9:0];
      @(posedge clk); #1;
      if (bypass_active) begin
        if (i % 500 >= 2) begin
          n_byp++;
          chk(e_tx == hist[i - 2], "by-pass delay");
        end
      end else begin
        chk(e_tx == exp_b, "selected byte");
        chk(tx_tag == rx_tag, "tag follows byte");
      end
    end
    chk(n_sup > 0 && n_byp > 0, "suppression and by-pass happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
