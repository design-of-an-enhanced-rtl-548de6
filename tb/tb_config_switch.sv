// Testbench of the configuration switch: random ring and H-MUX streams under every configuration
// written through the register port; checks each output against the routing rule and that the
// configuration only changes on a register write.
module tb_config_switch;
  import fddi2_pkg::*;
  logic clk = 0, rst_n = 0;
  spair_t ring_rx [2], ring_tx [2], h_rx [2], h_tx [2];
  logic cfg_we;
  logic [3:0] cfg_wdata, cfg_rdata, cfg;
  int checks = 0, failures = 0;

  config_switch dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cfg_we = 0; cfg_wdata = 0; cfg = 0;
    for (int k = 0; k < 2; k++) begin ring_rx[k] = PAIR_IDLE; h_tx[k] = PAIR_IDLE; end
    repeat (2) @(negedge clk); rst_n = 1;
    chk(cfg_rdata == 0, "normal configuration after reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      cfg_we = (i % 20 == 0); cfg_wdata = 4'($urandom);
      for (int k = 0; k < 2; k++) begin ring_rx[k] = spair_t'($urandom); h_tx[k] = spair_t'($urandom); end
      @(posedge clk); if (cfg_we) cfg = cfg_wdata;
      #1;
      chk(cfg_rdata == cfg, "configuration register");
      chk(ring_tx[0] == (cfg[0] ? h_tx[1] : h_tx[0]) && ring_tx[1] == (cfg[1] ? h_tx[0] : h_tx[1]), "transmit routing");
      chk(h_rx[0] == (cfg[2] ? ring_rx[1] : ring_rx[0]) && h_rx[1] == (cfg[3] ? ring_rx[0] : ring_rx[1]), "receive routing");
    end
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
