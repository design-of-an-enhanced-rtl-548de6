// Testbench of the CS-MUX. Random user writes, I-MAC takes and received bytes over 16 channels with
// a random allocation vector. A model of the holding registers kept here predicts which writes are
// accepted, which are refused (unallocated channel or overrun) and what the I-MAC sees; received
// bytes must reach exactly the addressed user one clock later.
module tb_csmux;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic cs_rx_valid, cs_tx_avail, cs_tx_take, viol_clr;
  logic [3:0] cs_rx_chan, cs_tx_chan;
  logic [7:0] cs_rx_data, cs_tx_data, viol_cnt;
  logic [N-1:0] chan_alloc, usr_tx_we, usr_rx_valid, viol_chan;
  logic [7:0] usr_tx_data [N];
  logic [7:0] usr_rx_data [N];
  int checks = 0, failures = 0, n_ok = 0, n_bad = 0, n_take = 0;

  csmux dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit m_full [N];
  logic [7:0] m_buf [N];
  int m_viol;
  initial begin
    for (int c = 0; c < N; c++) begin m_full[c] = 0; m_buf[c] = 0; usr_tx_data[c] = 0; end
    m_viol = 0;
    {cs_rx_valid, cs_tx_take, viol_clr} = '0; cs_rx_chan = 0; cs_tx_chan = 0; cs_rx_data = 0;
    chan_alloc = 16'b0101_1100_0011_0110; usr_tx_we = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit any_bad;
      @(negedge clk);
      usr_tx_we = 0;
      for (int c = 0; c < N; c++) begin
        usr_tx_we[c] = ($urandom_range(0, 9) == 0);
        usr_tx_data[c] = 8'($urandom);
      end
      cs_tx_chan = 4'($urandom);
      #1;
      chk(cs_tx_avail == m_full[cs_tx_chan], "tx avail");
      if (m_full[cs_tx_chan]) chk(cs_tx_data == m_buf[cs_tx_chan], "tx data");
      cs_tx_take = cs_tx_avail && $urandom_range(0, 1);
      cs_rx_valid = 1'($urandom); cs_rx_chan = 4'($urandom); cs_rx_data = 8'($urandom);
      // model update
      any_bad = 0;
      if (cs_tx_take) begin m_full[cs_tx_chan] = 0; n_take++; end
      for (int c = 0; c < N; c++)
        if (usr_tx_we[c]) begin
          if (!chan_alloc[c] || m_full[c]) begin any_bad = 1; n_bad++; end
          else begin m_full[c] = 1; m_buf[c] = usr_tx_data[c]; n_ok++; end
        end
      if (any_bad && m_viol < 255) m_viol++;
      @(posedge clk); #1;
      for (int c = 0; c < N; c++)
        chk(usr_rx_valid[c] == (cs_rx_valid && cs_rx_chan == 4'(c)), "rx strobe");
      if (cs_rx_valid) chk(usr_rx_data[cs_rx_chan] == cs_rx_data, "rx data");
      chk(viol_cnt == 8'(m_viol), "violation count");
    end
    chk((viol_chan & chan_alloc) != 0 && (viol_chan & ~chan_alloc) == (~chan_alloc), "violating channels");
    chk(n_ok > 0 && n_bad > 0 && n_take > 0, "accepts, refusals and takes happened");
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
