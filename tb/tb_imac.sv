// Testbench of the I-MAC. Waits for the steering map to clear after reset, programs entries through
// the node processor port (concatenated 2 x 64 kbps channel, a receive-only channel at half rate,
// a send-only channel), then offers every isochronous byte position of several cycles and checks
// what goes to the CS-MUX and which slots are claimed with ISO-REQ, against a map kept here. Also
// checks the channel allocation vector when entries are added and removed, and map read-back.
module tb_imac;
  import fddi2_pkg::*;

  logic clk = 0, rst_n = 0;
  spair_t i_tx, i_rx;
  logic iso_ind, h_mode, iso_req, cs_rx_valid, cs_tx_avail, cs_tx_take, map_we, init_busy;
  logic [7:0] cs_no, cs_rx_data, cs_tx_data, map_wdata, map_rdata;
  logic [6:0] cg_no;
  logic [3:0] wbc_no, cs_rx_chan, cs_tx_chan;
  logic [15:0] chan_alloc;
  logic [10:0] map_addr;
  int checks = 0, failures = 0, n_rx = 0, n_tx = 0;

  imac dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] model [ISO_BYTES];
  task automatic wr(int cg, int wbc, logic [7:0] e);
    @(negedge clk); map_we = 1; map_addr = 11'(cg * 16 + wbc); map_wdata = e; model[cg * 16 + wbc] = e;
    @(negedge clk); map_we = 0;
  endtask

  initial begin
    int cycles_busy = 0;
    for (int i = 0; i < ISO_BYTES; i++) model[i] = 0;
    i_tx = PAIR_IDLE; iso_ind = 0; h_mode = 0; cs_no = 0; cg_no = 0; wbc_no = 0;
    cs_tx_avail = 0; cs_tx_data = 0; map_we = 0; map_addr = 0; map_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (init_busy) begin @(negedge clk); cycles_busy++; end
    chk(cycles_busy >= ISO_BYTES - 2 && cycles_busy <= ISO_BYTES + 2, "map clear takes one clock per entry");
    chk(chan_alloc == 0, "nothing allocated after reset");
    wr(5, 2, 8'hC3);    // rx+tx chan 3
    wr(70, 2, 8'hC3);   // rx+tx chan 3 (second slot, 128 kbps)
    wr(10, 15, 8'h97);  // rx only, sub-rate 1 (every 2nd cycle), chan 7
    wr(95, 0, 8'h4A);   // tx only chan 10
    chk(chan_alloc == 16'h0408, $sformatf("allocation %h", chan_alloc));
    map_addr = 11'(10 * 16 + 15); #1; chk(map_rdata == 8'h97, "map read-back");
    h_mode = 1;
    for (int c = 0; c < 4; c++) begin
      cs_no = 8'(c + 20);
      for (int idx = 0; idx < ISO_BYTES; idx++) begin
        logic [7:0] e;
        bit use_ok, exp_rx, exp_req;
        @(negedge clk);
        cg_no = 7'(idx / 16); wbc_no = 4'(idx % 16);
        iso_ind = (idx % 16) != 1;                    // WBC 1 is a packet WBC
        i_tx = data_pair(8'(idx ^ c));
        cs_tx_avail = 1'($urandom); cs_tx_data = 8'($urandom);
        #1;
        e = model[idx];
        use_ok = iso_ind && ((int'(cs_no) % (1 << e[5:4])) == 0);
        exp_rx = use_ok && e[7];
        exp_req = use_ok && e[6] && cs_tx_avail;
        chk(cs_rx_valid == exp_rx, $sformatf("rx valid at %0d", idx));
        if (exp_rx) begin
          n_rx++;
          chk(cs_rx_chan == e[3:0] && cs_rx_data == 8'(idx ^ c), "rx channel and data");
        end
        chk(iso_req == exp_req && cs_tx_take == exp_req, $sformatf("iso_req at %0d", idx));
        if (e[6]) chk(cs_tx_chan == e[3:0], "tx channel select");
        if (exp_req) begin
          n_tx++;
          chk(i_rx == data_pair(cs_tx_data), "tx data");
        end
      end
    end
    // basic mode: nothing claimed
    @(negedge clk); h_mode = 0; cg_no = 5; wbc_no = 2; iso_ind = 1; cs_tx_avail = 1; #1;
    chk(!iso_req && !cs_rx_valid, "no access in basic mode");
    h_mode = 1;
    wr(5, 2, 8'h00);
    chk(chan_alloc == 16'h0408, "still allocated with one slot left");
    wr(70, 2, 8'h83);   // rx only now
    chk(chan_alloc == 16'h0400, "channel 3 released");
    chk(n_rx > 0 && n_tx > 0, "traffic in both directions");
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
