// End-to-end testbench of the dual attached station at its default parameters.
// Ring 1 is closed through a 7750-byte delay standing for the rest of the largest ring: 100 km of
// fibre at about 5 us per km (6250 byte clocks) and 500 stations of 3 byte clocks each, about five
// cycles in all; the station is its
// cycle master (internal cycle clock: periods of 1562 and 1563 byte clocks in turn, 125 us on
// average; the external clock input ticks at another rate and must be ignored), so every cycle
// makes the round trip
// and comes back through the latency adjustment buffer. Ring 2 carries basic-mode frames from a
// stream driven here. FORMAC models: ring 1 repeats, ring 2 repeats with the low data nibble
// inverted.
// Checked: hybrid mode on ring 1 only, cycle period, no sequence or sync errors, template read back
// without mismatch, a 128 kbps circuit switched channel and a half-rate channel carried around the
// ring from CS user to CS user, MVC byte round trip, a refused write to an unallocated CS channel,
// the basic-mode packet path of ring 2 byte for byte, a template change by the master without a
// round-trip mismatch, the electrical by-pass on ring 2 and the
// wrapped configuration. Each mechanism is counted and must occur.
module tb_fddi2_station;
  import fddi2_pkg::*;

  localparam int CYC = 1562, RING_DLY = 7750, NUM_CH = 16;
  logic clk = 0, rst_n = 0, cycle_tick = 0;
  logic sel_cl [2];
  spair_t ring_rx [2], ring_tx [2], f_tx [2], f_rx [2];
  logic hold1 [2], hold2 [2], tok_isd [2], np_we [2], alarm [2], mon_we [2], map_we [2], map_busy [2];
  logic [3:0] np_addr [2];
  logic [7:0] np_wdata [2], np_rdata [2], map_wdata [2], map_rdata [2];
  logic [31:0] mon_wdata [2], mon_rdata [2];
  logic [10:0] map_addr [2];
  logic cfg_we;
  logic [3:0] cfg_wdata, cfg_rdata;
  logic [7:0] mvc_tx_data [2], mvc_rx_data [2];
  logic mvc_tx_valid [2], mvc_tx_ack [2], mvc_rx_valid [2], is_master [2], bid_req [2], cs_viol_clr [2];
  logic [NUM_CH-1:0] usr_tx_we [2], usr_rx_valid [2], cs_viol_chan [2];
  logic [7:0] usr_tx_data [2][NUM_CH], usr_rx_data [2][NUM_CH], cs_viol_cnt [2];
  int checks = 0, failures = 0;

  fddi2_station dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FORMAC models
  always_comb begin
    f_rx[0] = f_tx[0];
    f_rx[1] = f_tx[1];
    if (!f_tx[1].c_hi && !f_tx[1].c_lo) f_rx[1] = data_pair({f_tx[1].hi, ~f_tx[1].lo});
  end

  // rest of ring 1
  spair_t ring1 [RING_DLY];   // circular delay line
  int     r1_ptr = 0;
  spair_t r2_in;
  always_ff @(posedge clk) begin
    ring1[r1_ptr] <= ring_tx[0];
    r1_ptr <= (r1_ptr + 1) % RING_DLY;
  end
  assign ring_rx[0] = rst_n ? ring1[r1_ptr] : PAIR_IDLE;
  assign ring_rx[1] = r2_in;

  task automatic np_w(int k, int a, int d);
    @(negedge clk); np_we[k] = 1; np_addr[k] = 4'(a); np_wdata[k] = 8'(d);
    @(negedge clk); np_we[k] = 0;
  endtask
  task automatic map_w(int k, int cg, int wbc, int e);
    @(negedge clk); map_we[k] = 1; map_addr[k] = 11'(cg * 16 + wbc); map_wdata[k] = 8'(e);
    @(negedge clk); map_we[k] = 0;
  endtask

  // counters of mechanisms
  int last_per = 0, n_cyc = 0, n_cs = 0, n_sub = 0, n_mvc = 0, n_pkt = 0, n_byp = 0, n_wrap = 0, last_jk = -1, t = 0;
  bit sent_ok [256];
  bit seen [256];
  spair_t r2_hist [$];
  bit byp_on = 0, wrap_on = 0, pkt_chk = 0;
  int skip = 0;

  // clock counter, cycle clock, ring 2 stream, per-clock checks
  always @(posedge clk) if (rst_n) begin
    t++;
    cycle_tick <= (t % 1000 == 0);
  end

  always @(negedge clk) if (rst_n) begin
    // ring 2: frames of 60 data bytes separated by idle
    automatic int ph = t % 80;
    r2_in = ph < 10 ? PAIR_IDLE : ph == 10 ? PAIR_JK : ph < 71 ? data_pair(8'(t)) : ph == 71 ? ctl_pair(SYM_T, SYM_R) : PAIR_IDLE;
    r2_hist.push_back(r2_in);
    if (r2_hist.size() > 4) void'(r2_hist.pop_front());
  end

  always @(posedge clk) if (rst_n && r2_hist.size() == 4) begin
    #1;
    // ring 2: output is the input of two edges earlier, through FORMAC or by-pass
    begin
      automatic spair_t in = r2_hist[1];
      automatic spair_t e = byp_on ? in : (!in.c_hi && !in.c_lo) ? data_pair({in.hi, ~in.lo}) : in;
      if (skip > 0) skip--;
      else if (pkt_chk && !wrap_on) begin
        chk(ring_tx[1] == e, $sformatf("ring 2 output t=%0d byp=%0d got %h exp %h", t, byp_on, ring_tx[1], e));
        if (byp_on) n_byp++; else if (!in.c_hi) n_pkt++;
      end
    end
    if (wrap_on && skip == 0) begin
      chk(ring_tx[1] == ring_tx[0], "wrapped: ring 2 transmitter carries H-MUX 1 output");
      n_wrap++;
    end
    if (ring_tx[0][9:0] == PAIR_JK[9:0]) begin
      if (last_jk >= 0) begin
        chk(t - last_jk == CYC || t - last_jk == CYC + 1, "cycle period on ring 1");
        if (last_per > 0) chk(t - last_jk + last_per == 2 * CYC + 1, "two cycles last 250 us");
        last_per = t - last_jk;
      end
      last_jk = t; n_cyc++;
    end
    if (usr_rx_valid[0][2]) begin
      seen[usr_rx_data[0][2]] = 1;
      chk(usr_rx_data[0][2] == 0 || sent_ok[usr_rx_data[0][2]], "CS byte received was sent");
      n_cs++;
    end
    if (usr_rx_valid[0][5]) begin
      chk(usr_rx_data[0][5] == 8'h5A || usr_rx_data[0][5] == 8'h00, "half-rate channel byte");
      if (usr_rx_data[0][5] == 8'h5A) n_sub++;
    end
    if (mvc_rx_valid[0] && mvc_rx_data[0] == 8'h77) n_mvc++;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      tok_isd[k] = 0; np_we[k] = 0; np_addr[k] = 0; np_wdata[k] = 0; mon_we[k] = 0; mon_wdata[k] = 0;
      map_we[k] = 0; map_addr[k] = 0; map_wdata[k] = 0; mvc_tx_data[k] = 0; mvc_tx_valid[k] = 0;
      usr_tx_we[k] = 0; cs_viol_clr[k] = 0;
      for (int c = 0; c < NUM_CH; c++) usr_tx_data[k][c] = 0;
    end
    for (int i = 0; i < 256; i++) begin sent_ok[i] = 0; seen[i] = 0; end
    for (int i = 0; i < RING_DLY; i++) ring1[i] = PAIR_IDLE;
    cfg_we = 0; cfg_wdata = 0; r2_in = PAIR_IDLE;
    sel_cl[0] = 0; sel_cl[1] = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    wait (!map_busy[0] && !map_busy[1]);
    // ring 1: WBC 3 and 7 isochronous; channel 2 = 2 slots, channel 5 = 1 slot every 2nd cycle
    map_w(0, 5, 3, 8'hC2);
    map_w(0, 50, 3, 8'hC2);
    map_w(0, 9, 7, 8'hD5);
    @(negedge clk); mon_we[0] = 1; mon_wdata[0] = {15'd0, 1'b1, 16'h0088}; @(negedge clk); mon_we[0] = 0;
    pkt_chk = 1;
    // the first generated cycle must go round the ring before the station sees isochronous slots
    np_addr[0] = 2;
    wait (np_rdata[0][0]);
    // run cycles; send one CS byte per cycle on channel 2
    for (int c = 0; c < 16; c++) begin
      repeat (CYC / 2) @(negedge clk);
      usr_tx_data[0][2] = 8'(c + 1); sent_ok[c + 1] = 1; usr_tx_we[0][2] = c < 10;
      if (c == 2) begin usr_tx_we[0][5] = 1; usr_tx_data[0][5] = 8'h5A; end
      if (c == 3) begin usr_tx_we[0][9] = 1; usr_tx_data[0][9] = 8'h11; end
      @(negedge clk); usr_tx_we[0] = 0;
      if (c == 4) begin mvc_tx_data[0] = 8'h77; mvc_tx_valid[0] = 1; end
      if (c == 6) mvc_tx_valid[0] = 0;
      // template change by the master while running: WBC 8 and 11 become isochronous
      if (c == 5) begin
        @(negedge clk); mon_we[0] = 1; mon_wdata[0] = {15'd0, 1'b1, 16'h0988}; @(negedge clk); mon_we[0] = 0;
      end
      if (c == 7) begin np_w(1, 0, 8'h01); byp_on = 1; skip = 4; end
      repeat (CYC / 2 - 1) @(negedge clk);
      if (c == 7) begin np_w(1, 0, 8'h00); byp_on = 0; skip = 4; end
    end
    // status
    np_addr[0] = 2; np_addr[1] = 2; #1;
    chk(np_rdata[0][0] == 1 && np_rdata[1][0] == 0, "ring 1 hybrid, ring 2 basic");
    np_addr[0] = 4; #1; chk(np_rdata[0] == 0, "no sequence errors");
    np_addr[0] = 5; #1; chk(np_rdata[0] == 0, "no synchronisation errors");
    np_addr[0] = 8; #1; chk(np_rdata[0] == 8'h88, "template received");
    np_addr[0] = 9; #1; chk(np_rdata[0] == 8'h09, "changed template received");
    chk(mon_rdata[0][18] == 0 && is_master[0] && !is_master[1], "template consistent, master on ring 1");
    chk(cs_viol_cnt[0] == 1 && cs_viol_chan[0] == 16'h0200, "CS write to unallocated channel refused");
    // wrapped configuration
    @(negedge clk); cfg_we = 1; cfg_wdata = 4'b0010; skip = 4; @(negedge clk); cfg_we = 0; wrap_on = 1;
    repeat (100) @(negedge clk);
    skip = 4; wrap_on = 0;
    @(negedge clk); cfg_we = 1; cfg_wdata = 4'b0000; skip = 4; @(negedge clk); cfg_we = 0;
    repeat (10) @(negedge clk);
    for (int i = 1; i <= 10; i++) chk(seen[i], $sformatf("CS byte %0d came back", i));
    chk(n_cyc >= 8, "cycles generated");
    chk(n_cs > 0 && n_sub > 0 && n_mvc > 0 && n_pkt > 0 && n_byp > 0 && n_wrap > 0, "all mechanisms occurred");
    $display("mechanisms: cycles=%0d cs=%0d subrate=%0d mvc=%0d pkt=%0d bypass=%0d wrap=%0d",
             n_cyc, n_cs, n_sub, n_mvc, n_pkt, n_byp, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
