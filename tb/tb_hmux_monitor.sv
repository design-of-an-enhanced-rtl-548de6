// Testbench of the H-MUX monitor module.
// Master phase: the external cycle clock ticks every CYC clocks; the slave stream carries received
// cycles at a different phase. Checks every generated byte: J K, C1 C2, sequence number (one more
// per cycle), template symbols, MVC insertion with its acknowledge, body bytes read from the latency
// adjustment buffer (compared with the last byte the slave delivered for that position), idle
// preamble, and the cycle period. The template is rewritten in the middle of a generated header:
// the new one must appear from the next cycle on. The received cycles come back one cycle late
// (their sequence number is the one before the cycle being generated) with the template sent
// then, which must not raise tmpl_mismatch, across the change too; a damaged received template
// must raise it.
// Internal cycle clock phase: with the external clock deselected, cycles must start every 1562 and
// 1563 clocks in turn (125 us of 80 ns byte clocks on average) while the external input is ignored.
// Slave phase: pass-through, MVC insertion and reception, and bid_req on a sequence error.
module tb_hmux_monitor;
  import fddi2_pkg::*;

  localparam int CYC = 1562;
  logic clk = 0, rst_n = 0;
  spair_t s_tx, e_tx;
  tag_t s_tag;
  logic cycle_tick, sel_cl, seq_err, sync_err, bypass_active, mon_we, mvc_tx_valid, mvc_tx_ack;
  logic [15:0] rx_tmpl;
  logic [7:0] rx_cs;
  logic [31:0] mon_wdata, mon_rdata;
  logic [7:0] mvc_tx_data, mvc_rx_data;
  logic mvc_rx_valid, is_master, bid_req, tmpl_mismatch;
  int checks = 0, failures = 0;

  hmux_monitor dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  spair_t lastw [CYCLE_BODY];
  int gpos, gseq, rpos, rcyc, n_cycles, n_mvc, last_start, t;
  logic [15:0] T, T2, Tg;
  logic [15:0] sent [256];

  initial begin
    T = 16'h3C96; T2 = 16'h4D21; Tg = T; rx_cs = 0;
    s_tx = PAIR_IDLE; s_tag = '0; cycle_tick = 0; sel_cl = 1; seq_err = 0; sync_err = 0; bypass_active = 0;
    mon_we = 0; mon_wdata = 0; mvc_tx_valid = 0; mvc_tx_data = 0; rx_tmpl = T;
    for (int p = 0; p < CYCLE_BODY; p++) lastw[p] = data_pair(8'h00);
    for (int q = 0; q < 256; q++) sent[q] = 16'h0;
    repeat (2) @(negedge clk); rst_n = 1;
    // the buffer starts with unknown contents: fill one received cycle before generating
    @(negedge clk); mon_we = 1; mon_wdata = {15'd0, 1'b1, T}; @(negedge clk); mon_we = 0;
    chk(is_master && mon_rdata[15:0] == T, "master register");
    gpos = -1; gseq = 0; rpos = 0; rcyc = 0; last_start = -1; t = 0;
    for (int i = 0; i < 7 * CYC; i++) begin
      // drive inputs for this clock
      cycle_tick = (i >= CYC) && ((i - CYC) % CYC == 0);
      rpos = (i + 600) % CYC;
      s_tag = '0;
      if (rpos < CYCLE_BODY) begin
        s_tag.in_cycle = 1; s_tag.pos = 11'(rpos); s_tag.is_hdr = rpos < 12; s_tag.hdr_idx = 4'(rpos);
      end
      s_tx = data_pair(8'(rpos * 5 + i / CYC));
      mvc_tx_valid = (i / CYC == 3); mvc_tx_data = 8'hB7;
      // received cycle: the one generated before the current one, with the template it carried
      rx_cs = 8'(gseq - 1);
      rx_tmpl = sent[8'(gseq - 1)];
      if (i >= 5 * CYC) rx_tmpl = rx_tmpl ^ 16'h0100;
      if (i == 5 * CYC - 1) chk(!tmpl_mismatch, "no template mismatch before the damage");
      mon_we = (i == 2 * CYC + 6);   // in the middle of the generated template bytes
      mon_wdata = {15'd0, 1'b1, T2};
      #1;
      // check generated byte (the comb output reflects the current gpos)
      if (gpos >= 0) begin
        spair_t exp_b;
        if (gpos >= CYCLE_BODY) exp_b = PAIR_IDLE;
        else if (gpos == 0) exp_b = PAIR_JK;
        else if (gpos == 1) exp_b = ctl_pair(SYM_S, SYM_R);
        else if (gpos == 2) exp_b = data_pair(8'(gseq));
        else if (gpos <= 10) exp_b = ctl_pair(Tg[2*(gpos-3)] ? SYM_S : SYM_R, Tg[2*(gpos-3)+1] ? SYM_S : SYM_R);
        else if (gpos == 11 && mvc_tx_valid) exp_b = data_pair(8'hB7);
        else exp_b = lastw[gpos];
        if (gseq >= 2 || gpos < 12 || gpos >= CYCLE_BODY) chk(e_tx == exp_b, $sformatf("generated byte pos %0d", gpos));
        if (gpos == 11) begin
          chk(mvc_tx_ack == mvc_tx_valid, "MVC acknowledge");
          if (mvc_tx_ack) n_mvc++;
        end
        if (gpos == 0) begin
          if (last_start >= 0) chk(i - last_start == CYC, "cycle period");
          last_start = i; n_cycles++;
        end
      end
      @(posedge clk);
      if (s_tag.in_cycle && i >= CYCLE_BODY) lastw[rpos] = s_tx;  // buffer clearing ends
      if (cycle_tick) begin
        gpos = 0; gseq++;
        Tg = (i > 2 * CYC + 6) ? T2 : T;
        sent[8'(gseq)] = Tg;
      end
      else if (gpos >= 0 && gpos < 2047) gpos++;
      @(negedge clk);
    end
    chk(n_cycles >= 5 && n_mvc > 0, "cycles generated and MVC sent");
    mon_we = 0;
    chk(mon_rdata[18] == 1'b1, "template mismatch flagged");
    chk(mon_rdata[15:0] == T2, "template register");
    // internal cycle clock
    begin
      int st [$];
      sel_cl = 0; s_tag = '0; mvc_tx_valid = 0;
      for (int i = 0; i < 5 * CYC; i++) begin
        cycle_tick = (i % 700 == 0);
        #1;
        if (e_tx[9:0] == PAIR_JK[9:0]) st.push_back(i);
        @(negedge clk);
      end
      chk(st.size() >= 4, "cycles from the internal clock");
      for (int k = 2; k < st.size(); k++) begin
        chk(st[k] - st[k-1] == CYC || st[k] - st[k-1] == CYC + 1, $sformatf("internal period %0d", st[k] - st[k-1]));
        chk(st[k] - st[k-2] == 2 * CYC + 1, "two internal periods are 250 us");
      end
      sel_cl = 1; cycle_tick = 0;
    end
    // slave phase
    mon_we = 1; mon_wdata = {14'd0, 1'b1, 1'b0, T}; @(negedge clk); mon_we = 0;
    chk(!is_master && mon_rdata[18] == 1'b0, "slave mode, flags cleared");
    mvc_tx_valid = 0;
    for (int i = 0; i < 40; i++) begin
      s_tag = '0; s_tag.in_cycle = 1; s_tag.is_hdr = i < 12; s_tag.hdr_idx = 4'(i); s_tag.pos = 11'(i);
      s_tx = data_pair(8'(i + 100));
      mvc_tx_valid = i == 11; mvc_tx_data = 8'h5D;
      #1;
      if (i == 11) chk(e_tx == data_pair(8'h5D) && mvc_tx_ack, "MVC insertion as slave");
      else chk(e_tx == s_tx && !mvc_tx_ack, "slave pass-through");
      @(negedge clk);
      if (i == 11) chk(mvc_rx_valid && mvc_rx_data == 8'd111, "MVC reception");
    end
    chk(!bid_req, "no bid request yet");
    seq_err = 1; @(negedge clk); seq_err = 0;
    chk(bid_req && mon_rdata[19], "bid request after sequence error");
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
