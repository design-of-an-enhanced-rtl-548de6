// Testbench of the H-MUX receive unit. Builds a byte stream of idle, a basic-mode frame, several
// FDDI-II cycles (2-byte preamble) with one out-of-order sequence number, one early header and one
// parity error, then idle with no header. Checks per byte, two clocks later: the byte itself, the
// cycle tag (position, header/PDG/WBC class, cycle group and WBC numbers computed from the
// position here), the mode flag and the error strobes.
module tb_hmux_rcu;
  import fddi2_pkg::*;

  logic clk = 0, rst_n = 0;
  spair_t e_rx, rx_byte;
  tag_t rx_tag;
  logic hyb_mode, par_err, seq_err, sync_err;
  logic [7:0] cs_no;
  int checks = 0, failures = 0;

  hmux_rcu dut (.*);

  always #5 clk = ~clk;

  spair_t s_q[$];
  int     p_q[$];   // expected position, -1 outside a cycle
  bit     perr_q[$], seqe_q[$], synce_q[$];

  function automatic spair_t cyc_byte(int p, int seq, logic [15:0] t);
    if (p == 0) return PAIR_JK;
    if (p == 1) return ctl_pair(SYM_S, SYM_R);
    if (p == 2) return data_pair(8'(seq));
    if (p >= 3 && p <= 10)
      return ctl_pair(t[2*(p-3)] ? SYM_S : SYM_R, t[2*(p-3)+1] ? SYM_S : SYM_R);
    return data_pair(8'(p * 3 + seq));
  endfunction

  task automatic push(spair_t b, int p, bit pe = 0, bit se = 0, bit ye = 0);
    s_q.push_back(b); p_q.push_back(p); perr_q.push_back(pe); seqe_q.push_back(se); synce_q.push_back(ye);
  endtask

  task automatic push_cycle(int seq, int len = CYCLE_BODY, bit se = 0, bit ye = 0);
    for (int p = 0; p < len; p++) push(cyc_byte(p, seq, 16'hA5C3), p, 0, se && p == 2, ye && p == 0);
  endtask

  int sent, nseq, nsync, npar, ncyc;
  initial begin
    for (int i = 0; i < 5; i++) push(PAIR_IDLE, -1);
    push(PAIR_JK, -1); push(data_pair(8'h50), -1); push(data_pair(8'h12), -1);   // basic frame
    for (int i = 0; i < 3; i++) push(PAIR_IDLE, -1);
    push_cycle(10); push(PAIR_IDLE, 1560); push(PAIR_IDLE, 1561);
    push_cycle(11); push(PAIR_IDLE, 1560); push(PAIR_IDLE, 1561);
    push_cycle(13, CYCLE_BODY, 1);                 // sequence jump 11 -> 13
    push(PAIR_IDLE, 1560);
    push_cycle(14, 100, 0, 0);                     // cut short
    push_cycle(15, CYCLE_BODY, 0, 1);              // early header
    push(PAIR_IDLE, 1560);
    // parity error inside the next cycle
    for (int p = 0; p < CYCLE_BODY; p++) begin
      automatic spair_t b = cyc_byte(p, 16, 16'hA5C3);
      if (p == 500) b.par = ~b.par;
      push(b, p, p == 500);
    end
    for (int i = 0; i < 12; i++) push(PAIR_IDLE, 1560 + i);  // header missing
  end

  // driver and checker

  int k;
  initial begin
    e_rx = PAIR_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    k = 0;
    while (k < s_q.size() + 1) begin
      @(negedge clk);
      e_rx = (k < s_q.size()) ? s_q[k] : PAIR_IDLE;
      @(posedge clk); #1;
      if (k >= 1) begin
        automatic int j = k - 1;
        automatic int p = p_q[j];
        automatic bit inc = p >= 0 && p < CYCLE_BODY;
        checks++;
        if (rx_byte !== s_q[j]) begin failures++; $display("byte %0d mismatch", j); end
        checks++;
        if (rx_tag.in_cycle !== inc) begin failures++; $display("in_cycle %0d exp %0d got %0d", j, inc, rx_tag.in_cycle); end
        if (inc) begin
          checks++;
          if (rx_tag.pos != 11'(p) || rx_tag.cyc_start != (p == 0) || rx_tag.is_hdr != (p < 12) ||
              rx_tag.is_pdg != (p >= 12 && p < 24) || rx_tag.is_wbc != (p >= 24)) begin
            failures++; $display("tag class at %0d (pos %0d)", j, p);
          end
          if (p >= 24) begin
            checks++;
            if (rx_tag.cg_no != 7'((p - 24) / 16) || rx_tag.wbc_no != 4'((p - 24) % 16)) begin
              failures++; $display("cg/wbc at pos %0d", p);
            end
          end
        end
        checks++;
        if (par_err !== perr_q[j] || seq_err !== seqe_q[j]) begin
          failures++; $display("err strobe at %0d pos %0d: par %0d seq %0d", j, p, par_err, seq_err);
        end
        if (sync_err) nsync++;
        if (seq_err) nseq++;
        if (par_err) npar++;
        if (rx_tag.cyc_start) ncyc++;
        if (p == 5) begin
          checks++;
          if (!hyb_mode) begin failures++; $display("hybrid mode not detected"); end
        end
      end
      k++;
    end
    // expected: early header and missing header -> 2 sync errors; the short cycle is not an error
    // on its own (its early successor is); 1 sequence error for 11 -> 13 and one for 14 -> 15? no:
    // cycle 14 is cut short, its CS is read, so 15 follows in order.
    checks++; if (nsync != 2) begin failures++; $display("sync errors %0d", nsync); end
    checks++; if (nseq != 1) begin failures++; $display("seq errors %0d", nseq); end
    checks++; if (ncyc != 6) begin failures++; $display("cycles %0d", ncyc); end
    checks++; if (hyb_mode) begin failures++; $display("hybrid mode not left"); end
    checks++; if (cs_no != 8'd16) begin failures++; $display("cs_no %0d", cs_no); end
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
