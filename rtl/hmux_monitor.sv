// H-MUX monitor module.
//
// The add-on that turns a slave H-MUX into a monitor station. It sits between the transmit unit
// of the slave and the ENDEC transmit bus.
//  - Cycle clock: with sel_cl high the external 8 kHz cycle clock (cycle_tick, synchronised to
//    the byte clock) is used; with sel_cl low an internal divider of the byte clock gives one
//    tick per 125 us. A cycle is 1562.5 byte clocks of 80 ns, so the divider alternates periods of
//    1562 and 1563 clocks and holds the 8 kHz rate exactly on average.
//  - Cycle generation (master only): every tick of the selected cycle clock starts a new cycle:
//    J K, C1 C2 (S R), the cycle sequence number (one more each cycle), the master template
//    P0..P15 (S for an isochronous WBC, R for a packet WBC) and the management voice channel
//    byte, then the 1548 body bytes, then idle (preamble) until the next tick.
//  - Latency adjustment buffer: every body byte leaving the slave is written at its received cycle
//    position, and the generated cycle reads the buffer at the same position. The ring latency
//    plus the buffer delay is then always a whole number of cycles. After reset the buffer is
//    cleared to zero bytes, one entry per clock (1560 clocks), so a first cycle carries zeros.
//  - Template changes (master): a template written by the node processor is held pending and
//    only takes effect at the next cycle start, so no cycle carries a half-changed template.
//  - Template supervision (master): the template sent with each of the last 16 cycles is kept,
//    indexed by the low bits of its sequence number. When a cycle comes back round the ring, its
//    received template is compared with the one sent under the received sequence number; a
//    difference sets tmpl_mismatch. The check is therefore right for a ring of any latency up to
//    16 cycles (2 ms) and across template changes.
//  - Management voice channel (MVC): the reserved header byte (one byte per cycle, 64 kbps) is
//    delivered on mvc_rx, and a pending mvc_tx byte is written into it (mvc_tx_ack for one clock).
//  - Master supervision (non-master): a sequence or synchronisation error in the received cycles
//    raises bid_req, the request for a new bidding process.
// Not master: the slave stream passes combinationally (only the MVC byte may change), so the
// electrical by-pass delay of the slave stays exact. Master: the output is the generated cycle.
//
// Register (32-bit): write {clear[17], master_en[16], template[15:0]}; read {bid_req[19],
// tmpl_mismatch[18], 0, master[16], template[15:0]}. The monitor tasks and the choice between
// an external and an internal cycle clock follow the design; the byte layout, C1 C2 values,
// register format, the polarity of sel_cl and the way the buffer is addressed are this design's
// choices.
module hmux_monitor
  import fddi2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  spair_t      s_tx,          // slave output
  input  tag_t        s_tag,         // its received cycle position
  input  logic        cycle_tick,    // external cycle clock, one pulse per 125 us
  input  logic        sel_cl,        // 1: external cycle clock, 0: internal divider
  input  logic [15:0] rx_tmpl,       // template received by the slave
  input  logic [7:0]  rx_cs,         // sequence number of the received cycle
  input  logic        seq_err,
  input  logic        sync_err,
  input  logic        bypass_active,
  input  logic        mon_we,
  input  logic [31:0] mon_wdata,
  output logic [31:0] mon_rdata,
  input  logic [7:0]  mvc_tx_data,
  input  logic        mvc_tx_valid,
  output logic        mvc_tx_ack,
  output logic [7:0]  mvc_rx_data,
  output logic        mvc_rx_valid,
  output spair_t      e_tx,
  output logic        is_master,
  output logic        bid_req,
  output logic        tmpl_mismatch
);

  spair_t      lab [CYCLE_BODY];
  logic [15:0] m_tmpl_q;     // template of the cycle being generated
  logic [15:0] new_tmpl_q;   // template written by the node processor, used from the next cycle
  logic [15:0] sent_q [16];  // template sent, by sequence number
  logic [15:0] sent_v_q;
  logic [3:0]  seq_nx;
  logic [10:0] gpos_q;
  logic [7:0]  seq_q;
  logic        gen_on_q;
  spair_t      gen_byte, lab_rd;
  logic [2:0]  tidx;
  logic        mvc_slot_pass;
  logic        master_q;
  logic [10:0] init_q;       // buffer clearing after reset
  logic [10:0] div_q;        // internal cycle clock divider
  logic        half_q;       // this period is the longer one
  logic        int_tick, tick;

  assign int_tick = div_q == 11'(CYCLE_CLK2 / 2 - 1) + 11'(half_q);
  assign tick     = sel_cl ? cycle_tick : int_tick;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div_q  <= '0;
      half_q <= 1'b0;
    end else if (int_tick) begin
      div_q  <= '0;
      half_q <= !half_q && (CYCLE_CLK2 % 2 == 1);
    end else begin
      div_q  <= div_q + 11'd1;
    end

  assign is_master = master_q;
  assign seq_nx    = 4'(seq_q + 8'd1);

  always_ff @(posedge clk)
    if (tick && master_q) sent_q[seq_nx] <= new_tmpl_q;

  assign lab_rd = lab[gpos_q < 11'(CYCLE_BODY) ? gpos_q : 11'd0];
  assign tidx   = 3'(gpos_q - 11'(TMPL_FIRST));

  always_comb begin
    gen_byte = PAIR_IDLE;
    if (gen_on_q && gpos_q < 11'(CYCLE_BODY)) begin
      if (gpos_q == 11'd0)                    gen_byte = PAIR_JK;
      else if (gpos_q == 11'd1)               gen_byte = ctl_pair(SYM_S, SYM_R);
      else if (gpos_q == 11'(CS_BYTE))        gen_byte = data_pair(seq_q);
      else if (gpos_q <= 11'(TMPL_LAST))
        gen_byte = ctl_pair(m_tmpl_q[{tidx, 1'b0}] ? SYM_S : SYM_R, m_tmpl_q[{tidx, 1'b1}] ? SYM_S : SYM_R);
      else if (gpos_q == 11'(MVC_BYTE))       gen_byte = mvc_tx_valid ? data_pair(mvc_tx_data) : lab_rd;
      else                                    gen_byte = lab_rd;
    end
  end

  assign mvc_slot_pass = s_tag.is_hdr && s_tag.hdr_idx == 4'(MVC_BYTE) && !bypass_active;

  always_comb begin
    if (master_q) begin
      e_tx       = gen_byte;
      mvc_tx_ack = mvc_tx_valid && gen_on_q && gpos_q == 11'(MVC_BYTE);
    end else begin
      e_tx       = (mvc_slot_pass && mvc_tx_valid) ? data_pair(mvc_tx_data) : s_tx;
      mvc_tx_ack = mvc_slot_pass && mvc_tx_valid;
    end
  end

  // latency adjustment buffer, cleared to zero bytes one entry per clock after reset
  always_ff @(posedge clk) begin
    if (init_q != 11'(CYCLE_BODY))            lab[init_q] <= data_pair(8'h00);
    else if (s_tag.in_cycle && !bypass_active) lab[s_tag.pos] <= s_tx;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                          init_q <= '0;
    else if (init_q != 11'(CYCLE_BODY)) init_q <= init_q + 11'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_tmpl_q      <= '0;
      new_tmpl_q    <= '0;
      sent_v_q      <= '0;
      master_q   <= 1'b0;
      gpos_q        <= '0;
      seq_q         <= '0;
      gen_on_q      <= 1'b0;
      mvc_rx_data   <= '0;
      mvc_rx_valid  <= 1'b0;
      bid_req       <= 1'b0;
      tmpl_mismatch <= 1'b0;
    end else begin
      if (tick && master_q) begin
        m_tmpl_q         <= new_tmpl_q;
        sent_v_q[seq_nx] <= 1'b1;
        gpos_q   <= '0;
        gen_on_q <= 1'b1;
        seq_q    <= seq_q + 8'd1;
      end else if (gpos_q != 11'h7ff) begin
        gpos_q <= gpos_q + 11'd1;
      end
      if (!master_q) begin
        gen_on_q <= 1'b0;
        sent_v_q <= '0;
      end

      mvc_rx_valid <= s_tag.is_hdr && s_tag.hdr_idx == 4'(MVC_BYTE);
      if (s_tag.is_hdr && s_tag.hdr_idx == 4'(MVC_BYTE)) mvc_rx_data <= {s_tx.hi, s_tx.lo};

      if (master_q && s_tag.in_cycle && s_tag.pos == 11'(CG_FIRST) && sent_v_q[rx_cs[3:0]] &&
          rx_tmpl != sent_q[rx_cs[3:0]])
        tmpl_mismatch <= 1'b1;
      if (!master_q && (seq_err || sync_err))
        bid_req <= 1'b1;

      if (mon_we) begin
        new_tmpl_q  <= mon_wdata[15:0];
        master_q <= mon_wdata[16];
        if (mon_wdata[17]) begin
          bid_req       <= 1'b0;
          tmpl_mismatch <= 1'b0;
        end
      end
    end
  end

  assign mon_rdata = {12'd0, bid_req, tmpl_mismatch, 1'b0, master_q, new_tmpl_q};

endmodule
