// H-MUX control unit (HCU).
//
// The central unit of the slave H-MUX. It decodes the programming template P0..P15 of every
// received cycle header (S: the wide band channel is isochronous, R: it belongs to the packet
// channel) and keeps the last value of a channel whose symbol is neither S nor R, so a damaged
// template never changes the channel allocation. From the template and the byte tag of the
// receive unit it routes every byte: in hybrid mode the packet data group and the packet WBCs go
// to the FORMAC, the isochronous WBCs to the I-MAC and the header and preamble are repeated; in
// basic mode every byte goes to the FORMAC.
//
// Towards the node processor it offers a register file on an 8-bit bus (write strobe, combinational
// read) with the control bits (electrical by-pass request, suppression of the cycle control
// symbols, packet stop), the programmable in-cycle starting delimiter, sticky error flags,
// saturating error counters and a comparator that raises an alarm when a counter reaches a
// programmed threshold. The by-pass only changes state while no token is captured, neither by the
// FORMAC's TokISD pin nor by the token capture detection of the PCU.
//
// Register map (np_addr): 0 CTRL {.., alarm_en[3], ps_stop[2], hyb_disable[1], bypass_req[0]};
// 1 ISD {first symbol code[7:4], second[3:0]}, reset {I,T}; 2 STATUS (read; any write clears the
// sticky bits) {acc[7], par[6], sync[5], seq[4], tmpl[3], token[2], bypass[1], hybrid[0]};
// 3..7 counters of template, sequence, sync, parity and access errors; 8/9 template bits 7..0 and
// 15..8; 10 received cycle count; 11 alarm threshold (reset 255); 12 token captures (a write
// clears it).
// The functions follow the H-MUX and enhancement lists of the design; the register map, counter
// width and the per-symbol fallback are this design's choices.
module hmux_hcu
  import fddi2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  spair_t      rx_byte,
  input  tag_t        rx_tag,
  input  logic        hyb_mode,
  input  logic        par_err,
  input  logic        seq_err,
  input  logic        sync_err,
  input  logic        acc_viol,     // isochronous access outside an isochronous slot (ICU)
  input  logic        tok_isd,      // FORMAC has captured the token
  input  logic        tok_cap,      // token captured, detected in the packet channel (PCU)
  input  logic        tok_cap_ev,   // a token has just been captured
  // node processor
  input  logic [3:0]  np_addr,
  input  logic [7:0]  np_wdata,
  input  logic        np_we,
  output logic [7:0]  np_rdata,
  // control of the other units
  output route_e      route,
  output logic [15:0] tmpl,         // active template, 1 = isochronous
  output logic        tmpl_err,     // invalid template symbol in this byte
  output logic        bypass_active,
  output logic        hyb_disable,
  output logic        ps_stop,
  output logic [3:0]  isd_hi,
  output logic [3:0]  isd_lo,
  output logic        alarm
);

  logic [7:0] ctrl_q, isd_q, sticky_q, thr_q, cyc_cnt_q, tok_cnt_q;
  logic       tok_held;
  logic [7:0] cnt_q [5];
  logic [4:0] ev;
  logic       in_tmpl;
  logic [2:0] tidx;
  logic       hi_ok, lo_ok;

  assign tok_held    = tok_isd || tok_cap;
  assign hyb_disable = ctrl_q[1];
  assign ps_stop     = ctrl_q[2];
  assign isd_hi      = isd_q[7:4];
  assign isd_lo      = isd_q[3:0];

  // template decoding
  assign in_tmpl  = rx_tag.is_hdr && rx_tag.hdr_idx >= 4'(TMPL_FIRST) && rx_tag.hdr_idx <= 4'(TMPL_LAST);
  assign tidx     = 3'(rx_tag.hdr_idx - 4'(TMPL_FIRST));
  assign hi_ok    = is_rs(rx_byte.c_hi, rx_byte.hi);
  assign lo_ok    = is_rs(rx_byte.c_lo, rx_byte.lo);
  assign tmpl_err = in_tmpl && !(hi_ok && lo_ok);

  always_comb begin
    route = ROUTE_PKT;
    if (hyb_mode) begin
      route = ROUTE_RING;
      if (rx_tag.is_pdg) route = ROUTE_PKT;
      else if (rx_tag.is_wbc) route = tmpl[rx_tag.wbc_no] ? ROUTE_ISO : ROUTE_PKT;
    end
  end

  assign ev = {acc_viol, par_err, sync_err, seq_err, tmpl_err};

  always_comb begin
    alarm = 1'b0;
    for (int i = 0; i < 5; i++)
      if (ctrl_q[3] && cnt_q[i] >= thr_q) alarm = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmpl          <= '0;
      ctrl_q        <= '0;
      isd_q         <= {SYM_I, SYM_T};
      sticky_q      <= '0;
      thr_q         <= 8'hff;
      cyc_cnt_q     <= '0;
      tok_cnt_q     <= '0;
      bypass_active <= 1'b0;
      for (int i = 0; i < 5; i++) cnt_q[i] <= '0;
    end else begin
      if (in_tmpl) begin
        if (hi_ok) tmpl[{tidx, 1'b0}] <= (rx_byte.hi == SYM_S);
        if (lo_ok) tmpl[{tidx, 1'b1}] <= (rx_byte.lo == SYM_S);
      end
      if (rx_tag.cyc_start) cyc_cnt_q <= cyc_cnt_q + 8'd1;
      if (tok_cap_ev && tok_cnt_q != 8'hff) tok_cnt_q <= tok_cnt_q + 8'd1;
      if (!tok_held) bypass_active <= ctrl_q[0];

      for (int i = 0; i < 5; i++)
        if (ev[i] && cnt_q[i] != 8'hff) cnt_q[i] <= cnt_q[i] + 8'd1;
      sticky_q <= sticky_q | {ev, 3'b000};

      if (np_we) begin
        case (np_addr)
          4'd0:  ctrl_q   <= np_wdata;
          4'd1:  isd_q    <= np_wdata;
          4'd2:  sticky_q <= '0;
          4'd3, 4'd4, 4'd5, 4'd6, 4'd7: cnt_q[3'(np_addr - 4'd3)] <= '0;
          4'd11: thr_q    <= np_wdata;
          4'd12: tok_cnt_q <= '0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (np_addr)
      4'd0:    np_rdata = ctrl_q;
      4'd1:    np_rdata = isd_q;
      4'd2:    np_rdata = {sticky_q[7:3], tok_held, bypass_active, hyb_mode};
      4'd3:    np_rdata = cnt_q[0];
      4'd4:    np_rdata = cnt_q[1];
      4'd5:    np_rdata = cnt_q[2];
      4'd6:    np_rdata = cnt_q[3];
      4'd7:    np_rdata = cnt_q[4];
      4'd8:    np_rdata = tmpl[7:0];
      4'd9:    np_rdata = tmpl[15:8];
      4'd10:   np_rdata = cyc_cnt_q;
      4'd11:   np_rdata = thr_q;
      4'd12:   np_rdata = tok_cnt_q;
      default: np_rdata = '0;
    endcase
  end

endmodule
