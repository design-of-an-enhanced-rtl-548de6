// H-MUX packet control unit (PCU).
//
// The interface to the packet MAC (an AMD FORMAC). The FORMAC only knows a J K starting delimiter
// and a continuous byte stream, so in hybrid mode this unit
//  - feeds it the packet channel only (packet data group and packet WBCs, concatenated) and holds
//    it with HOLD1 (receive) and HOLD2 (transmit) during every other byte, so its internal state
//    is frozen rather than lost;
//  - replaces the in-cycle starting delimiter received on the ring by J K towards the FORMAC, and
//    the J K sent by the FORMAC by the in-cycle delimiter towards the ring. The in-cycle
//    delimiter is programmable (HCU register ISD), since the ENDEC passes only some symbol pairs;
//    I T, I R, I S or the standard I L can be set.
// In basic mode every byte is passed both ways unchanged. PS stop holds the FORMAC all the time.
//
// Token capture detection: the unit watches the packet channel in both directions. A token (a
// starting delimiter followed by the frame control byte 1L000000, L = 1 for a restricted token)
// that arrives from the ring and is not repeated by the FORMAC has been captured: tok_cap rises
// and tok_cap_ev pulses for one clock. A token sent by the FORMAC ends the capture. The HCU uses
// tok_cap, together with the FORMAC's TokISD pin, for the by-pass rule and counts the captures.
//
// The data path is combinational; the FORMAC must present its byte on F-RX in the clock in which
// HOLD2 is low. tok_cap changes at the clock edge after the frame control byte. The conversion,
// the hold use and token capture detection in the H-MUX follow the design; which hold pin does
// what and the detection rule (comparing the frame control byte in and out) are this design's
// choices.
module hmux_pcu
  import fddi2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  spair_t     rx_byte,
  input  route_e     route,
  input  logic       hyb_mode,
  input  logic       ps_stop,
  input  logic [3:0] isd_hi,
  input  logic [3:0] isd_lo,
  // FORMAC side
  output spair_t     f_tx,
  input  spair_t     f_rx,
  output logic       hold1,
  output logic       hold2,
  // towards TCU
  output spair_t     pkt_byte,
  output logic       pkt_valid,  // pkt_byte replaces the received byte
  // token capture
  output logic       tok_cap,
  output logic       tok_cap_ev
);

  // frame control byte of a token: 1L00 0000
  function automatic logic is_tok_fc(spair_t p);
    return !p.c_hi && !p.c_lo && p.hi[3] && p.hi[1:0] == 2'b00 && p.lo == 4'h0;
  endfunction

  logic rx_sd_q, tx_sd_q, tok_in, tok_out;

  logic slot;
  assign slot      = (route == ROUTE_PKT) && !ps_stop;
  assign hold1     = !slot;
  assign hold2     = !slot;
  assign pkt_valid = slot;

  always_comb begin
    f_tx = PAIR_IDLE;
    if (slot)
      f_tx = (hyb_mode && is_ctl(rx_byte, isd_hi, isd_lo)) ? PAIR_JK : rx_byte;
    pkt_byte = (hyb_mode && is_ctl(f_rx, SYM_J, SYM_K)) ? ctl_pair(ctl_sym_e'(isd_hi), ctl_sym_e'(isd_lo))
                                                        : fix_par(f_rx);
  end

  // a token comes in (towards the FORMAC) or goes out (from the FORMAC) in this packet slot
  assign tok_in     = slot && rx_sd_q && is_tok_fc(f_tx);
  assign tok_out    = slot && tx_sd_q && is_tok_fc(f_rx);
  assign tok_cap_ev = tok_in && f_rx[9:0] != f_tx[9:0] && !tok_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sd_q <= 1'b0;
      tx_sd_q <= 1'b0;
      tok_cap <= 1'b0;
    end else begin
      if (slot) begin
        rx_sd_q <= is_ctl(f_tx, SYM_J, SYM_K);
        tx_sd_q <= is_ctl(f_rx, SYM_J, SYM_K);
      end
      if (tok_cap_ev)   tok_cap <= 1'b1;
      else if (tok_out) tok_cap <= 1'b0;
    end
  end

endmodule
