// H-MUX transmit control unit (TCU).
//
// Builds the byte stream for the ENDEC transmit bus. Per byte it takes the FORMAC byte in packet
// slots, the ICU byte (received or I-MAC byte) in isochronous slots and the received byte
// otherwise, regenerates parity and registers the result. Two enhancements of the design live here:
//  - Suppression of the cycle control symbols: with hyb_disable set, the J K and C1 C2 of every
//    cycle header are replaced by idle, so the stations downstream no longer see cycles and fall
//    back to basic mode without any software procedure.
//  - Electrical by-pass: with bypass_active set, the output is the raw received stream delayed
//    by a shift register of exactly the latency of the normal path (LAT clocks, receive unit
//    included), so inserting or removing the station does not change the ring length.
//
// Timing: e_tx and tx_tag are registered; e_tx is LAT = 3 clocks behind e_rx through either path.
// The by-pass rule follows the design; the shift-register implementation is this design's choice.
module hmux_tcu
  import fddi2_pkg::*;
#(
  parameter int unsigned LAT = 3   // latency of the normal path, RCU (2) plus this register (1)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  spair_t e_rx,         // raw received stream, for the by-pass
  input  spair_t rx_byte,
  input  tag_t   rx_tag,
  input  spair_t pkt_byte,
  input  logic   pkt_valid,
  input  spair_t iso_byte,
  input  route_e route,
  input  logic   hyb_disable,
  input  logic   bypass_active,
  output spair_t e_tx,         // TA-BUS towards the ENDEC (or the monitor)
  output tag_t   tx_tag        // tag of the byte on e_tx
);

  spair_t dly_q [LAT-1];
  spair_t sel;

  always_comb begin
    if (pkt_valid)              sel = pkt_byte;
    else if (route == ROUTE_ISO) sel = iso_byte;
    else                        sel = rx_byte;
    if (hyb_disable && rx_tag.is_hdr && rx_tag.hdr_idx < 4'd2) sel = PAIR_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT - 1; i++) dly_q[i] <= PAIR_IDLE;
      e_tx   <= PAIR_IDLE;
      tx_tag <= '0;
    end else begin
      dly_q[0] <= e_rx;
      for (int i = 1; i < LAT - 1; i++) dly_q[i] <= dly_q[i-1];
      e_tx   <= bypass_active ? dly_q[LAT-2] : fix_par(sel);
      tx_tag <= rx_tag;
    end
  end

endmodule
