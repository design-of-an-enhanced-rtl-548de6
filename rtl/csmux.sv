// CS multiplexer (CS-MUX).
//
// Connects the isochronous byte stream of the I-MAC to NUM_CH circuit switched users. Received
// bytes of a channel appear on that user's usr_rx_data with a one-clock usr_rx_valid. Each user
// writes the bytes it sends into a one-byte holding register of its channel (usr_tx_we); the
// I-MAC takes them in the channel's slots. A channel with n slots per cycle carries n x 64 kbps.
// Consistency check: a user write to a channel that has no send slot in the I-MAC steering map
// (chan_alloc low) is refused and counted, as is a write to a full holding register (overrun).
// The node processor reads the violation count (viol_cnt) and the channels that caused a
// violation (viol_chan, cleared by viol_clr).
// Timing: cs_tx_avail / cs_tx_data are combinational from the holding registers; writes and
// receptions take effect at the clock edge. The mapping task and the check follow the design; the
// holding-register scheme and the counters are this design's choices.
module csmux #(
  parameter int unsigned NUM_CH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // I-MAC
  input  logic              cs_rx_valid,
  input  logic [3:0]        cs_rx_chan,
  input  logic [7:0]        cs_rx_data,
  input  logic [3:0]        cs_tx_chan,
  output logic              cs_tx_avail,
  output logic [7:0]        cs_tx_data,
  input  logic              cs_tx_take,
  input  logic [NUM_CH-1:0] chan_alloc,
  // users
  input  logic [NUM_CH-1:0] usr_tx_we,
  input  logic [7:0]        usr_tx_data [NUM_CH],
  output logic [NUM_CH-1:0] usr_rx_valid,
  output logic [7:0]        usr_rx_data [NUM_CH],
  // management
  output logic [7:0]        viol_cnt,
  output logic [NUM_CH-1:0] viol_chan,
  input  logic              viol_clr
);

  logic [7:0]        buf_q [NUM_CH];
  logic [NUM_CH-1:0] full_q;
  logic [NUM_CH-1:0] bad;

  assign cs_tx_avail = 32'(cs_tx_chan) < NUM_CH && full_q[cs_tx_chan];
  assign cs_tx_data  = buf_q[32'(cs_tx_chan) < NUM_CH ? cs_tx_chan : 4'd0];

  always_comb
    for (int c = 0; c < NUM_CH; c++)
      bad[c] = usr_tx_we[c] && (!chan_alloc[c] || (full_q[c] && !(cs_tx_take && cs_tx_chan == 4'(c))));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q       <= '0;
      usr_rx_valid <= '0;
      viol_cnt     <= '0;
      viol_chan    <= '0;
      for (int c = 0; c < NUM_CH; c++) begin
        buf_q[c]       <= '0;
        usr_rx_data[c] <= '0;
      end
    end else begin
      usr_rx_valid <= '0;
      if (cs_rx_valid && 32'(cs_rx_chan) < NUM_CH) begin
        usr_rx_valid[cs_rx_chan] <= 1'b1;
        usr_rx_data[cs_rx_chan]  <= cs_rx_data;
      end
      if (cs_tx_take) full_q[cs_tx_chan] <= 1'b0;
      for (int c = 0; c < NUM_CH; c++) begin
        if (usr_tx_we[c] && !bad[c]) begin
          buf_q[c]  <= usr_tx_data[c];
          full_q[c] <= 1'b1;
        end
      end
      if (|bad && viol_cnt != 8'hff) viol_cnt <= viol_cnt + 8'd1;
      viol_chan <= (viol_clr ? '0 : viol_chan) | bad;
    end
  end

endmodule
