// Configuration switch of the dual attached station.
//
// Routes the two ring streams between the ENDECs and the two H-MUXes so that station
// management can set up the ring configurations: normal (each ring through its own H-MUX) and
// wrapped, where the output of one H-MUX is sent out on the other ring's transmitter to fold the
// dual ring into one after a ring failure, and an H-MUX may take its input from the other ring's
// receiver. The configuration register is written by the node processor:
// {rx_cross_2[3], rx_cross_1[2], tx_cross_2[1], tx_cross_1[0]};
// tx_cross_k: transmitter k sends the output of the other H-MUX; rx_cross_k: H-MUX k receives
// from the other ring's receiver. Reset is the normal configuration.
// Combinational data paths, registered configuration. The switch and its control by station
// management follow the design; the register format is this design's choice.
module config_switch
  import fddi2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  spair_t     ring_rx [2],   // from the ENDEC receive buses
  output spair_t     ring_tx [2],   // to the ENDEC transmit buses
  output spair_t     h_rx    [2],   // to the H-MUX inputs
  input  spair_t     h_tx    [2],   // from the H-MUX outputs
  input  logic       cfg_we,
  input  logic [3:0] cfg_wdata,
  output logic [3:0] cfg_rdata
);

  logic [3:0] cfg_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      cfg_q <= '0;
    else if (cfg_we) cfg_q <= cfg_wdata;

  assign cfg_rdata = cfg_q;

  always_comb
    for (int k = 0; k < 2; k++) begin
      ring_tx[k] = cfg_q[k]     ? h_tx[1-k]    : h_tx[k];
      h_rx[k]    = cfg_q[2 + k] ? ring_rx[1-k] : ring_rx[k];
    end

endmodule
