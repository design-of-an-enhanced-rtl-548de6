// Enhanced FDDI-II dual attached station.
//
// Both rings of the dual ring carry traffic at the same time, each in its own mode (basic FDDI or
// hybrid FDDI-II): ring k has its own H-MUX, packet MAC (external FORMAC, interface brought out),
// I-MAC and CS-MUX. A configuration switch between the ENDEC buses and the H-MUXes lets station
// management fold the dual ring into one ring after a failure. Both H-MUXes carry the monitor
// add-on, so the station can become cycle master on either ring; the external cycle clock is
// shared, and sel_cl selects per ring between it and the H-MUX's internal cycle clock divider.
//
// Ports are arrays indexed by ring (0 = ring 1, 1 = ring 2). External parts not inside this module:
// ENDEC/EDS and optical converters (ring_rx/ring_tx), FORMAC (f_*, hold*, tok_isd), the node
// processor (np_*, mon_*, map_*, cfg_*), the circuit switched devices (usr_*) and the MVC access.
// Latency ring_rx to ring_tx is 3 clocks of the 12.5 MHz byte clock for a non-master station.
module fddi2_station
  import fddi2_pkg::*;
#(
  parameter int unsigned NUM_CH = 16,  // CS channels per ring
  parameter int unsigned PA_MAX = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cycle_tick,
  input  logic              sel_cl       [2],
  input  spair_t            ring_rx      [2],
  output spair_t            ring_tx      [2],
  // FORMAC of each ring
  output spair_t            f_tx         [2],
  input  spair_t            f_rx         [2],
  output logic              hold1        [2],
  output logic              hold2        [2],
  input  logic              tok_isd      [2],
  // node processor
  input  logic [3:0]        np_addr      [2],
  input  logic [7:0]        np_wdata     [2],
  input  logic              np_we        [2],
  output logic [7:0]        np_rdata     [2],
  output logic              alarm        [2],
  input  logic              mon_we       [2],
  input  logic [31:0]       mon_wdata    [2],
  output logic [31:0]       mon_rdata    [2],
  input  logic              map_we       [2],
  input  logic [10:0]       map_addr     [2],
  input  logic [7:0]        map_wdata    [2],
  output logic [7:0]        map_rdata    [2],
  output logic              map_busy     [2],
  input  logic              cfg_we,
  input  logic [3:0]        cfg_wdata,
  output logic [3:0]        cfg_rdata,
  // MVC access
  input  logic [7:0]        mvc_tx_data  [2],
  input  logic              mvc_tx_valid [2],
  output logic              mvc_tx_ack   [2],
  output logic [7:0]        mvc_rx_data  [2],
  output logic              mvc_rx_valid [2],
  output logic              is_master    [2],
  output logic              bid_req      [2],
  // circuit switched devices
  input  logic [NUM_CH-1:0] usr_tx_we    [2],
  input  logic [7:0]        usr_tx_data  [2][NUM_CH],
  output logic [NUM_CH-1:0] usr_rx_valid [2],
  output logic [7:0]        usr_rx_data  [2][NUM_CH],
  output logic [7:0]        cs_viol_cnt  [2],
  output logic [NUM_CH-1:0] cs_viol_chan [2],
  input  logic              cs_viol_clr  [2]
);

  spair_t h_rx [2];
  spair_t h_tx [2];

  config_switch u_cfg (
    .clk, .rst_n, .ring_rx, .ring_tx, .h_rx, .h_tx, .cfg_we, .cfg_wdata, .cfg_rdata
  );

  for (genvar k = 0; k < 2; k++) begin : g_ring
    spair_t            i_tx, i_rx;
    logic              iso_req, iso_ind, c_sync, h_mode;
    logic [7:0]        cs_no;
    logic [6:0]        cg_no;
    logic [3:0]        wbc_no;
    logic              cs_rx_valid, cs_tx_avail, cs_tx_take;
    logic [3:0]        cs_rx_chan, cs_tx_chan;
    logic [7:0]        cs_rx_data, cs_tx_data;
    logic [NUM_CH-1:0] chan_alloc;

    hmux #(.MONITOR(1'b1), .PA_MAX(PA_MAX)) u_hmux (
      .clk, .rst_n, .e_rx(h_rx[k]), .e_tx(h_tx[k]),
      .i_tx, .i_rx, .iso_req, .iso_ind, .cs_no, .cg_no, .wbc_no, .c_sync, .h_mode,
      .f_tx(f_tx[k]), .f_rx(f_rx[k]), .hold1(hold1[k]), .hold2(hold2[k]), .tok_isd(tok_isd[k]),
      .np_addr(np_addr[k]), .np_wdata(np_wdata[k]), .np_we(np_we[k]), .np_rdata(np_rdata[k]),
      .alarm(alarm[k]), .cycle_tick, .sel_cl(sel_cl[k]), .mon_we(mon_we[k]), .mon_wdata(mon_wdata[k]),
      .mon_rdata(mon_rdata[k]), .mvc_tx_data(mvc_tx_data[k]), .mvc_tx_valid(mvc_tx_valid[k]),
      .mvc_tx_ack(mvc_tx_ack[k]), .mvc_rx_data(mvc_rx_data[k]), .mvc_rx_valid(mvc_rx_valid[k]),
      .is_master(is_master[k]), .bid_req(bid_req[k])
    );

    imac #(.NUM_CH(NUM_CH)) u_imac (
      .clk, .rst_n, .i_tx, .iso_ind, .cs_no, .cg_no, .wbc_no, .h_mode, .i_rx, .iso_req,
      .cs_rx_valid, .cs_rx_chan, .cs_rx_data, .cs_tx_chan, .cs_tx_avail, .cs_tx_data, .cs_tx_take,
      .chan_alloc, .map_we(map_we[k]), .map_addr(map_addr[k]), .map_wdata(map_wdata[k]),
      .map_rdata(map_rdata[k]), .init_busy(map_busy[k])
    );

    csmux #(.NUM_CH(NUM_CH)) u_csmux (
      .clk, .rst_n, .cs_rx_valid, .cs_rx_chan, .cs_rx_data, .cs_tx_chan, .cs_tx_avail, .cs_tx_data,
      .cs_tx_take, .chan_alloc, .usr_tx_we(usr_tx_we[k]), .usr_tx_data(usr_tx_data[k]),
      .usr_rx_valid(usr_rx_valid[k]), .usr_rx_data(usr_rx_data[k]), .viol_cnt(cs_viol_cnt[k]),
      .viol_chan(cs_viol_chan[k]), .viol_clr(cs_viol_clr[k])
    );
  end

endmodule
