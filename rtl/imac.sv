// Isochronous MAC (I-MAC).
//
// Owns the steering map: one entry for each of the 1536 isochronous byte positions of a cycle
// (96 cycle groups x 16 WBCs, index = cycle group * 16 + WBC). An entry says whether the station
// receives and/or sends that byte, for which circuit switched channel of the CS-MUX, and at what
// sub-rate: with sub = r the byte is used only in cycles whose sequence number is a multiple of
// 2^r, which gives channels below 64 kbps. Giving one channel several entries concatenates them
// to n x 64 kbps.
// For every byte the H-MUX marks with ISO-IND the entry is looked up; an own received byte is
// handed to the CS-MUX (cs_rx_*), and in an own send slot the byte waiting in the CS-MUX for the
// channel is driven on I-RX with ISO-REQ (cs_tx_take acknowledges it). Nothing is done outside
// hybrid mode.
// The node processor writes the map (map_we/map_addr/map_wdata, entry {rx_en[7], tx_en[6],
// sub[5:4], chan[3:0]}) and reads it combinationally. A per-channel count of send entries gives
// chan_alloc, the allocation the CS-MUX checks user requests against. After reset the map is
// cleared one entry per clock (init_busy high for 1536 clocks).
// Timing: lookup and answer are combinational in the clock the byte is offered. The steering map
// and its size follow the design; the entry format and sub-rate scheme are this design's choices.
module imac
  import fddi2_pkg::*;
#(
  parameter int unsigned NUM_CH = 16   // circuit switched channels of the CS-MUX
) (
  input  logic              clk,
  input  logic              rst_n,
  // H-MUX
  input  spair_t            i_tx,
  input  logic              iso_ind,
  input  logic [7:0]        cs_no,
  input  logic [6:0]        cg_no,
  input  logic [3:0]        wbc_no,
  input  logic              h_mode,
  output spair_t            i_rx,
  output logic              iso_req,
  // CS-MUX
  output logic              cs_rx_valid,
  output logic [3:0]        cs_rx_chan,
  output logic [7:0]        cs_rx_data,
  output logic [3:0]        cs_tx_chan,
  input  logic              cs_tx_avail,
  input  logic [7:0]        cs_tx_data,
  output logic              cs_tx_take,
  output logic [NUM_CH-1:0] chan_alloc,
  // node processor
  input  logic              map_we,
  input  logic [10:0]       map_addr,
  input  logic [7:0]        map_wdata,
  output logic [7:0]        map_rdata,
  output logic              init_busy
);

  typedef struct packed {
    logic       rx_en;
    logic       tx_en;
    logic [1:0] sub;
    logic [3:0] chan;
  } entry_t;

  entry_t      map_q [ISO_BYTES];
  logic [10:0] cnt_q [NUM_CH];
  logic [10:0] init_q;
  logic [10:0] idx;
  entry_t      e, old_e, new_e;
  logic        sub_ok, use_ok;

  assign idx       = {cg_no, wbc_no};
  assign e         = map_q[idx < 11'(ISO_BYTES) ? idx : 11'd0];
  assign sub_ok    = (cs_no & ((8'd1 << e.sub) - 8'd1)) == 8'd0;
  assign use_ok    = h_mode && iso_ind && sub_ok && idx < 11'(ISO_BYTES) && !init_busy;
  assign init_busy = init_q != 11'(ISO_BYTES);

  assign cs_rx_valid = use_ok && e.rx_en;
  assign cs_rx_chan  = e.chan;
  assign cs_rx_data  = {i_tx.hi, i_tx.lo};
  assign cs_tx_chan  = e.chan;
  assign iso_req     = use_ok && e.tx_en && cs_tx_avail;
  assign cs_tx_take  = iso_req;
  assign i_rx        = data_pair(cs_tx_data);

  assign old_e     = map_q[map_addr < 11'(ISO_BYTES) ? map_addr : 11'd0];
  assign new_e     = map_wdata;
  assign map_rdata = old_e;

  always_ff @(posedge clk) begin
    if (init_busy)
      map_q[init_q] <= '0;
    else if (map_we && map_addr < 11'(ISO_BYTES))
      map_q[map_addr] <= new_e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q <= '0;
      for (int c = 0; c < NUM_CH; c++) cnt_q[c] <= '0;
    end else begin
      if (init_busy) init_q <= init_q + 11'd1;
      else if (map_we && map_addr < 11'(ISO_BYTES)) begin
        for (int c = 0; c < NUM_CH; c++)
          cnt_q[c] <= cnt_q[c] + 11'(old_e.tx_en && old_e.chan == 4'(c) ? -1 : 0)
                                + 11'(new_e.tx_en && new_e.chan == 4'(c) ? 1 : 0);
      end
    end
  end

  always_comb
    for (int c = 0; c < NUM_CH; c++) chan_alloc[c] = cnt_q[c] != '0;

endmodule
