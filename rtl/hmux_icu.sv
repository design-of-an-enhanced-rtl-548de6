// H-MUX isochronous control unit (ICU).
//
// The interface to the isochronous MAC. Every received byte is shown to the I-MAC on I-TX together
// with its cycle position (cycle sequence, cycle group and WBC numbers), a cycle sync strobe on the
// J K of each cycle, the hybrid mode flag and ISO-IND, which marks the bytes of isochronous WBCs.
// When the I-MAC raises ISO-REQ it drives its byte on I-RX and that byte replaces the received one
// on the way to the transmit unit. A request for a byte the template has not made isochronous is a
// consistency violation: it is refused (the received byte goes on unchanged) and reported.
//
// Purely combinational; the byte and tag come from the receive unit and the result is registered
// in the transmit unit. The I-MAC must answer ISO-REQ and I-RX in the same clock. The signal names
// are those of the H-MUX interface of the design; their widths and timing are this design's choice.
module hmux_icu
  import fddi2_pkg::*;
(
  input  spair_t     rx_byte,
  input  tag_t       rx_tag,
  input  route_e     route,
  input  logic       hyb_mode,
  input  logic [7:0] cs_no_in,
  // I-MAC side
  output spair_t     i_tx,
  output logic       iso_ind,
  output logic [7:0] cs_no,
  output logic [6:0] cg_no,
  output logic [3:0] wbc_no,
  output logic       c_sync,
  output logic       h_mode,
  input  spair_t     i_rx,
  input  logic       iso_req,
  // towards TCU / HCU
  output spair_t     iso_byte,
  output logic       acc_viol
);

  assign i_tx     = rx_byte;
  assign iso_ind  = (route == ROUTE_ISO);
  assign cs_no    = cs_no_in;
  assign cg_no    = rx_tag.cg_no;
  assign wbc_no   = rx_tag.wbc_no;
  assign c_sync   = rx_tag.cyc_start;
  assign h_mode   = hyb_mode;
  assign acc_viol = iso_req && !iso_ind;
  assign iso_byte = (iso_req && iso_ind) ? fix_par(i_rx) : rx_byte;

endmodule
