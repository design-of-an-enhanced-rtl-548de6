// Hybrid multiplexer (H-MUX) of one ring.
//
// Splits the byte stream of an FDDI-II ring between the packet MAC (FORMAC) and the isochronous
// MAC by the programming template of each cycle, and merges their bytes back into the ring. It is
// built from the five units of the slave H-MUX around the control unit HCU: receive (RCU),
// transmit (TCU), isochronous (ICU) and packet (PCU) control, plus, when MONITOR = 1, the monitor
// add-on that can act as cycle master (cycle generation, latency adjustment buffer, MVC access,
// master supervision). Slave and monitor functions are split as in the design, so a slave-only
// H-MUX is the same module with MONITOR = 0.
// The PCU also detects token capture in the packet channel; together with TokISD it decides when
// the electrical by-pass may switch. The template error output of the HCU is left open here
// because the HCU counts template errors itself.
//
// Interfaces: ENDEC receive (e_rx) and transmit (e_tx) buses, the I-MAC signals I-RX, I-TX,
// ISO-REQ, ISO-IND, CS-No, CG-No, WBC-No, C-SYNC, H-Mode, the FORMAC signals F-RX, F-TX, HOLD1,
// HOLD2, TokISD, an 8-bit node processor register bus for the slave (see hmux_hcu), a 32-bit one
// for the monitor (see hmux_monitor), the MVC access port, the external cycle clock and its
// select (Sel_Cl: external clock or internal divider).
// Latency from e_rx to e_tx is 3 clocks for a non-master station, through the normal path and
// through the electrical by-pass alike.
module hmux
  import fddi2_pkg::*;
#(
  parameter bit          MONITOR = 1'b1,  // monitor module fitted
  parameter int unsigned PA_MAX  = 8      // preamble bytes tolerated after a cycle body
) (
  input  logic        clk,
  input  logic        rst_n,
  input  spair_t      e_rx,
  output spair_t      e_tx,
  // I-MAC
  output spair_t      i_tx,
  input  spair_t      i_rx,
  input  logic        iso_req,
  output logic        iso_ind,
  output logic [7:0]  cs_no,
  output logic [6:0]  cg_no,
  output logic [3:0]  wbc_no,
  output logic        c_sync,
  output logic        h_mode,
  // FORMAC
  output spair_t      f_tx,
  input  spair_t      f_rx,
  output logic        hold1,
  output logic        hold2,
  input  logic        tok_isd,
  // node processor, slave registers
  input  logic [3:0]  np_addr,
  input  logic [7:0]  np_wdata,
  input  logic        np_we,
  output logic [7:0]  np_rdata,
  output logic        alarm,
  // monitor
  input  logic        cycle_tick,
  input  logic        sel_cl,
  input  logic        mon_we,
  input  logic [31:0] mon_wdata,
  output logic [31:0] mon_rdata,
  input  logic [7:0]  mvc_tx_data,
  input  logic        mvc_tx_valid,
  output logic        mvc_tx_ack,
  output logic [7:0]  mvc_rx_data,
  output logic        mvc_rx_valid,
  output logic        is_master,
  output logic        bid_req
);

  spair_t      rx_byte, iso_byte, pkt_byte, s_tx;
  tag_t        rx_tag, s_tag;
  logic        hyb_mode, par_err, seq_err, sync_err, acc_viol;
  logic [7:0]  rcu_cs;
  route_e      route;
  logic [15:0] tmpl;
  logic        bypass_active, hyb_disable, ps_stop, pkt_valid, tok_cap, tok_cap_ev;
  logic [3:0]  isd_hi, isd_lo;

  hmux_rcu #(.PA_MAX(PA_MAX)) u_rcu (
    .clk, .rst_n, .e_rx, .rx_byte, .rx_tag, .hyb_mode, .cs_no(rcu_cs),
    .par_err, .seq_err, .sync_err
  );

  hmux_hcu u_hcu (
    .clk, .rst_n, .rx_byte, .rx_tag, .hyb_mode, .par_err, .seq_err, .sync_err, .acc_viol, .tok_isd,
    .tok_cap, .tok_cap_ev,
    .np_addr, .np_wdata, .np_we, .np_rdata, .route, .tmpl, .tmpl_err(), .bypass_active,
    .hyb_disable, .ps_stop, .isd_hi, .isd_lo, .alarm
  );

  hmux_icu u_icu (
    .rx_byte, .rx_tag, .route, .hyb_mode, .cs_no_in(rcu_cs), .i_tx, .iso_ind, .cs_no, .cg_no,
    .wbc_no, .c_sync, .h_mode, .i_rx, .iso_req, .iso_byte, .acc_viol
  );

  hmux_pcu u_pcu (
    .clk, .rst_n, .rx_byte, .route, .hyb_mode, .ps_stop, .isd_hi, .isd_lo, .f_tx, .f_rx, .hold1, .hold2,
    .pkt_byte, .pkt_valid, .tok_cap, .tok_cap_ev
  );

  hmux_tcu u_tcu (
    .clk, .rst_n, .e_rx, .rx_byte, .rx_tag, .pkt_byte, .pkt_valid, .iso_byte, .route,
    .hyb_disable, .bypass_active, .e_tx(s_tx), .tx_tag(s_tag)
  );

  if (MONITOR) begin : g_mon
    logic tmpl_mismatch;
    hmux_monitor u_mon (
      .clk, .rst_n, .s_tx, .s_tag, .cycle_tick, .sel_cl, .rx_tmpl(tmpl), .rx_cs(rcu_cs), .seq_err, .sync_err,
      .bypass_active, .mon_we, .mon_wdata, .mon_rdata, .mvc_tx_data, .mvc_tx_valid, .mvc_tx_ack,
      .mvc_rx_data, .mvc_rx_valid, .e_tx, .is_master, .bid_req, .tmpl_mismatch
    );
  end else begin : g_slave
    assign e_tx         = s_tx;
    assign mon_rdata    = '0;
    assign mvc_tx_ack   = 1'b0;
    assign mvc_rx_data  = '0;
    assign mvc_rx_valid = 1'b0;
    assign is_master    = 1'b0;
    assign bid_req      = 1'b0;
  end

endmodule
