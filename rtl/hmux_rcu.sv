// H-MUX receive control unit (RCU).
//
// Takes the symbol-pair stream from the ENDEC receive bus and tags every byte with its place in
// the FDDI-II cycle. A cycle is recognised by a J K starting delimiter directly followed by the
// C1 C2 pair, both R or S symbols; a J K followed by anything else is the start of a frame in
// basic mode and gets no cycle tag. Recognising a cycle header switches the unit to hybrid mode,
// and from there a byte counter gives each byte its header index, packet data group or
// cycle-group/WBC number. The unit also checks parity, the cycle sequence number (each CS must
// be the previous one plus one) and the cycle timing: a header earlier than a full cycle body, or
// none within PA_MAX bytes after the body, is a synchronisation error, and a missing header drops
// the unit back to basic mode until the next header.
//
// Timing: byte and tag pass two registers; a byte sampled at one clock edge appears on rx_byte
// after the next edge (the first register is the look-ahead that sees C1 C2 behind J K). Error
// strobes are one-clock pulses aligned with the byte they concern.
// Mode and error detection follow the H-MUX function list of the design; the counter scheme, the
// PA_MAX window and the drop-out rule are this design's choices.
module hmux_rcu
  import fddi2_pkg::*;
#(
  parameter int unsigned PA_MAX = 8   // preamble bytes tolerated after a cycle body
) (
  input  logic       clk,
  input  logic       rst_n,
  input  spair_t     e_rx,       // R-BUS from the ENDEC
  output spair_t     rx_byte,    // byte, two clocks later
  output tag_t       rx_tag,     // its place in the cycle
  output logic       hyb_mode,   // cycles are being received (hybrid ring mode)
  output logic [7:0] cs_no,      // last received cycle sequence number
  output logic       par_err,    // parity error on rx_byte
  output logic       seq_err,    // cycle sequence number out of order
  output logic       sync_err    // cycle header early or missing
);

  localparam int unsigned LIMIT = CYCLE_BODY + PA_MAX;

  spair_t      a_q;
  logic [10:0] pos_q;
  logic        have_cs_q;
  logic        hdr_now;
  logic [10:0] pos_n;
  logic        cyc_n;
  logic [10:0] off;

  assign hdr_now = is_ctl(a_q, SYM_J, SYM_K) && is_rs(e_rx.c_hi, e_rx.hi) && is_rs(e_rx.c_lo, e_rx.lo);

  always_comb begin
    pos_n = pos_q + 11'd1;
    cyc_n = 1'b0;
    if (hdr_now) begin
      pos_n = '0;
      cyc_n = 1'b1;
    end else if (hyb_mode && pos_n < 11'(CYCLE_BODY)) begin
      cyc_n = 1'b1;
    end
    off = pos_n - 11'(CG_FIRST);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= PAIR_IDLE;
      rx_byte   <= PAIR_IDLE;
      rx_tag    <= '0;
      pos_q     <= '0;
      hyb_mode  <= 1'b0;
      cs_no     <= '0;
      have_cs_q <= 1'b0;
      par_err   <= 1'b0;
      seq_err   <= 1'b0;
      sync_err  <= 1'b0;
    end else begin
      a_q      <= e_rx;
      rx_byte  <= a_q;
      par_err  <= !par_ok(a_q);
      seq_err  <= 1'b0;
      sync_err <= 1'b0;
      if (hyb_mode || hdr_now)
        pos_q <= (pos_n >= 11'(LIMIT)) ? 11'(LIMIT) : pos_n;

      rx_tag           <= '0;
      rx_tag.pos       <= pos_n;
      rx_tag.in_cycle  <= cyc_n;
      rx_tag.cyc_start <= hdr_now;
      rx_tag.is_hdr    <= cyc_n && pos_n < 11'(CH_BYTES);
      rx_tag.hdr_idx   <= pos_n[3:0];
      rx_tag.is_pdg    <= cyc_n && pos_n >= 11'(CH_BYTES) && pos_n < 11'(CG_FIRST);
      rx_tag.is_wbc    <= cyc_n && pos_n >= 11'(CG_FIRST);
      rx_tag.wbc_no    <= off[3:0];
      rx_tag.cg_no     <= off[10:4];

      if (hdr_now) begin
        hyb_mode <= 1'b1;
        if (hyb_mode && pos_n_early(pos_q)) sync_err <= 1'b1;
      end else if (hyb_mode && pos_n == 11'(LIMIT)) begin
        hyb_mode  <= 1'b0;
        have_cs_q <= 1'b0;
        sync_err  <= 1'b1;
      end

      // cycle sequence byte is a data byte at header position CS_BYTE
      if (cyc_n && pos_n == 11'(CS_BYTE)) begin
        cs_no     <= {a_q.hi, a_q.lo};
        have_cs_q <= 1'b1;
        if (have_cs_q && {a_q.hi, a_q.lo} != cs_no + 8'd1) seq_err <= 1'b1;
      end
    end
  end

  // a header is early when the previous cycle body has not been completed
  function automatic logic pos_n_early(logic [10:0] p);
    return p + 11'd1 < 11'(CYCLE_BODY);
  endfunction

endmodule
