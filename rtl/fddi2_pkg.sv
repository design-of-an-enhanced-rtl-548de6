// Shared types and constants of the FDDI-II station.
//
// Symbol-pair bus: every ring interface (ENDEC R-BUS and TA-BUS, FORMAC, I-MAC) is 11 bits wide,
// which carries one byte per 80 ns clock as two 4B/5B symbols. Each symbol is a control flag and
// a 4-bit code (the data nibble, or a control symbol code when the flag is set), and bit 10 is an
// odd parity bit over the other ten. The width of 11 is printed on every bus of the H-MUX block
// diagram; the split into fields and the control symbol codes are this design's choice.
//
// Cycle layout (bytes counted from the starting delimiter of a cycle): a 12-byte cycle header
// (J K, C1 C2, cycle sequence CS, template P0..P15 as 8 symbol pairs, reserved byte used as the
// management voice channel), the 12-byte dedicated packet data group, then 96 cycle groups of 16
// bytes, one per wide band channel. The counts 96, 16, 1536 and the header field order follow the
// cycle structure of the design; the byte grouping of the header is this design's choice.
package fddi2_pkg;

  // control symbol codes (flag bit set)
  typedef enum logic [3:0] {
    SYM_Q = 4'h0,  // quiet
    SYM_I = 4'h1,  // idle
    SYM_H = 4'h2,  // halt
    SYM_J = 4'h3,  // first half of starting delimiter
    SYM_K = 4'h4,  // second half of starting delimiter
    SYM_T = 4'h5,  // terminate
    SYM_R = 4'h6,  // reset (template: WBC carries packet traffic)
    SYM_S = 4'h7,  // set   (template: WBC carries isochronous traffic)
    SYM_L = 4'h8   // in-cycle delimiter of the standard
  } ctl_sym_e;

  typedef struct packed {
    logic       par;   // odd parity over bits 9..0
    logic       c_hi;  // first symbol is a control symbol
    logic [3:0] hi;
    logic       c_lo;  // second symbol is a control symbol
    logic [3:0] lo;
  } spair_t;

  localparam int unsigned N_WBC      = 16;    // wide band channels
  localparam int unsigned N_CG       = 96;    // cycle groups per cycle
  localparam int unsigned CH_BYTES   = 12;    // cycle header
  localparam int unsigned PDG_BYTES  = 12;    // dedicated packet data group
  localparam int unsigned CG_FIRST   = CH_BYTES + PDG_BYTES;        // 24
  localparam int unsigned ISO_BYTES  = N_CG * N_WBC;                // 1536
  localparam int unsigned CYCLE_BODY = CG_FIRST + ISO_BYTES;        // 1560
  localparam int unsigned TMPL_FIRST = 3;     // header bytes 3..10 hold P0..P15
  localparam int unsigned TMPL_LAST  = 10;
  localparam int unsigned MVC_BYTE   = 11;    // reserved header byte, one byte per cycle = 64 kbps
  localparam int unsigned CS_BYTE    = 2;
  localparam int unsigned CYCLE_CLK2 = 3125;  // byte clocks in two cycles: 2 x 125 us / 80 ns

  // what a byte of the ring stream is, as decided by the receive control unit
  typedef struct packed {
    logic        in_cycle;   // byte lies inside a recognised cycle (hybrid mode)
    logic        cyc_start;  // byte is the J K of a cycle header
    logic        is_hdr;     // cycle header byte
    logic [3:0]  hdr_idx;    // index within the header
    logic        is_pdg;     // dedicated packet data group byte
    logic        is_wbc;     // cycle group byte
    logic [3:0]  wbc_no;     // wide band channel of a cycle group byte
    logic [6:0]  cg_no;      // cycle group number
    logic [10:0] pos;        // byte position counted from the starting delimiter
  } tag_t;

  typedef enum logic [1:0] {
    ROUTE_RING = 2'd0,  // repeat (header, preamble)
    ROUTE_PKT  = 2'd1,  // packet channel: FORMAC
    ROUTE_ISO  = 2'd2   // isochronous WBC: I-MAC
  } route_e;

  function automatic spair_t mk_pair(logic c_hi, logic [3:0] hi, logic c_lo, logic [3:0] lo);
    spair_t p;
    p.c_hi = c_hi; p.hi = hi; p.c_lo = c_lo; p.lo = lo;
    p.par  = ~^{c_hi, hi, c_lo, lo};
    return p;
  endfunction

  function automatic spair_t ctl_pair(ctl_sym_e a, ctl_sym_e b);
    return mk_pair(1'b1, a, 1'b1, b);
  endfunction

  function automatic spair_t data_pair(logic [7:0] d);
    return mk_pair(1'b0, d[7:4], 1'b0, d[3:0]);
  endfunction

  function automatic logic par_ok(spair_t p);
    return ^{p.par, p.c_hi, p.hi, p.c_lo, p.lo};
  endfunction

  function automatic spair_t fix_par(spair_t p);
    spair_t q = p;
    q.par = ~^{p.c_hi, p.hi, p.c_lo, p.lo};
    return q;
  endfunction

  localparam spair_t PAIR_JK   = ctl_pair(SYM_J, SYM_K);
  localparam spair_t PAIR_IDLE = ctl_pair(SYM_I, SYM_I);

  // symbol pair equal to a control pair, parity ignored
  function automatic logic is_ctl(spair_t p, logic [3:0] a, logic [3:0] b);
    return p.c_hi && p.c_lo && p.hi == a && p.lo == b;
  endfunction

  // control symbol is a template symbol (R or S)
  function automatic logic is_rs(logic c, logic [3:0] s);
    return c && (s == SYM_R || s == SYM_S);
  endfunction

endpackage
