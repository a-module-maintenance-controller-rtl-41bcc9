// Test Channel shared definitions.
//
// The Test Channel is a small controller that a host processor programs through a
// 16-bit register interface and that then drives an IEEE 1149.1 test bus (TDO, TDI,
// TMS0/TMS1, /RST) on its own. This package holds what its blocks share: the eight
// operation modes selected by CR[2:0], the 23 controller states S0..S22 (state Si is
// encoded as the binary value i), the register addresses decoded from PA[3:0], the
// feedback polynomial of the two 16-bit LFSRs, and the bundle of controller outputs.
// Mode codes, state numbering, addresses and the polynomial follow the source
// design; the struct grouping and the active-high naming of the controller outputs
// are choices of this implementation.
// The register addresses are used by the host-interface decoder and the polynomial
// by the TxR/RxR block; a linter that checks this package on its own lists them as
// unused.
package tc_pkg;

  // Operation modes, CR[2:0]
  typedef enum logic [2:0] {
    M_DTUR  = 3'd0,  // deterministic vectors, uncompacted results
    M_DTCR  = 3'd1,  // deterministic vectors, compacted results
    M_PTUR  = 3'd2,  // read status, recirculate it back with one cycle delay
    M_PTCR  = 3'd3,  // pseudorandom vectors, compacted results
    M_INS   = 3'd4,  // instruction scan
    M_RTEST = 3'd5,  // run BIST for TC+1 cycles
    M_STBUS = 3'd6,  // TMS driven from STR
    M_RSBUS = 3'd7   // /RST asserted for TC+1 cycles
  } op_mode_e;

  // Controller states; Si is encoded as i, 23..31 are invalid
  typedef enum logic [4:0] {
    S0  = 5'd0,  S1  = 5'd1,  S2  = 5'd2,  S3  = 5'd3,  S4  = 5'd4,  S5  = 5'd5,
    S6  = 5'd6,  S7  = 5'd7,  S8  = 5'd8,  S9  = 5'd9,  S10 = 5'd10, S11 = 5'd11,
    S12 = 5'd12, S13 = 5'd13, S14 = 5'd14, S15 = 5'd15, S16 = 5'd16, S17 = 5'd17,
    S18 = 5'd18, S19 = 5'd19, S20 = 5'd20, S21 = 5'd21, S22 = 5'd22
  } tc_state_e;

  // Host write addresses, PA[3:0]
  localparam logic [3:0] A_CR     = 4'd0;
  localparam logic [3:0] A_CNR    = 4'd1;
  localparam logic [3:0] A_STR    = 4'd2;
  localparam logic [3:0] A_TC     = 4'd4;
  localparam logic [3:0] A_TXR    = 4'd5;
  localparam logic [3:0] A_RXR    = 4'd6;
  localparam logic [3:0] A_SYNR   = 4'd8;
  localparam logic [3:0] A_SRCLR  = 4'd9;
  localparam logic [3:0] A_SOFTRS = 4'd10;

  // f(x) = x^16 + x^5 + x^3 + x^2 + 1; bit k of the mask is the x^k term
  localparam logic [15:0] LFSR_POLY = 16'h002D;

  // Register write strobes produced by the address decoder (one clock wide)
  typedef struct packed {
    logic cr;
    logic cnr;
    logic str;
    logic tc;
    logic txr;
    logic rxr;
    logic synr;
    logic srclr;
    logic softrs;
  } tc_wr_t;

  // Controller outputs, active high. sc_load is the source design's /SCLDsm and
  // rst_req its /RSTsm, both inverted here.
  typedef struct packed {
    logic sc_load;   // load SC from CNR
    logic sc_dec;    // SCsm: decrement SC
    logic tc_dec;    // TCsm: decrement TC
    logic xr_shift;  // TxRsm: shift TxR and RxR one bit
    logic str_shift; // STRsm: shift STR one bit
    logic ftms;      // TMS value the controller wants on the selected TMS line
    logic rst_req;   // assert /RST on the test bus
  } tc_ctl_t;

endpackage
