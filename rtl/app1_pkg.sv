// App1 shared definitions.
//
// App1 is a small IEEE 1149.1 compliant chip built to exercise the Test Channel: a
// one-bit full adder with a two-bit feedback register, surrounded by a three-cell
// boundary-scan register. This package holds the 16 TAP controller states in the
// four-bit D,C,B,A encoding of the IEEE 1149.1 example design (D is the most
// significant bit; Test-Logic-Reset is 1111, matching the all-preset state
// register), the instruction decode of IR[0:2], and the bundle of control signals
// that the output logic APOL drives into the core. Control signal names and
// polarities (/BPI, /BPO, /E1, S, /E2, /FM) follow the source design; the _n suffix
// marks the active-low ones.
package app1_pkg;

  typedef enum logic [3:0] {
    EXIT2_DR   = 4'h0,
    EXIT1_DR   = 4'h1,
    SHIFT_DR   = 4'h2,
    PAUSE_DR   = 4'h3,
    SELECT_IR  = 4'h4,
    UPDATE_DR  = 4'h5,
    CAPTURE_DR = 4'h6,
    SELECT_DR  = 4'h7,
    EXIT2_IR   = 4'h8,
    EXIT1_IR   = 4'h9,
    SHIFT_IR   = 4'hA,
    PAUSE_IR   = 4'hB,
    RUN_IDLE   = 4'hC,
    UPDATE_IR  = 4'hD,
    CAPTURE_IR = 4'hE,
    TLR        = 4'hF
  } tap_state_e;

  typedef enum logic [2:0] {
    I_EXTEST = 3'd0,
    I_INTEST = 3'd1,
    I_SAMPLE = 3'd2,
    I_SCANFB = 3'd3,
    I_BYPASS = 3'd4
  } instr_e;

  // IR is numbered IR0..IR2 with IR0 the most significant bit of the opcode
  // (IR0 IR1 IR2 = 0 1 1 is SCANFB); any code with IR0 = 1 is BYPASS.
  function automatic instr_e decode_ir(input logic [2:0] ir);
    if (ir[0]) return I_BYPASS;
    unique case ({ir[1], ir[2]})
      2'b00:   return I_EXTEST;
      2'b01:   return I_INTEST;
      2'b10:   return I_SAMPLE;
      default: return I_SCANFB;
    endcase
  endfunction

  typedef struct packed {
    // boundary-scan register
    logic bpi_n;     // input cell drives PD from its latch when 1
    logic bpo_n;     // output cells drive SUM/CO from their latches when 1
    logic bsr_e1_n;  // capture/shift stage enable
    logic bsr_s;     // 1 shift, 0 capture
    logic bsr_e2_n;  // update stage enable
    // feedback register
    logic fm_n;      // 1: update stage loads the shift stage, 0: functional input
    logic fb_e1_n;
    logic fb_s;
    logic fb_e2_n;
    // bypass register
    logic bpr_s;
    // instruction register
    logic ir_e1_n;
    logic ir_s;
    logic ir_e2_n;
    logic ir_pre;    // force IR to BYPASS (Test-Logic-Reset)
    logic st;        // status bit captured into IR2 (enable line)
    // TDO
    logic shift_ir;
    logic shift_dr;
  } app1_ctl_t;

endpackage
