// App1 boundary-scan test chip.
//
// An IEEE 1149.1 chip whose function is a one-bit full adder with a two-bit
// feedback register, used as the device under test of the Test Channel. It has four
// separately scannable registers: the instruction register (3 bits), the
// boundary-scan register (3 cells on DIN, SUM and CO), the feedback register
// (2 bits) and the bypass register (1 bit). Instructions (IR0 IR1 IR2): 000 EXTEST,
// 001 INTEST, 010 SAMPLE, 011 SCANFB, 1xx BYPASS; Test-Logic-Reset selects BYPASS.
// Many internal nodes are brought out for observability: the TAP state bits A..D,
// the decoded instruction, PD, PSUM, PCO, NSUM and NCO.
// Timing: TDI and TMS are sampled on the rising edge of CLK, TDO changes on the
// falling edge and carries the serial output of the selected register in Shift-IR
// and Shift-DR; elsewhere it is held at 1 (the two-state stand-in for a released
// line). Blocks: app1_tap (APST/APNS), app1_ir, app1_apol, app1_core.
// The architecture follows the source design; the TDO level outside the shift
// states is this implementation's choice.
module app1
  import app1_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic ntrst,
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  input  logic din,
  output logic sum,
  output logic co,
  // observability pins
  output logic pd,
  output logic psum,
  output logic pco,
  output logic nsum,
  output logic nco,
  output logic a,
  output logic b,
  output logic c,
  output logic d,
  output logic extest,
  output logic intest,
  output logic sample,
  output logic scanfb,
  output logic bypass
);

  tap_state_e state;
  logic [2:0] ir;
  app1_ctl_t  ctl;
  logic       so_ir, so_bsr, so_fb, so_bpr, so_dr;
  instr_e     ins;

  app1_tap u_tap (.clk, .reset, .ntrst, .tms, .state);

  app1_ir u_ir (
    .clk, .reset, .pre(ctl.ir_pre), .si(tdi), .e1_n(ctl.ir_e1_n), .s(ctl.ir_s),
    .e2_n(ctl.ir_e2_n), .st(ctl.st), .so(so_ir), .ir
  );

  app1_apol u_apol (.state, .ir, .ctl);

  app1_core u_core (
    .clk, .reset, .ctl, .tdi, .din, .sum, .co, .pd, .psum, .pco, .nsum, .nco,
    .so_bsr, .so_fb, .so_bpr
  );

  assign ins = decode_ir(ir);

  always_comb begin
    unique case (ins)
      I_SCANFB: so_dr = so_fb;
      I_BYPASS: so_dr = so_bpr;
      default:  so_dr = so_bsr;
    endcase
  end

  always_ff @(negedge clk or posedge reset) begin
    if (reset)             tdo <= 1'b1;
    else if (ctl.shift_ir) tdo <= so_ir;
    else if (ctl.shift_dr) tdo <= so_dr;
    else                   tdo <= 1'b1;
  end

  assign {d, c, b, a} = state;
  assign extest = (ins == I_EXTEST);
  assign intest = (ins == I_INTEST);
  assign sample = (ins == I_SAMPLE);
  assign scanfb = (ins == I_SCANFB);
  assign bypass = (ins == I_BYPASS);

endmodule
