// App1 TAP controller (APST state register + APNS next-state logic).
//
// The 16-state IEEE 1149.1 TAP controller. APST is a four-bit register D,C,B,A
// clocked by the rising edge of CLK; it is preset to Test-Logic-Reset (1111) while
// /TRST is low or RESET is high. APNS computes the next state from the state and
// TMS following the state diagram of the standard. The state bits are brought out
// as the observability pins A, B, C, D.
// Register, encoding and preset follow the source design; driving the preset from
// both /TRST and RESET is this implementation's choice.
module app1_tap
  import app1_pkg::*;
(
  input  logic       clk,
  input  logic       reset,   // active high
  input  logic       ntrst,   // active low
  input  logic       tms,
  output tap_state_e state
);

  tap_state_e nstate;
  logic       pre;

  assign pre = reset | ~ntrst;

  always_comb begin
    unique case (state)
      TLR:        nstate = tms ? TLR        : RUN_IDLE;
      RUN_IDLE:   nstate = tms ? SELECT_DR  : RUN_IDLE;
      SELECT_DR:  nstate = tms ? SELECT_IR  : CAPTURE_DR;
      CAPTURE_DR: nstate = tms ? EXIT1_DR   : SHIFT_DR;
      SHIFT_DR:   nstate = tms ? EXIT1_DR   : SHIFT_DR;
      EXIT1_DR:   nstate = tms ? UPDATE_DR  : PAUSE_DR;
      PAUSE_DR:   nstate = tms ? EXIT2_DR   : PAUSE_DR;
      EXIT2_DR:   nstate = tms ? UPDATE_DR  : SHIFT_DR;
      UPDATE_DR:  nstate = tms ? SELECT_DR  : RUN_IDLE;
      SELECT_IR:  nstate = tms ? TLR        : CAPTURE_IR;
      CAPTURE_IR: nstate = tms ? EXIT1_IR   : SHIFT_IR;
      SHIFT_IR:   nstate = tms ? EXIT1_IR   : SHIFT_IR;
      EXIT1_IR:   nstate = tms ? UPDATE_IR  : PAUSE_IR;
      PAUSE_IR:   nstate = tms ? EXIT2_IR   : PAUSE_IR;
      EXIT2_IR:   nstate = tms ? UPDATE_IR  : SHIFT_IR;
      UPDATE_IR:  nstate = tms ? SELECT_DR  : RUN_IDLE;
      default:    nstate = TLR;
    endcase
  end

  always_ff @(posedge clk or posedge pre) begin
    if (pre) state <= TLR;
    else     state <= nstate;
  end

endmodule
