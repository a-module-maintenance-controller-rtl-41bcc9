// Test Channel test-bus control block (TMSBL with STR).
//
// Drives the three control lines of the test bus. /RST is low for as long as the
// controller asks for a bus reset (RSBUS mode). One of the two TMS lines is active:
// TMS1 when CR4 (en1) is set, TMS0 otherwise; the inactive line is held low, which
// keeps its slaves in a stable TAP state. The active line carries the controller's
// FTMS, except in STBUS mode, where it carries bit 5 of STR. STR is a STR_W-bit
// register written by the host (address 2); each cycle with str_shift moves it one
// place towards bit 5 (zero enters bit 0), so the host can play an arbitrary 6-bit
// TMS sequence, bit 5 first. TMS lines change right after the rising CLK edge and
// are sampled by the slaves at the next one.
// STR is in the scan chain: scan_in -> STR0 -> ... -> STR5 -> scan_out.
// The line selection, the STR source of TMS in STBUS and /RST follow the source
// design; the low level of the inactive TMS line and the zero shifted into STR are
// choices of this implementation.
// Only PD[5:0] loads STR; the upper write-data bits are ignored by design.
module tc_tmsbl #(
  parameter int unsigned STR_W = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             test,
  input  logic             scan_in,
  output logic             scan_out,
  input  logic             str_wr,
  input  logic [15:0]      wdata,
  input  logic             str_shift,
  input  logic             stbus,     // CR[2:0] = STBUS
  input  logic             ftms,
  input  logic             en1,       // CR4
  input  logic             rst_req,
  output logic             tms0,
  output logic             tms1,
  output logic             nrst,
  output logic [STR_W-1:0] str
);

  logic tms_sel;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)            str <= '0;
    else if (test)      str <= {str[STR_W-2:0], scan_in};
    else if (str_wr)    str <= wdata[STR_W-1:0];
    else if (str_shift) str <= {str[STR_W-2:0], 1'b0};
  end

  assign tms_sel  = stbus ? str[STR_W-1] : ftms;
  assign tms0     = en1 ? 1'b0 : tms_sel;
  assign tms1     = en1 ? tms_sel : 1'b0;
  assign nrst     = ~rst_req;
  assign scan_out = str[STR_W-1];

endmodule
