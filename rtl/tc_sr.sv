// Test Channel status register SR.
//
// Four sticky flags: SR0 <- EV0, SR1 <- EV1 (event inputs from the chips under
// test), SR2 <- SCTC (TxR emptied), SR3 <- TCTC (TC expired). An input sets its flag
// as a preset would: the flag reads 1 in the same cycle the input is high and stays 1
// until the host clears the whole register (write to address 9) or the chip is reset.
// The host may read SR at any time.
// With TEST high the inputs are ignored and SR shifts as part of the scan chain:
// scan_in -> SR0 -> ... -> SR3 -> scan_out.
// Flag assignment, stickiness and scan behaviour follow the source design. The
// preset is modelled synchronously: the stored bit is set at the next CLK edge and
// the input is ORed onto the output meanwhile.
module tc_sr (
  input  logic       clk,
  input  logic       rst,
  input  logic       test,
  input  logic       scan_in,
  output logic       scan_out,
  input  logic       clr,
  input  logic [3:0] set,   // {TCTC, SCTC, EV1, EV0}
  output logic [3:0] sr
);

  logic [3:0] sr_q;
  logic [3:0] set_g;

  assign set_g = test ? 4'b0 : set;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       sr_q <= '0;
    else if (test) sr_q <= {sr_q[2:0], scan_in};
    else if (clr)  sr_q <= '0;
    else           sr_q <= sr_q | set_g;
  end

  assign sr       = sr_q | set_g;
  assign scan_out = sr_q[3];

endmodule
