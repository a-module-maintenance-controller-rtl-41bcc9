// Scan cell on a primary input of the Test Channel (BSCELL).
//
// A register whose input is d in normal mode and scan_in when t (TEST) is high,
// followed by a multiplexer: in normal mode q follows d directly, in scan mode q is
// the register, so the scan chain can both observe the pin and control what the
// logic behind it sees. The register samples on every rising CLK edge.
// The structure follows the source design; which pin it sits on is chosen at the
// Test Channel top.
module tc_bscell (
  input  logic clk,
  input  logic rst,
  input  logic t,
  input  logic d,
  input  logic scan_in,
  output logic q,
  output logic scan_out
);

  logic ff;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ff <= 1'b0;
    else     ff <= t ? scan_in : d;
  end

  assign q        = t ? ff : d;
  assign scan_out = ff;

endmodule
