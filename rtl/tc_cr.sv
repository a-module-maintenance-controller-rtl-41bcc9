// Test Channel command register CR.
//
// Six bits written by the host at address 0: CR[2:0] select the operation mode
// (tc_pkg::op_mode_e), CR3 enables the interrupt request, CR4 selects TMS1 instead of
// TMS0, and CR5 is TT, the controller enable (the controller is held in its idle
// state S0 while TT is 0). A write takes the low six bits of the write data on the
// CLK edge at which the write strobe is high. With TEST high the register is part of
// the scan chain, shifting scan_in -> CR0 -> ... -> CR5 -> scan_out.
// Bit assignment and scan order follow the source design; the reset value 0 is
// this implementation's choice.
// Only PD[5:0] is stored; the upper write-data bits are ignored by design.
module tc_cr
  import tc_pkg::*;
#(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         test,
  input  logic         scan_in,
  output logic         scan_out,
  input  logic         wr,
  input  logic [15:0]  wdata,
  output op_mode_e     mode,
  output logic         irq_en,   // CR3
  output logic         en1,      // CR4
  output logic         tt,       // CR5
  output logic [W-1:0] cr
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       cr <= '0;
    else if (test) cr <= {cr[W-2:0], scan_in};
    else if (wr)   cr <= wdata[W-1:0];
  end

  assign mode     = op_mode_e'(cr[2:0]);
  assign irq_en   = cr[3];
  assign en1      = cr[4];
  assign tt       = cr[5];
  assign scan_out = cr[W-1];

endmodule
