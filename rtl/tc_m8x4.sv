// Test Channel read multiplexer (M8X4).
//
// Four 2:1 multiplexers: q = s ? b : a. In the Test Channel a is SR and b the low
// four bits of RxR; the upper twelve bits of the read data always come from RxR.
// The structure follows the source design; the width is a parameter.
module tc_m8x4 #(
  parameter int unsigned W = 4
) (
  input  logic         s,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);
  assign q = s ? b : a;
endmodule
