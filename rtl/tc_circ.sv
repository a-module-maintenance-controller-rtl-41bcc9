// Test Channel TDO driver (CIRC).
//
// TDO is re-timed to the falling edge of CLK, so the slaves, which sample TDI on the
// rising edge, see a settled bit. With sel low TDO carries d0, the serial output of
// TxR; with sel high (PTUR mode) it carries d1, TDI, after one falling-edge register
// stage, so data read from the slaves is sent back to them one CLK cycle later and
// their scan chains keep their contents while being read.
// Structure (falling-edge register on d1, 2:1 multiplexer, falling-edge output
// register) follows the source design. The source text names RxR as the other data
// source; this implementation takes TxR, which is the register the same text says is
// shifted out to TDO.
module tc_circ (
  input  logic clk,
  input  logic rst,
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic tdo
);

  logic d1_q;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      d1_q <= 1'b0;
      tdo  <= 1'b0;
    end else begin
      d1_q <= d1;
      tdo  <= sel ? d1_q : d0;
    end
  end

endmodule
