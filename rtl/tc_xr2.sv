// Test Channel data registers (XR2: TxR and RxR).
//
// TxR holds the data going out on TDO, RxR collects the data coming in on TDI. Both
// are W-bit registers that move one place towards the most significant bit in each
// cycle with shift high: TxR's serial output is its bit W-1, and TDI enters RxR at
// bit 0, so after W shifts RxR[W-1] holds the first bit received. Modes:
//   TxR  LOAD (host write, address 5), SHIFT (0 enters bit 0), TPG, HOLD, CLEAR
//   RxR  LOAD (host write, address 6), SHIFT, SA, HOLD, CLEAR
// In TPG mode TxR is a maximal-length LFSR, in SA mode RxR is a serial signature
// analyser, both with f(x) = x^16 + x^5 + x^3 + x^2 + 1 in internal-XOR form: the bit
// leaving bit W-1 (for SA: XORed with the serial input) is fed back into the taps of
// POLY. TPG needs a non-zero seed. CLEAR (clr) zeroes both registers.
// TPG is used in PTUR and PTCR, SA in DTCR and PTCR (tpg/sa inputs).
// Scan: scan_in -> TxR0 .. TxR15 -> RxR0 .. RxR15 -> scan_out, reusing the shift path.
// Register lengths, modes, polynomial and scan order follow the source design; the
// internal-XOR form and the zero shifted into TxR are this implementation's choices.
module tc_xr2
  import tc_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter logic [W-1:0] POLY = W'(LFSR_POLY)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         test,
  input  logic         scan_in,
  output logic         scan_out,
  input  logic         txr_wr,
  input  logic         rxr_wr,
  input  logic [15:0]  wdata,
  input  logic         shift,
  input  logic         tpg,
  input  logic         sa,
  input  logic         sin,     // serial input from TDI
  output logic         txr_so,  // serial output towards TDO
  output logic [W-1:0] txr,
  output logic [W-1:0] rxr
);

  logic fb_sa;
  assign fb_sa = rxr[W-1] ^ sin;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         txr <= '0;
    else if (test)   txr <= {txr[W-2:0], scan_in};
    else if (clr)    txr <= '0;
    else if (txr_wr) txr <= wdata[W-1:0];
    else if (shift) begin
      if (tpg) txr <= {txr[W-2:0], 1'b0} ^ (txr[W-1] ? POLY : '0);
      else     txr <= {txr[W-2:0], 1'b0};
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         rxr <= '0;
    else if (test)   rxr <= {rxr[W-2:0], txr[W-1]};
    else if (clr)    rxr <= '0;
    else if (rxr_wr) rxr <= wdata[W-1:0];
    else if (shift) begin
      if (sa) rxr <= {rxr[W-2:0], 1'b0} ^ (fb_sa ? POLY : '0);
      else    rxr <= {rxr[W-2:0], sin};
    end
  end

  assign txr_so   = txr[W-1];
  assign scan_out = rxr[W-1];

endmodule
