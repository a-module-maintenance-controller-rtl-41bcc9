// Test Channel counters (CNTERS: CNR, SC, TC).
//
// TC is a TC_W-bit down counter written directly by the host (address 4, write data
// bits TC_W-1:0); it counts down by one in every cycle in which the controller
// raises tc_dec. SC is an SC_W-bit down counter loaded from CNR when the controller
// raises sc_load and decremented on sc_dec. CNR (address 1) keeps SC's start value so
// that SC can be reloaded without the host. Both counters wrap below zero.
// The terminal-count outputs are the borrow outputs of the counters: TCTC is high in
// a cycle in which TC is 0 and is being decremented, SCTC likewise for SC. With this
// timing a TC start value of s-2 in the DTUR branch shifts exactly s bits, t-1 in
// PTCR/RTEST gives t vectors/cycles and s-1 in STBUS/RSBUS s cycles, and a CNR of 14
// empties the 16-bit TxR exactly.
// CNR is in the scan chain (scan_in -> CNR0 -> ... -> CNR3 -> scan_out); TC and SC
// are not, and hold while TEST is high because the controller outputs are then off.
// Widths (12 and 4 bits) and the reload scheme follow the source design; the
// borrow-style terminal count is this implementation's reading of its counter cells.
// Only the low 12 bits of the write data load TC (4 bits for CNR); the upper bits
// are ignored by design.
module tc_cnters #(
  parameter int unsigned TC_W = 12,
  parameter int unsigned SC_W = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            test,
  input  logic            scan_in,
  output logic            scan_out,
  input  logic            cnr_wr,
  input  logic            tc_wr,
  input  logic [15:0]     wdata,
  input  logic            sc_load,
  input  logic            sc_dec,
  input  logic            tc_dec,
  output logic            sctc,
  output logic            tctc,
  output logic [TC_W-1:0] tc,
  output logic [SC_W-1:0] sc,
  output logic [SC_W-1:0] cnr
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         cnr <= '0;
    else if (test)   cnr <= {cnr[SC_W-2:0], scan_in};
    else if (cnr_wr) cnr <= wdata[SC_W-1:0];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          sc <= '0;
    else if (sc_load) sc <= cnr;
    else if (sc_dec)  sc <= sc - 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst)         tc <= '0;
    else if (tc_wr)  tc <= wdata[TC_W-1:0];
    else if (tc_dec) tc <= tc - 1'b1;
  end

  assign sctc     = sc_dec && (sc == '0);
  assign tctc     = tc_dec && (tc == '0);
  assign scan_out = cnr[SC_W-1];

endmodule
