// Test Channel host interface (HOST_IF: SYNDA, SYNWR, ADEC, SYNR).
//
// The host and the Test Channel run on unrelated clocks. A host write is captured on
// the rising edge of /WR while /CS is low: PA[3:0] and PD[15:0] go into a holding
// register (SYNDA) and a pending flag (SYNFF) is set. On the next rising edge of CLK
// the flag is copied into AEN, and AEN clears the flag, so AEN is a single CLK-wide
// pulse. While AEN is high the address decoder (ADEC) raises exactly one write strobe,
// selected by the held address as in the register map (0 CR, 1 CNR, 2 STR, 4 TC,
// 5 TxR, 6 RxR, 8 SYNR, 9 SR clear, 10 soft reset). A write therefore takes effect
// two CLK edges after /WR rises; the host must not issue the next write before then.
// SYNR holds FEN, the controller enable: writing 1 to address 8 sets it, writing 0
// clears it. OE = !/CS & !/RD enables the read-data drivers; reads are combinational
// and need no synchronisation.
//
// Scan: with TEST high AEN and FEN form the first two cells of the scan chain
// (scan_in -> AEN -> FEN -> scan_out) and every write strobe is suppressed, so that
// values shifted through AEN cannot cause writes.
//
// The SYNFF/AEN structure, the register map and the test-mode gating follow the
// source design. Capturing on the rising edge of /WR and the asynchronous reset are
// this implementation's reading of it.
module tc_host_if
  import tc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,       // chip reset, active high, asynchronous
  input  logic        test,      // scan mode
  input  logic        scan_in,
  output logic        scan_out,
  // host bus
  input  logic        ncs,
  input  logic        nwr,
  input  logic        nrd,
  input  logic [3:0]  pa,
  input  logic [15:0] pd_i,
  // to the core
  output tc_wr_t      wr,        // write strobes, one CLK wide
  output logic [15:0] wdata,     // data of the write being performed
  output logic        fen,       // controller enable from SYNR
  output logic        oe,        // read-data output enable
  output logic        aeng       // AEN gated by test mode (observability pin)
);

  logic        synff;
  logic        aen;
  logic [3:0]  pa_q;
  logic [15:0] pd_q;
  logic        syn_clr;

  assign syn_clr = rst | aen;

  // SYNDA: hold address and data of a host write
  always_ff @(posedge nwr or posedge rst) begin
    if (rst) begin
      pa_q <= '0;
      pd_q <= '0;
    end else if (!ncs) begin
      pa_q <= pa;
      pd_q <= pd_i;
    end
  end

  // SYNFF: write pending, cleared as soon as AEN has been issued
  always_ff @(posedge nwr or posedge syn_clr) begin
    if (syn_clr) synff <= 1'b0;
    else         synff <= ~ncs;
  end

  // AEN (scan cell 1) and SYNR/FEN (scan cell 2)
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      aen <= 1'b0;
      fen <= 1'b0;
    end else if (test) begin
      aen <= scan_in;
      fen <= aen;
    end else begin
      aen <= synff;
      if (wr.synr) fen <= pd_q[0];
    end
  end

  assign aeng     = aen & ~test;
  assign scan_out = fen;
  assign wdata    = pd_q;
  assign oe       = ~ncs & ~nrd;

  // ADEC
  always_comb begin
    wr        = '0;
    wr.cr     = aeng && (pa_q == A_CR);
    wr.cnr    = aeng && (pa_q == A_CNR);
    wr.str    = aeng && (pa_q == A_STR);
    wr.tc     = aeng && (pa_q == A_TC);
    wr.txr    = aeng && (pa_q == A_TXR);
    wr.rxr    = aeng && (pa_q == A_RXR);
    wr.synr   = aeng && (pa_q == A_SYNR);
    wr.srclr  = aeng && (pa_q == A_SRCLR);
    wr.softrs = aeng && (pa_q == A_SOFTRS);
  end

endmodule
