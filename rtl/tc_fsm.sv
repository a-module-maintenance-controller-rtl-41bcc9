// Test Channel controller (FSM: CRDEC, NSDEC, STATE, OL, POST_OL).
//
// A Moore machine with 23 valid states S0..S22 held in a 5-bit register PS, Si
// encoded as i; the 9 unused codes go to S0. TT low forces S0 from any state. From
// the idle state S0 the machine enters S1 when TT and FEN are both high; from S1 it
// starts the branch of the mode in CR[2:0] when FEN is high and SR3 is low:
//   DTUR/DTCR/PTUR  S2 S3 S4 {S5}* ... bits are shifted in S5/S6; after every
//                   SCTC (TxR emptied) the machine parks in S7 until the host has
//                   refilled TxR, cleared SR and re-enabled FEN, then S8 -> S4. SR3
//                   (TC expired) or FEN low leaves through S9 S10 to S1.
//   INS             S18, then the DTUR branch from S2 (one extra TMS=1 reaches the
//                   instruction path of the TAP controllers).
//   PTCR            S11 S12 S13 S14 {S15}* S16 S17 per pseudorandom vector, back to
//                   S11 until SR3 or FEN low.
//   RTEST           S19 until FEN low or SR3.
//   RSBUS           S20 (/RST asserted) until SR3, then S21, S1.
//   STBUS           S22 (STR shifted onto TMS) until SR3, then S1.
// The outputs are a function of the state only (Table of outputs in tc_ctl_t terms):
// FTMS is the TMS level of each state, chosen so that the slaves' TAP controllers
// walk Run-Test/Idle -> Select-DR -> Capture-DR -> Shift-DR -> Exit1 -> Update, with
// Pause-DR as the parking state while the host refills TxR.
// POST_OL forces every output inactive while TEST is high; PS is then the part
// scan_in -> PS0 -> ... -> PS4 -> scan_out of the scan chain.
//
// States, transitions and outputs follow the source design with one exception: in
// S6 FTMS is 1 (the source's output table gives 0) so that the last bit of a TxR
// load moves the slaves to Exit1-DR and they wait in Pause-DR instead of shifting
// while the host reloads TxR. The decision conditions use SR3 (sticky TC expiry)
// and SR2 (sticky SC expiry) from the status register as in the state diagrams.
module tc_fsm
  import tc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      softrs,    // soft reset: back to S0
  input  logic      test,
  input  logic      scan_in,
  output logic      scan_out,
  input  op_mode_e  mode,      // CR[2:0]
  input  logic      tt,        // CR5
  input  logic      fen,
  input  logic      sctc,      // SC terminal count
  input  logic      sr2,
  input  logic      sr3,
  output tc_ctl_t   ctl,       // after POST_OL
  output logic [4:0] ps,       // state register (observability pins)
  output logic [7:0] mode_dec  // CRDEC one-hot decode, bit i = mode i
);

  tc_state_e state, nstate;
  tc_ctl_t   ol;

  // CRDEC: 3-to-8 decoder
  always_comb begin
    mode_dec = '0;
    mode_dec[mode] = 1'b1;
  end

  // NSDEC
  always_comb begin
    nstate = S0;
    if (!tt) begin
      nstate = S0;
    end else begin
      unique case (state)
        S0:  nstate = fen ? S1 : S0;
        S1: begin
          if (fen && !sr3) begin
            unique case (mode)
              M_DTUR, M_DTCR, M_PTUR: nstate = S2;
              M_PTCR:                 nstate = S11;
              M_INS:                  nstate = S18;
              M_RTEST:                nstate = S19;
              M_STBUS:                nstate = S22;
              M_RSBUS:                nstate = S20;
            endcase
          end else begin
            nstate = S1;
          end
        end
        S2:  nstate = S3;
        S3:  nstate = S4;
        S4, S5: begin
          if (sr3 || !fen) nstate = S9;
          else if (sctc)   nstate = S6;
          else             nstate = S5;
        end
        S6:  nstate = S7;
        S7:  nstate = (fen && !sr2) ? S8 : S7;
        S8:  nstate = S4;
        S9:  nstate = S10;
        S10: nstate = S1;
        S11: nstate = (sr3 || !fen) ? S1 : S12;
        S12: nstate = S13;
        S13: nstate = S14;
        S14, S15: nstate = sctc ? S16 : S15;
        S16: nstate = S17;
        S17: nstate = S11;
        S18: nstate = S2;
        S19: nstate = (!fen || sr3) ? S1 : S19;
        S20: nstate = sr3 ? S21 : S20;
        S21: nstate = S1;
        S22: nstate = sr3 ? S1 : S22;
        default: nstate = S0;
      endcase
    end
  end

  // STATE register, scan cells PS0..PS4
  always_ff @(posedge clk or posedge rst) begin
    if (rst)         state <= S0;
    else if (test)   state <= tc_state_e'({state[3:0], scan_in});
    else if (softrs) state <= S0;
    else             state <= nstate;
  end

  assign ps       = state;
  assign scan_out = state[4];

  // OL: outputs of each state
  always_comb begin
    ol = '0;
    unique case (state)
      S0:  ol.ftms = 1'b1;
      S1:  ol.ftms = 1'b0;
      S2:  ol.ftms = 1'b1;
      S3:  ol.ftms = 1'b0;
      S4:  begin ol.ftms = 1'b0; ol.sc_load = 1'b1; end
      S5:  begin ol.ftms = 1'b0; ol.tc_dec = 1'b1; ol.sc_dec = 1'b1; ol.xr_shift = 1'b1; end
      S6:  begin ol.ftms = 1'b1; ol.tc_dec = 1'b1; ol.xr_shift = 1'b1; end
      S7:  ol.ftms = 1'b0;
      S8:  ol.ftms = 1'b1;
      S9:  begin ol.ftms = 1'b1; ol.xr_shift = 1'b1; end
      S10: ol.ftms = 1'b1;
      S11: ol.ftms = 1'b0;
      S12: ol.ftms = 1'b1;
      S13: ol.ftms = 1'b0;
      S14: begin ol.ftms = 1'b0; ol.sc_load = 1'b1; end
      S15: begin ol.ftms = 1'b0; ol.sc_dec = 1'b1; ol.xr_shift = 1'b1; end
      S16: begin ol.ftms = 1'b1; ol.xr_shift = 1'b1; end
      S17: begin ol.ftms = 1'b1; ol.tc_dec = 1'b1; end
      S18: ol.ftms = 1'b1;
      S19: begin ol.ftms = 1'b0; ol.tc_dec = 1'b1; end
      S20: begin ol.ftms = 1'b1; ol.tc_dec = 1'b1; ol.rst_req = 1'b1; end
      S21: ol.ftms = 1'b1;
      S22: begin ol.ftms = 1'b1; ol.str_shift = 1'b1; ol.tc_dec = 1'b1; end
      default: ol.ftms = 1'b1;
    endcase
  end

  // POST_OL: all outputs inactive in test mode
  assign ctl = test ? '0 : ol;

endmodule
