// Test Channel chip.
//
// The Test Channel lets a host processor test IEEE 1149.1 boundary-scan chips with a
// handful of register writes. The host loads the command register CR, the counters
// TC and CNR, the data register TxR (and STR for TMS sequences) through a 16-bit
// asynchronous register port, then sets FEN; the controller then runs the test bus
// on its own clock: it walks the slaves' TAP controllers with TMS, shifts TxR out on
// TDO, collects TDI into RxR (uncompacted, or compacted as a signature), generates
// pseudorandom vectors, pulses /RST, or plays the STR sequence on TMS, according to
// the mode in CR[2:0]. Progress is reported in the status register SR (and on IRQ);
// the host reads SR and RxR at any time: read address bit PA1 = 0 returns
// {RxR[15:4], SR}, PA1 = 1 returns RxR.
//
// Blocks: HOST_IF (tc_host_if), CR (tc_cr), FSM (tc_fsm), CNTERS (tc_cnters),
// TMSBL (tc_tmsbl), XR2 (tc_xr2), SR (tc_sr), interrupt circuit (tc_irq), CIRC
// (tc_circ), M8X4 (tc_m8x4) and one scan cell (tc_bscell) on TDI.
//
// Scan: TEST high turns every scan register into one 60-cell chain from SI to SO,
// in the order AEN, FEN, CR0-5, PS0-4, CNR0-3, STR0-5, BSCCELL, SR0-3, TxR0-15,
// RxR0-15; all controller outputs and register writes are suppressed meanwhile.
//
// Timing: one clock CLK. A host write takes effect two CLK edges after /WR rises.
// TDO changes on the falling edge of CLK; TMS, /RST and TDI sampling use the rising
// edge. Everything except the read-port multiplexer selection (PA1) and the TDI scan
// cell placement follows the source design; those two are this implementation's
// choices. PD is split into pd_i/pd_o with pd_oe as its output enable.
// Register copies such as cr, cnr, str, tc, sc and txr, the unused decoded mode
// lines and the SYNR write strobe (FEN is set inside the host interface) come out of
// the sub-blocks for observation only; a linter reports them as unused signals.
module test_channel
  import tc_pkg::*;
#(
  parameter int unsigned TC_W  = 12,
  parameter int unsigned SC_W  = 4,
  parameter int unsigned STR_W = 6
) (
  input  logic        clk,
  input  logic        reset,
  // host port
  input  logic        ncs,
  input  logic        nwr,
  input  logic        nrd,
  input  logic [3:0]  pa,
  input  logic [15:0] pd_i,
  output logic [15:0] pd_o,
  output logic        pd_oe,
  output logic        irq,
  // test bus
  output logic        tdo,
  input  logic        tdi,
  output logic        tms0,
  output logic        tms1,
  output logic        nrst,
  input  logic        ev0,
  input  logic        ev1,
  // scan
  input  logic        test,
  input  logic        si,
  output logic        so,
  // observability pins
  output logic        aeng,
  output logic [4:0]  ps,
  output logic        dtur,
  output logic        sctc,
  output logic        sr3,
  output logic        sr2
);

  tc_wr_t      wr;
  logic [15:0] wdata;
  logic        fen, oe;
  op_mode_e    mode;
  logic        irq_en, en1, tt;
  logic [5:0]  cr;
  tc_ctl_t     ctl;
  logic [7:0]  mode_dec;
  logic        tctc;
  logic [TC_W-1:0]  tc;
  logic [SC_W-1:0]  sc, cnr;
  logic [STR_W-1:0] str;
  localparam int unsigned XR_W = 16;  // width of the host data bus
  logic [XR_W-1:0]  txr, rxr;
  logic        txr_so, tdi_int;
  logic [3:0]  sr;
  logic [3:0]  rd_lo;
  // scan chain links
  logic s_hif, s_cr, s_ps, s_cnr, s_str, s_bsc, s_sr;

  tc_host_if u_host_if (
    .clk, .rst(reset), .test, .scan_in(si), .scan_out(s_hif),
    .ncs, .nwr, .nrd, .pa, .pd_i, .wr, .wdata, .fen, .oe, .aeng
  );

  tc_cr u_cr (
    .clk, .rst(reset), .test, .scan_in(s_hif), .scan_out(s_cr),
    .wr(wr.cr), .wdata, .mode, .irq_en, .en1, .tt, .cr
  );

  tc_fsm u_fsm (
    .clk, .rst(reset), .softrs(wr.softrs), .test, .scan_in(s_cr), .scan_out(s_ps),
    .mode, .tt, .fen, .sctc, .sr2(sr[2]), .sr3(sr[3]), .ctl, .ps, .mode_dec
  );

  tc_cnters #(.TC_W(TC_W), .SC_W(SC_W)) u_cnters (
    .clk, .rst(reset), .test, .scan_in(s_ps), .scan_out(s_cnr),
    .cnr_wr(wr.cnr), .tc_wr(wr.tc), .wdata,
    .sc_load(ctl.sc_load), .sc_dec(ctl.sc_dec), .tc_dec(ctl.tc_dec),
    .sctc, .tctc, .tc, .sc, .cnr
  );

  tc_tmsbl #(.STR_W(STR_W)) u_tmsbl (
    .clk, .rst(reset), .test, .scan_in(s_cnr), .scan_out(s_str),
    .str_wr(wr.str), .wdata, .str_shift(ctl.str_shift),
    .stbus(mode_dec[M_STBUS]), .ftms(ctl.ftms), .en1, .rst_req(ctl.rst_req),
    .tms0, .tms1, .nrst, .str
  );

  tc_bscell u_bscell (
    .clk, .rst(reset), .t(test), .d(tdi), .scan_in(s_str), .q(tdi_int), .scan_out(s_bsc)
  );

  tc_sr u_sr (
    .clk, .rst(reset), .test, .scan_in(s_bsc), .scan_out(s_sr),
    .clr(wr.srclr | wr.softrs), .set({tctc, sctc, ev1, ev0}), .sr
  );

  tc_xr2 #(.W(XR_W)) u_xr2 (
    .clk, .rst(reset), .clr(wr.softrs), .test, .scan_in(s_sr), .scan_out(so),
    .txr_wr(wr.txr), .rxr_wr(wr.rxr), .wdata, .shift(ctl.xr_shift),
    .tpg(mode_dec[M_PTUR] | mode_dec[M_PTCR]),
    .sa(mode_dec[M_DTCR] | mode_dec[M_PTCR]),
    .sin(tdi_int), .txr_so, .txr, .rxr
  );

  tc_irq u_irq (
    .test, .sr3(sr[3]), .ev0, .ev1, .irq_en, .irq
  );

  tc_circ u_circ (
    .clk, .rst(reset), .d0(txr_so), .d1(tdi_int), .sel(mode_dec[M_PTUR]), .tdo
  );

  tc_m8x4 u_m8x4 (
    .s(pa[1]), .a(sr), .b(rxr[3:0]), .q(rd_lo)
  );

  assign pd_o  = {rxr[XR_W-1:4], rd_lo};
  assign pd_oe = oe;
  assign dtur  = mode_dec[M_DTUR];
  assign sr3   = sr[3];
  assign sr2   = sr[2];

endmodule
