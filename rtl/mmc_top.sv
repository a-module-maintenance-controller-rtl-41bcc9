// Module maintenance controller prototype: host adapter, Test Channel and one
// boundary-scan slave.
//
// A host with an 8-bit I/O bus drives the Test Channel through the 8-to-16-bit bus
// adapter; the Test Channel is the master of a module's IEEE 1149.1 test bus, and
// App1 is the boundary-scan chip on that bus. The ring is closed on the board:
// Test Channel TDO -> App1 TDI, App1 TDO -> Test Channel TDI, TMS0 -> App1 TMS,
// /RST -> App1 /TRST; the second TMS line (TMS1), the Test Channel's event inputs,
// its interrupt and its internal-scan pins are brought out, as are App1's functional
// pin DIN, its outputs SUM and CO and its observability pins. One clock CLK runs
// both chips; the host's /POR resets both.
// Interface timing: the host bus is asynchronous (see bus_adapter); a 16-bit register
// write is two byte writes, high byte to address F first. The connections follow the
// source design; running App1 from the same CLK and /POR is this implementation's
// choice.
// The Test Channel's PD output enable is unused: the bus adapter reads the 16-bit
// read data whenever it latches a read. TCK is CLK itself, so that output follows an
// input directly.
module mmc_top
  import app1_pkg::*;
#(
  parameter int unsigned TC_W  = 12,
  parameter int unsigned SC_W  = 4,
  parameter int unsigned STR_W = 6
) (
  input  logic       clk,
  // host I/O bus
  input  logic       npor,
  input  logic [3:0] ha,
  input  logic [7:0] hd_i,
  output logic [7:0] hd_o,
  output logic       hd_oe,
  input  logic       npior,
  input  logic       npiow,
  output logic       irq,
  // Test Channel pins not used by the ring
  input  logic       ev0,
  input  logic       ev1,
  output logic       tms1,
  input  logic       test,
  input  logic       si,
  output logic       so,
  output logic       aeng,
  output logic [4:0] ps,
  output logic       dtur,
  output logic       sctc,
  output logic       sr3,
  output logic       sr2,
  // test bus, observable
  output logic       tck,
  output logic       tdo_tc,
  output logic       tdo_app,
  output logic       tms0,
  output logic       nrst,
  // App1 functional and observability pins
  input  logic       din,
  output logic       sum,
  output logic       co,
  output logic       pd,
  output logic       psum,
  output logic       pco,
  output logic       nsum,
  output logic       nco,
  output logic [3:0] tap_dcba,
  output logic [4:0] instr      // {BYPASS, SCANFB, SAMPLE, INTEST, EXTEST}
);

  logic [3:0]  tc_pa;
  logic [15:0] tc_pd_o, tc_pd_i;
  logic        tc_ncs, tc_nrd, tc_nwr, reset, pd_oe;

  bus_adapter u_adapter (
    .npor, .ha, .hd_i, .hd_o, .hd_oe, .npior, .npiow,
    .tc_pa, .tc_pd_o, .tc_pd_i, .tc_ncs, .tc_nrd, .tc_nwr, .tc_reset(reset)
  );

  test_channel #(.TC_W(TC_W), .SC_W(SC_W), .STR_W(STR_W)) u_tc (
    .clk, .reset, .ncs(tc_ncs), .nwr(tc_nwr), .nrd(tc_nrd), .pa(tc_pa),
    .pd_i(tc_pd_o), .pd_o(tc_pd_i), .pd_oe, .irq, .tdo(tdo_tc), .tdi(tdo_app),
    .tms0, .tms1, .nrst, .ev0, .ev1, .test, .si, .so, .aeng, .ps, .dtur, .sctc,
    .sr3, .sr2
  );

  app1 u_app1 (
    .clk, .reset, .ntrst(nrst), .tms(tms0), .tdi(tdo_tc), .tdo(tdo_app),
    .din, .sum, .co, .pd, .psum, .pco, .nsum, .nco,
    .a(tap_dcba[0]), .b(tap_dcba[1]), .c(tap_dcba[2]), .d(tap_dcba[3]),
    .extest(instr[0]), .intest(instr[1]), .sample(instr[2]), .scanfb(instr[3]),
    .bypass(instr[4])
  );

  assign tck = clk;

endmodule
