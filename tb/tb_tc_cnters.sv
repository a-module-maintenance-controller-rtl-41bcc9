// Testbench for tc_cnters, the Test Channel counters TC, SC and CNR.
//
// Checks the counting rules the controller relies on: CNR is written by the host
// and loaded into SC; SC counts down and its terminal count SCTC marks the
// (CNR+1)-th decrement, so a chunk is CNR+2 bits long once the controller's extra
// shift is added; TC counts down and TCTC marks the (TC+1)-th decrement. The
// decrement enables are driven at random so that the cycle on which each terminal
// count appears is checked against a count of decrements, not of clock cycles.
// Also checks the CNR scan path.
module tb_tc_cnters;
  int checks = 0, failures = 0;
  localparam int TC_W = 12, SC_W = 4;
  logic clk = 0, rst = 1, test = 0, scan_in = 0, scan_out;
  logic cnr_wr = 0, tc_wr = 0, sc_load = 0, sc_dec = 0, tc_dec = 0;
  logic [15:0] wdata = 0;
  logic sctc, tctc;
  logic [TC_W-1:0] tc;
  logic [SC_W-1:0] sc, cnr;

  tc_cnters #(.TC_W(TC_W), .SC_W(SC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (tc=%0d sc=%0d cnr=%0d)", what, tc, sc, cnr);
    end
  endtask

  initial begin
    int n, k, v;
    logic [SC_W-1:0] sm;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // SC: load from CNR, count decrements until SCTC
    for (int r = 0; r < 20; r++) begin
      v = (r < 16) ? r : $urandom % 16;
      wdata = 16'(v) | 16'hFFF0;
      cnr_wr = 1; @(posedge clk); #1 cnr_wr = 0;
      chk(cnr == SC_W'(v), "CNR write keeps low 4 bits");
      sc_load = 1; @(posedge clk); #1 sc_load = 0;
      chk(sc == SC_W'(v), "SC loaded from CNR");
      n = 0;
      forever begin
        sc_dec = ($urandom % 3) != 0;
        #1;
        if (sc_dec) begin
          n++;
          if (sctc) break;
        end else chk(!sctc, "no SCTC without decrement");
        @(posedge clk); #1;
      end
      chk(n == v + 1, $sformatf("SCTC on decrement %0d for CNR=%0d", n, v));
      @(posedge clk); #1 sc_dec = 0;
    end
    // TC: write, count decrements until TCTC
    for (int r = 0; r < 12; r++) begin
      v = (r < 4) ? r : $urandom % 300;
      wdata = 16'(v) | 16'hF000;
      tc_wr = 1; @(posedge clk); #1 tc_wr = 0;
      chk(tc == TC_W'(v), "TC write keeps low 12 bits");
      n = 0;
      forever begin
        tc_dec = ($urandom % 4) != 0;
        #1;
        if (tc_dec) begin
          n++;
          if (tctc) break;
        end else chk(!tctc, "no TCTC without decrement");
        @(posedge clk); #1;
      end
      chk(n == v + 1, $sformatf("TCTC on decrement %0d for TC=%0d", n, v));
      @(posedge clk); #1 tc_dec = 0;
    end
    // write has priority over decrement
    wdata = 16'd77; tc_wr = 1; tc_dec = 1; @(posedge clk); #1 tc_wr = 0; tc_dec = 0;
    chk(tc == 12'd77, "TC write over decrement");
    // CNR scan path
    test = 1;
    sm = cnr;
    for (k = 0; k < 8; k++) begin
      scan_in = 1'($urandom);
      @(posedge clk);
      sm = {sm[SC_W-2:0], scan_in};
      #1 chk(cnr == sm && scan_out == sm[SC_W-1], "CNR scan shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
