// Testbench for tc_tmsbl, the TMS and /RST output block of the Test Channel.
//
// Checks that the TMS value (the controller's FTMS, or in STBUS mode the top bit
// of STR) goes to TMS0 or TMS1 according to EN1 while the other line stays low;
// that STR, written by the host, plays its bits most significant first, one per
// shift cycle, so a 6-bit sequence takes exactly 6 cycles; that /RST is the
// inverse of the controller's reset request; and that STR shifts in scan mode.
module tb_tc_tmsbl;
  int checks = 0, failures = 0;
  localparam int STR_W = 6;
  logic clk = 0, rst = 1, test = 0, scan_in = 0, scan_out;
  logic str_wr = 0, str_shift = 0, stbus = 0, ftms = 0, en1 = 0, rst_req = 0;
  logic [15:0] wdata = 0;
  logic tms0, tms1, nrst;
  logic [STR_W-1:0] str, sm;

  tc_tmsbl #(.STR_W(STR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (str=%b tms0=%0d tms1=%0d nrst=%0d)", what, str, tms0, tms1, nrst);
    end
  endtask

  initial begin
    logic [STR_W-1:0] pat;
    logic exp;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // routing of FTMS and /RST
    for (int i = 0; i < 64; i++) begin
      {ftms, en1, rst_req} = 3'(i);
      stbus = 0;
      #1;
      chk(tms0 == (en1 ? 1'b0 : ftms) && tms1 == (en1 ? ftms : 1'b0), "FTMS routing");
      chk(nrst == ~rst_req, "/RST");
    end
    // STR sequences on both lines
    for (int r = 0; r < 10; r++) begin
      pat = STR_W'($urandom);
      en1 = r[0];
      wdata = {10'h3FF, pat};
      str_wr = 1; @(posedge clk); #1 str_wr = 0;
      chk(str == pat, "STR write");
      stbus = 1; ftms = 1;
      for (int k = 0; k < STR_W; k++) begin
        str_shift = 1;
        #1;
        exp = pat[STR_W-1-k];
        chk((en1 ? tms1 : tms0) == exp && (en1 ? tms0 : tms1) == 1'b0,
            $sformatf("STR bit %0d on TMS", k));
        @(posedge clk); #1;
      end
      str_shift = 0;
      #1 chk(str == '0, "STR empty after STR_W shifts");
      stbus = 0;
    end
    // scan
    test = 1;
    sm = str;
    for (int k = 0; k < 10; k++) begin
      scan_in = 1'($urandom);
      @(posedge clk);
      sm = {sm[STR_W-2:0], scan_in};
      #1 chk(str == sm && scan_out == sm[STR_W-1], "STR scan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
