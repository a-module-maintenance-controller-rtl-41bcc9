// Testbench for tc_cr, the Test Channel command register.
//
// Writes random values and checks the fields: CR[2:0] the operation mode, CR3 the
// interrupt enable, CR4 EN1 (selects the second TMS line), CR5 TT (controller
// enable). Checks that the register holds without a write strobe, and that in scan
// mode it shifts CR0 -> CR5 -> scan out, one bit per CLK edge.
module tb_tc_cr;
  import tc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, test = 0, scan_in = 0, scan_out, wr = 0;
  logic [15:0] wdata = 0;
  op_mode_e mode;
  logic irq_en, en1, tt;
  logic [5:0] cr, m;

  tc_cr dut (.clk, .rst, .test, .scan_in, .scan_out, .wr, .wdata, .mode, .irq_en, .en1, .tt, .cr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what);
    checks++;
    if (cr !== m || mode !== op_mode_e'(m[2:0]) || irq_en !== m[3] || en1 !== m[4] ||
        tt !== m[5] || scan_out !== m[5]) begin
      failures++;
      $display("FAIL %s: cr=%b exp=%b mode=%0d", what, cr, m, mode);
    end
  endtask

  initial begin
    m = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cmp("reset");
    for (int i = 0; i < 200; i++) begin
      wdata = 16'($urandom);
      wr = ($urandom % 2) == 1;
      @(posedge clk);
      if (wr) m = wdata[5:0];
      #1 cmp("write/hold");
    end
    wr = 0;
    test = 1;
    for (int i = 0; i < 12; i++) begin
      scan_in = 1'($urandom);
      @(posedge clk);
      m = {m[4:0], scan_in};
      #1 cmp("scan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
