// Testbench for tc_sr, the Test Channel status register.
//
// Each status bit is set by a one-cycle pulse on its set input (TCTC, SCTC, EV1,
// EV0 into SR3..SR0) and stays set until a clear. A set pulse is visible on the
// output in the same cycle (the bits behave as asynchronous presets), and a clear
// empties the register on the next CLK edge. In scan mode the set inputs are
// ignored and the register shifts SR0 -> SR3 -> scan out. The model follows these
// rules; random set/clear traffic is compared before every rising edge.
module tb_tc_sr;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, test = 0, scan_in = 0, clr = 0;
  logic [3:0] set = 0;
  logic scan_out;
  logic [3:0] sr, m;

  tc_sr dut (.clk, .rst, .test, .scan_in, .scan_out, .clr, .set, .sr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [3:0] exp, input string what);
    checks++;
    if (sr !== exp) begin
      failures++;
      $display("FAIL %s: sr=%b exp=%b", what, sr, exp);
    end
  endtask

  initial begin
    m = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cmp(4'b0000, "after reset");
    // each bit alone: visible at once, then held
    for (int b = 0; b < 4; b++) begin
      set = 4'(1 << b);
      #1 cmp(4'(1 << b), "set visible in same cycle");
      @(posedge clk); #1 set = 0;
      #1 cmp(4'(1 << b), "held after pulse");
      repeat (3) @(posedge clk);
      #1 cmp(4'(1 << b), "still held");
      clr = 1;
      @(posedge clk); #1 clr = 0;
      #1 cmp(4'b0000, "cleared");
    end
    // random traffic
    for (int i = 0; i < 300; i++) begin
      set = 4'($urandom) & 4'($urandom);
      clr = ($urandom % 8) == 0;
      #1 cmp(m | set, "random");
      @(posedge clk);
      m = clr ? 4'b0 : (m | set);
      #1;
    end
    // scan: shift a pattern through, set inputs masked
    set = 0; clr = 0;
    test = 1;
    for (int i = 0; i < 8; i++) begin
      scan_in = 1'(i[0] ^ i[1]);
      set = 4'b1111;
      @(posedge clk);
      m = {m[2:0], scan_in};
      #1;
      checks++;
      if (sr !== m || scan_out !== m[3]) begin
        failures++;
        $display("FAIL scan step %0d sr=%b exp=%b", i, sr, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
