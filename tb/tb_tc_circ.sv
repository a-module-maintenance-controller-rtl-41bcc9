// Testbench for tc_circ, the TDO output circuit of the Test Channel.
//
// TDO is a falling-edge register. With SEL low it passes the TxR serial output
// (D0) with a half-cycle delay; with SEL high (pseudorandom-uncompacted mode) it
// returns the TDI stream (D1) one full CLK cycle later, so the test data loops back.
// Random D0, D1 and SEL change after each rising edge; the model keeps the last
// two falling-edge samples of D1 and is compared with TDO just before each rising
// edge.
module tb_tc_circ;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, d0 = 0, d1 = 0, sel = 0;
  logic tdo;
  logic d1_m, tdo_m;

  tc_circ dut (.clk, .rst, .d0, .d1, .sel, .tdo);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst) begin
      tdo_m <= sel ? d1_m : d0;
      d1_m  <= d1;
    end
  end

  initial begin
    d1_m = 0; tdo_m = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      #1;
      d0 = 1'($urandom); d1 = 1'($urandom);
      if (i % 40 == 0) sel = ~sel;
      @(posedge clk);
      #0;
      checks++;
      if (tdo !== tdo_m) begin
        failures++;
        $display("FAIL cycle %0d sel=%0d tdo=%0d exp=%0d", i, sel, tdo, tdo_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
