// Testbench for tc_bscell, the scan cell on the Test Channel's TDI input.
//
// Drives random values on T (scan mode), D (the pin) and the scan input for 300
// cycles and checks against a one-register model: with T low the cell is
// transparent (Q = D) and captures D; with T high Q shows the register, which
// shifts the scan input. Checked just before each rising CLK edge.
module tb_tc_bscell;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, t = 0, d = 0, scan_in = 0;
  logic q, scan_out;
  logic model;

  tc_bscell dut (.clk, .rst, .t, .d, .scan_in, .q, .scan_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      t = 1'($urandom); d = 1'($urandom); scan_in = 1'($urandom);
      #3;
      checks++;
      if (q !== (t ? model : d) || scan_out !== model) begin
        failures++;
        $display("FAIL cycle %0d t=%0d d=%0d q=%0d so=%0d model=%0d", i, t, d, q, scan_out,
                 model);
      end
      @(posedge clk);
      model = t ? scan_in : d;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
