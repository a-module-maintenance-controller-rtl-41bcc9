// Testbench for tc_irq, the Test Channel interrupt circuit.
//
// Walks all 32 combinations of TEST, SR3, EV0, EV1 and the enable bit CR3 and
// compares IRQ with the rule: an enabled interrupt is raised by the end of an
// operation (SR3) outside scan mode, or by either external event. Combinational;
// a watchdog ends the run if it hangs.
module tb_tc_irq;
  int checks = 0, failures = 0;
  logic test, sr3, ev0, ev1, irq_en, irq;
  logic exp;

  tc_irq dut (.test, .sr3, .ev0, .ev1, .irq_en, .irq);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {test, sr3, ev0, ev1, irq_en} = 5'(v);
      #1;
      exp = 1'b0;
      if (irq_en && ((sr3 && !test) || ev0 || ev1)) exp = 1'b1;
      checks++;
      if (irq !== exp) begin
        failures++;
        $display("FAIL test=%0d sr3=%0d ev0=%0d ev1=%0d en=%0d irq=%0d", test, sr3, ev0, ev1,
                 irq_en, irq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
