// Testbench for tc_m8x4, the read-port multiplexer of the Test Channel.
//
// Applies random 4-bit inputs and every select value and compares the output with
// the selected input (select 0 gives input a, the status register; select 1 gives
// input b, the low nibble of RxR). Purely combinational: values are compared one
// time step after they are applied. A watchdog ends the run if it hangs.
module tb_tc_m8x4;
  int checks = 0, failures = 0;
  logic       s;
  logic [3:0] a, b, q;

  tc_m8x4 dut (.s, .a, .b, .q);

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: s=%0d a=%h b=%h q=%h exp=%h", what, s, a, b, q, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = 4'($urandom);
      b = 4'($urandom);
      s = 1'($urandom);
      #1;
      check(s ? b : a, "mux");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
