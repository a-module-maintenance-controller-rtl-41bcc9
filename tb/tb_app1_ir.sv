// Testbench for app1_ir, the App1 instruction register.
//
// Checks the capture value (IR0 = 1, IR1 = 0, IR2 = the status input), that a
// shift moves TDI through IR0, IR1, IR2 to the serial output one bit per edge,
// that the active instruction changes only on an update, that the preset selects
// BYPASS (111), and that nothing moves while the enables are high. Random
// operation sequences are compared with a model kept in this file.
module tb_app1_ir;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, pre = 0, si = 0, e1_n = 1, s = 0, e2_n = 1, st = 0;
  logic so;
  logic [2:0] ir;
  logic [2:0] msh, mir;

  app1_ir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msh = 0; mir = 3'b111;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int i = 0; i < 600; i++) begin
      int op;
      op = $urandom % 6;
      e1_n = 1; s = 0; e2_n = 1; pre = 0;
      si = 1'($urandom); st = 1'($urandom);
      case (op)
        0: e1_n = 0;                  // capture
        1, 2: begin e1_n = 0; s = 1; end  // shift
        3: e2_n = 0;                  // update
        4: pre = 1;                   // preset
        default: ;                    // hold
      endcase
      @(posedge clk);
      if (!e1_n) msh = s ? {msh[1:0], si} : {st, 1'b0, 1'b1};
      if (pre) mir = 3'b111;
      else if (!e2_n) mir = msh;
      #1;
      checks++;
      if (ir !== mir || so !== msh[2]) begin
        failures++;
        $display("FAIL op %0d: ir=%b exp=%b so=%b exp=%b", op, ir, mir, so, msh[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
