// Testbench for tc_fsm, the Test Channel controller.
//
// Drives the controller's condition inputs (TT, FEN, SCTC, SR2, SR3) by hand and
// walks every branch of the state diagram, checking the state after each CLK edge
// against the expected path: start (S0 -> S1), the shift loop of the deterministic
// and pseudorandom-uncompacted modes (S2..S10, including the pause in S7 while SR2
// is set), the compacted pseudorandom loop (S11..S17), instruction scan (S18 into
// the shift loop), RTEST (S19), RSBUS (S20, S21) and STBUS (S22). In every state
// visited it checks the outputs against the state output table (TMS value, SC
// load, SC/TC decrement, data-register shift, STR shift, reset request). Also
// checks that clearing TT or a soft reset returns to S0 from any state, that an
// unused state code returns to S0, and that in scan mode every output is inactive
// and the state register shifts.
module tb_tc_fsm;
  import tc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, softrs = 0, test = 0, scan_in = 0, scan_out;
  op_mode_e mode = M_DTUR;
  logic tt = 0, fen = 0, sctc = 0, sr2 = 0, sr3 = 0;
  tc_ctl_t ctl;
  logic [4:0] ps;
  logic [7:0] mode_dec;

  tc_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs {sc_load, sc_dec, tc_dec, xr_shift, str_shift, ftms, rst_req}
  function automatic logic [6:0] exp_out(input int s);
    case (s)
      0:  return 7'b0000010;
      1:  return 7'b0000000;
      2:  return 7'b0000010;
      3:  return 7'b0000000;
      4:  return 7'b1000000;
      5:  return 7'b0111000;
      6:  return 7'b0011010;
      7:  return 7'b0000000;
      8:  return 7'b0000010;
      9:  return 7'b0001010;
      10: return 7'b0000010;
      11: return 7'b0000000;
      12: return 7'b0000010;
      13: return 7'b0000000;
      14: return 7'b1000000;
      15: return 7'b0101000;
      16: return 7'b0001010;
      17: return 7'b0010010;
      18: return 7'b0000010;
      19: return 7'b0010000;
      20: return 7'b0010011;
      21: return 7'b0000010;
      22: return 7'b0010110;
      default: return 7'b0000010;
    endcase
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (ps=%0d ctl=%b)", what, ps, ctl);
    end
  endtask

  // one CLK edge, then expect state s and its outputs
  task automatic step(input int s);
    @(posedge clk); #1;
    chk(ps == 5'(s), $sformatf("expected S%0d", s));
    chk(ctl == exp_out(int'(ps)), $sformatf("outputs of S%0d", ps));
    chk(mode_dec == 8'(1 << mode), "mode decode");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #1 chk(ps == 0 && ctl == exp_out(0), "reset to S0");
    // start condition
    fen = 1; step(0);
    tt = 1; fen = 0; step(0); step(0);
    fen = 1; step(1);
    sr3 = 1; step(1); step(1);
    // DTUR: two chunks, the second ended by SR3
    sr3 = 0; mode = M_DTUR;
    step(2); step(3); step(4); step(5); step(5);
    sctc = 1; step(6); sctc = 0;
    sr2 = 1; step(7); step(7); step(7);
    sr2 = 0; fen = 0; step(7);
    fen = 1; step(8); step(4); step(5);
    sr3 = 1; step(9); step(10); step(1); step(1);
    // chunk ended by FEN going low
    sr3 = 0; mode = M_PTUR;
    step(2); step(3); step(4); step(5);
    fen = 0; step(9); step(10); step(1); step(1);
    // DTCR: SCTC straight from S4
    fen = 1; mode = M_DTCR; sctc = 1;
    step(2); step(3); step(4); step(6); sctc = 0; step(7); step(8); step(4);
    sr3 = 1; step(9); step(10); step(1);
    // PTCR: two vectors
    sr3 = 0; mode = M_PTCR;
    step(11); step(12); step(13); step(14); step(15); step(15);
    sctc = 1; step(16); sctc = 0; step(17); step(11);
    step(12); step(13); step(14);
    sctc = 1; step(16); sctc = 0; step(17);
    sr3 = 1; step(11); step(1);
    // INS: S18 then the shift loop
    sr3 = 0; mode = M_INS;
    step(18); step(2); step(3); step(4);
    sr3 = 1; step(9); step(10); step(1);
    // RTEST
    sr3 = 0; mode = M_RTEST;
    step(19); step(19); step(19);
    sr3 = 1; step(1);
    sr3 = 0; step(19);
    fen = 0; step(1); step(1);
    // RSBUS
    fen = 1; mode = M_RSBUS;
    step(20); step(20);
    sr3 = 1; step(21); step(1);
    // STBUS
    sr3 = 0; mode = M_STBUS;
    step(22); step(22); step(22);
    sr3 = 1; step(1);
    // TT low from the middle of a loop
    sr3 = 0; mode = M_PTCR;
    step(11); step(12); step(13);
    tt = 0; step(0); step(0);
    // soft reset
    tt = 1; step(1); mode = M_RSBUS; step(20);
    softrs = 1; step(0); softrs = 0;
    // scan mode: outputs off, PS shifts; load an unused code (31)
    test = 1;
    for (int k = 0; k < 5; k++) begin
      scan_in = 1;
      @(posedge clk); #1;
      chk(ctl == '0, "outputs inactive in scan mode");
    end
    chk(ps == 5'd31 && scan_out == 1'b1, "scan loaded 11111");
    test = 0; scan_in = 0;
    step(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
