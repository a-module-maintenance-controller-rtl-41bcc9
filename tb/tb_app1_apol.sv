// Testbench for app1_apol, the App1 output logic.
//
// For every TAP state and every instruction code, compares the control signals
// with the rules of the chip's truth table as restated here: which register
// captures (/E1 low, S low) in Capture-DR, shifts (/E1 low, S high) in Shift-DR
// and updates (/E2 low) in Update-DR for each instruction; the /BPI and /BPO
// pass-through controls for each instruction; the feedback register running as a
// functional register under INTEST, SAMPLE and BYPASS and holding under EXTEST and
// SCANFB except for the SCANFB update; and the instruction
// register controls in the IR states.
module tb_app1_apol;
  import app1_pkg::*;
  int checks = 0, failures = 0;
  tap_state_e state;
  logic [2:0] ir;
  app1_ctl_t ctl;

  app1_apol dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: state=%s ir=%b ctl=%b", what, state.name(), ir, ctl);
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
    for (int c = 0; c < 8; c++) begin
      for (int st = 0; st < 16; st++) begin
        bit cap, shf, upd, bsr_on, fb_on, byp;
        ir = 3'(c);
        state = tap_state_e'(st);
        #1;
        cap = state == CAPTURE_DR; shf = state == SHIFT_DR; upd = state == UPDATE_DR;
        // ir[0] is IR0, the first opcode bit
        byp = ir[0];
        bsr_on = !byp && !(ir[1] && ir[2]);
        fb_on = !byp && ir[1] && ir[2];
        // pass-through controls
        if (byp)                 chk(!ctl.bpi_n && !ctl.bpo_n, "BYPASS pins pass");
        else case ({ir[1], ir[2]})
          2'b00: chk(!ctl.bpi_n &&  ctl.bpo_n, "EXTEST drives outputs from BSR");
          2'b01: chk( ctl.bpi_n && !ctl.bpo_n, "INTEST drives core input from BSR");
          2'b10: chk(!ctl.bpi_n && !ctl.bpo_n, "SAMPLE pins pass");
          default: chk(ctl.bpi_n && !ctl.bpo_n, "SCANFB core input from BSR");
        endcase
        // boundary-scan register
        chk(ctl.bsr_e1_n == !(bsr_on && (cap || shf)), "BSR /E1");
        if (bsr_on && (cap || shf)) chk(ctl.bsr_s == shf, "BSR S");
        chk(ctl.bsr_e2_n == !(bsr_on && upd), "BSR /E2");
        // feedback register
        chk(ctl.fb_e1_n == !(fb_on && (cap || shf)), "FB /E1");
        if (fb_on && (cap || shf)) chk(ctl.fb_s == shf, "FB S");
        if (fb_on && upd)          chk(ctl.fm_n && !ctl.fb_e2_n, "FB update from scan");
        else if (fb_on)            chk(ctl.fm_n && ctl.fb_e2_n, "FB held under SCANFB");
        else if (!byp && !ir[1] && !ir[2])
                                   chk(ctl.fb_e2_n, "FB held under EXTEST");
        else                       chk(!ctl.fm_n && !ctl.fb_e2_n, "FB functional");
        // bypass register
        chk(ctl.bpr_s == (byp && shf), "BPR shift");
        // instruction register
        chk(ctl.ir_e1_n == !(state == CAPTURE_IR || state == SHIFT_IR), "IR /E1");
        chk(ctl.ir_s == (state == SHIFT_IR), "IR S");
        chk(ctl.ir_e2_n == !(state == UPDATE_IR), "IR /E2");
        chk(ctl.ir_pre == (state == TLR), "IR preset");
        chk(ctl.shift_ir == (state == SHIFT_IR) && ctl.shift_dr == shf, "TDO enables");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
