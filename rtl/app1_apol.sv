// App1 output logic (APOL).
//
// Combinational decode of the TAP state and the instruction into the control
// signals of the core and the instruction register, following the source design's
// truth table for the Capture, Shift and Update states of the data-register path:
//   EXTEST  BSR captures/shifts/updates, PD from DIN, SUM/CO from the BSR latches,
//           feedback register held during capture/shift/update.
//   INTEST  BSR captures/shifts/updates, PD from the BSR latch, SUM/CO follow the
//           feedback register, which runs as a functional register.
//   SAMPLE  BSR captures/shifts/updates, all pins pass through, FB functional.
//   SCANFB  FB captures (S=0), shifts (S=1) and updates its outputs from the shift
//           stage (/FM=1); PD from the BSR latch, SUM/CO follow FB.
//   BYPASS  one-bit bypass register: 0 captured, TDI shifted.
// In states that table does not list, and where it leaves a value open, the
// register stages hold (/E1 = /E2 = 1, S = 0); /BPI, /BPO and the feedback
// register's /FM and /E2 keep the values the table gives for the instruction's
// capture and shift rows. So the feedback register runs as the functional
// register under INTEST, SAMPLE and BYPASS, and holds its value under EXTEST and
// SCANFB, which keeps PSUM and PCO steady after they have been scanned in. IR control follows the standard: capture and
// shift in Capture-IR/Shift-IR, update in Update-IR, preset in Test-Logic-Reset.
// Those defaults are this implementation's choice.
module app1_apol
  import app1_pkg::*;
(
  input  tap_state_e state,
  input  logic [2:0] ir,
  output app1_ctl_t  ctl
);

  instr_e ins;
  logic   cap, shf, upd;

  assign ins = decode_ir(ir);
  assign cap = (state == CAPTURE_DR);
  assign shf = (state == SHIFT_DR);
  assign upd = (state == UPDATE_DR);

  always_comb begin
    ctl = '0;
    ctl.bsr_e1_n = 1'b1;
    ctl.bsr_e2_n = 1'b1;
    ctl.fb_e1_n  = 1'b1;
    ctl.fb_e2_n  = 1'b0;
    ctl.fm_n     = 1'b0;
    unique case (ins)
      I_EXTEST: begin
        ctl.bpi_n   = 1'b0;
        ctl.bpo_n   = 1'b1;
        ctl.fm_n    = 1'b1;
        ctl.fb_e2_n = 1'b1;
      end
      I_INTEST: begin
        ctl.bpi_n = 1'b1;
        ctl.bpo_n = 1'b0;
      end
      I_SAMPLE: begin
        ctl.bpi_n = 1'b0;
        ctl.bpo_n = 1'b0;
      end
      I_SCANFB: begin
        ctl.bpi_n   = 1'b1;
        ctl.bpo_n   = 1'b0;
        ctl.fm_n    = 1'b1;
        ctl.fb_e2_n = ~upd;
        if (cap || shf) begin
          ctl.fb_e1_n = 1'b0;
          ctl.fb_s    = shf;
        end
      end
      default: begin  // BYPASS
        ctl.bpi_n = 1'b0;
        ctl.bpo_n = 1'b0;
        ctl.bpr_s = shf;
      end
    endcase
    if (ins == I_EXTEST || ins == I_INTEST || ins == I_SAMPLE) begin
      ctl.bsr_e1_n = ~(cap | shf);
      ctl.bsr_s    = shf;
      ctl.bsr_e2_n = ~upd;
    end
    ctl.ir_e1_n  = ~(state == CAPTURE_IR || state == SHIFT_IR);
    ctl.ir_s     = (state == SHIFT_IR);
    ctl.ir_e2_n  = ~(state == UPDATE_IR);
    ctl.ir_pre   = (state == TLR);
    ctl.st       = (state == CAPTURE_IR) || (state == SHIFT_IR) || (state == SHIFT_DR);
    ctl.shift_ir = (state == SHIFT_IR);
    ctl.shift_dr = shf;
  end

endmodule
