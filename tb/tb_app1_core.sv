// Testbench for app1_core, the App1 full adder and its scan registers.
//
// Drives the control bundle directly with random operations and compares every
// output against a model kept in this file:
//  - the full adder (NSUM, NCO) against integer addition of PD, PSUM and PCO,
//    and the feedback register accumulating the sum in functional mode;
//  - boundary-scan cells capturing DIN, NSUM and NCO, shifting TDI through the
//    DIN, SUM and CO cells, updating, and driving PD, SUM and CO from their update
//    stages when the pass-through controls are high;
//  - the feedback register capturing NSUM/NCO, shifting, and loading its outputs
//    from the shift stage (/FM high) or from the adder (/FM low);
//  - the one-bit bypass register.
module tb_app1_core;
  import app1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, tdi = 0, din = 0;
  app1_ctl_t ctl;
  logic sum, co, pd, psum, pco, nsum, nco, so_bsr, so_fb, so_bpr;

  app1_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [2:0] m_sh, m_up;   // BSR cells 0 DIN, 1 SUM, 2 CO
  logic [1:0] m_fsh, m_fq;  // FB cells 0 PSUM, 1 PCO
  logic m_bpr;
  int n_acc = 0;

  initial begin
    logic m_pd, m_sum, m_co;
    int total;
    ctl = '0;
    ctl.bsr_e1_n = 1; ctl.bsr_e2_n = 1; ctl.fb_e1_n = 1;
    m_sh = 0; m_up = 0; m_fsh = 0; m_fq = 0; m_bpr = 0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int i = 0; i < 3000; i++) begin
      int op;
      op = $urandom % 8;
      ctl = '0;
      ctl.bsr_e1_n = 1; ctl.bsr_e2_n = 1; ctl.fb_e1_n = 1;
      ctl.bpi_n = 1'($urandom); ctl.bpo_n = 1'($urandom);
      tdi = 1'($urandom); din = 1'($urandom);
      case (op)
        0: begin ctl.bsr_e1_n = 0; ctl.bsr_s = 1'($urandom); end
        1: ctl.bsr_e2_n = 0;
        2: begin ctl.fb_e1_n = 0; ctl.fb_s = 1'($urandom); ctl.fm_n = 1; ctl.fb_e2_n = 1; end
        3: begin ctl.fm_n = 1; ctl.fb_e2_n = 0; end
        4: ctl.bpr_s = 1;
        5: begin ctl.fm_n = 1; ctl.fb_e2_n = 1; end
        default: begin ctl.bpi_n = 0; ctl.bpo_n = 0; end   // functional
      endcase
      #1;
      // combinational outputs
      m_pd  = ctl.bpi_n ? m_up[0] : din;
      total = int'(m_pd) + int'(m_fq[0]) + int'(m_fq[1]);
      m_sum = ctl.bpo_n ? m_up[1] : 1'(total);
      m_co  = ctl.bpo_n ? m_up[2] : 1'(total >> 1);
      chk(pd == m_pd && sum == m_sum && co == m_co, $sformatf("pins op %0d", op));
      chk(psum == m_fq[0] && pco == m_fq[1], "feedback register outputs");
      chk({nco, nsum} == 2'(total), $sformatf("full adder %0d", total));
      chk(so_bsr == m_sh[2] && so_fb == m_fsh[1] && so_bpr == m_bpr, "serial outputs");
      @(posedge clk);
      if (!ctl.bsr_e1_n) m_sh = ctl.bsr_s ? {m_sh[1:0], tdi} : {m_co, m_sum, m_pd};
      if (!ctl.bsr_e2_n) m_up = m_sh;
      if (!ctl.fb_e1_n) m_fsh = ctl.fb_s ? {m_fsh[0], tdi} : 2'(total);
      if (!ctl.fb_e2_n) begin
        m_fq = ctl.fm_n ? m_fsh : 2'(total);
        if (!ctl.fm_n) n_acc++;
      end
      m_bpr = ctl.bpr_s & tdi;
      #1;
    end
    chk(n_acc > 100, "functional accumulation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
