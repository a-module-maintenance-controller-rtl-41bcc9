// End-to-end testbench for mmc_top: host adapter, Test Channel and App1 together,
// all parameters at their defaults.
//
// An 8-bit host model programs the Test Channel through the bus adapter (16-bit
// registers as byte pairs, high byte first through address F) and runs the test
// programs of the prototype against the App1 chip on the test bus:
//  - RSBUS resets App1 through /RST (App1 TAP to Test-Logic-Reset, BYPASS);
//  - INS loads each App1 instruction; the status 101 comes back in RxR and the
//    matching instruction pin comes up;
//  - EXTEST with DTUR drives SUM and CO from the boundary-scan cells;
//  - SAMPLE with DTUR captures DIN and the adder outputs;
//  - the full-adder test: for each of the 8 vectors, INTEST and DTUR set PD, then
//    SCANFB and DTUR set PSUM and PCO, and SUM/CO must show the sum and carry;
//  - BYPASS with PTCR, DTCR, PTUR and a 32-bit DTUR in two chunks: the patterns,
//    signatures and returned bits are checked against a model of the one-bit
//    bypass path computed here;
//  - RTEST (App1 in Run-Test/Idle for TC+1 cycles), STBUS (TMS sequence from STR
//    walks App1's TAP), TMS1 selection, interrupts, external events, soft reset,
//    the functional accumulation of App1's feedback register, and the Test
//    Channel's 60-cell internal scan chain.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_mmc_top;
  int checks = 0, failures = 0;

  logic clk = 0, npor = 0;
  logic [3:0] ha = 0;
  logic [7:0] hd_i = 0, hd_o;
  logic hd_oe, npior = 1, npiow = 1, irq;
  logic ev0 = 0, ev1 = 0, tms1, test = 0, si = 0, so, aeng;
  logic [4:0] ps;
  logic dtur, sctc, sr3, sr2;
  logic tck, tdo_tc, tdo_app, tms0, nrst;
  logic din = 0, sum, co, pd, psum, pco, nsum, nco;
  logic [3:0] tap_dcba;
  logic [4:0] instr;

  mmc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (ps=%0d tap=%h instr=%b)", what, ps, tap_dcba, instr);
    end
  endtask

  // ------------------------------------------------------------ mechanism counts
  typedef enum int {
    K_DTUR, K_DTCR, K_PTUR, K_PTCR, K_INS, K_RTEST, K_STBUS, K_RSBUS,
    K_CHUNK_PAUSE, K_IRQ, K_EVENT, K_SOFTRS, K_SCAN, K_TMS1,
    K_EXTEST, K_INTEST, K_SAMPLE, K_SCANFB, K_BYPASS, K_FB_ACCUM, K_TRST, K_NUM
  } mech_t;
  int mech[K_NUM];

  // ------------------------------------------------------------ host model
  task automatic io_write(input logic [3:0] a, input logic [7:0] v);
    #3 ha = a; hd_i = v;
    #4 npiow = 0;
    #12 npiow = 1;
    #4 hd_i = 8'($urandom);
  endtask

  task automatic io_read(input logic [3:0] a, output logic [7:0] v);
    #3 ha = a;
    #4 npior = 0;
    #12 v = hd_o;
    npior = 1;
    #4;
  endtask

  task automatic wr16(input logic [3:0] a, input logic [15:0] v);
    io_write(4'hF, v[15:8]);
    io_write(a, v[7:0]);
    repeat (3) @(posedge clk);
  endtask

  task automatic rd16(input logic [3:0] a, output logic [15:0] v);
    io_read(a, v[7:0]);
    io_read(4'hF, v[15:8]);
  endtask

  localparam logic [3:0] A_CR = 0, A_CNR = 1, A_STR = 2, A_TC = 4, A_TXR = 5, A_RXR = 6,
                         A_SYNR = 8, A_SRCLR = 9, A_SOFTRS = 10;
  localparam logic [2:0] DTUR = 0, DTCR = 1, PTUR = 2, PTCR = 3, INS = 4, RTEST = 5,
                         STBUS = 6, RSBUS = 7;
  localparam logic [15:0] TT = 16'h0020, IE = 16'h0008, E1 = 16'h0010;

  // bits seen on the test bus at every Test Channel shift edge
  bit sent[$], recv[$];
  int n_s19_rti = 0, n_nrst = 0, n_upd = 0;
  always @(posedge clk) begin
    if (ps == 5'd5 || ps == 5'd6 || ps == 5'd9 || ps == 5'd15 || ps == 5'd16) begin
      sent.push_back(tdo_tc);
      recv.push_back(tdo_app);
    end
    if (ps == 5'd19 && tap_dcba == 4'hC) n_s19_rti <= n_s19_rti + 1;
    if (!nrst) n_nrst <= n_nrst + 1;
    if (tap_dcba == 4'h5) n_upd <= n_upd + 1;
  end

  task automatic run(input logic [2:0] m, input logic [15:0] crx, input int tcv, input int cnrv,
                     input logic [15:0] txv, input logic [15:0] strv);
    wr16(A_SYNR, 16'h0000);
    wr16(A_CR, crx | 16'(m));
    wr16(A_TC, 16'(tcv));
    wr16(A_CNR, 16'(cnrv));
    wr16(A_TXR, txv);
    wr16(A_RXR, 16'h0000);
    wr16(A_STR, strv);
    wr16(A_SRCLR, 16'h0000);
    sent.delete(); recv.delete();
    n_s19_rti = 0; n_nrst = 0; n_upd = 0;
    wr16(A_SYNR, 16'h0001);
  endtask

  // poll SR until SR3; continue after each finished chunk (SR2)
  task automatic wait_done();
    logic [15:0] d;
    int n = 0;
    do begin
      rd16(A_CR, d);   // PA1 = 0: RxR[15:4] and SR
      n++;
      if (d[2] && !d[3]) begin
        // a chunk of a deterministic transfer is done (a compacted pseudorandom
        // vector also sets SR2 but does not wait)
        if (ps == 5'd7) begin
          mech[K_CHUNK_PAUSE]++;
          chk(tap_dcba == 4'h3, "slave parked in Pause-DR between chunks");
        end
        wr16(A_SRCLR, 16'h0000);
      end
    end while (!d[3] && n < 200);
    chk(d[3], "operation finished");
    repeat (6) @(posedge clk);
  endtask

  task automatic load_ir(input logic [2:0] ir012, output logic [15:0] rx);
    // IR2 is shifted first: TxR[15] = IR2, TxR[14] = IR1, TxR[13] = IR0
    run(INS, TT, 1, 15, {ir012[0], ir012[1], ir012[2], 13'b0}, 0);
    wait_done();
    mech[K_INS]++;
    rd16(A_RXR, rx);
  endtask

  // shift n bits (first bit = v[15]) into the selected data register
  task automatic shift_dr(input int n, input logic [15:0] v, output logic [15:0] rx);
    run(DTUR, TT, n - 2, 15, v, 0);
    wait_done();
    mech[K_DTUR]++;
    rd16(A_RXR, rx);
  endtask

  function automatic logic [15:0] lfsr(input logic [15:0] v);
    return {v[14:0], 1'b0} ^ (v[15] ? 16'h002D : 16'h0);
  endfunction
  function automatic logic [15:0] sa_step(input logic [15:0] v, input bit b);
    return {v[14:0], 1'b0} ^ ((v[15] ^ b) ? 16'h002D : 16'h0);
  endfunction

  localparam logic [2:0] I_EXTEST = 3'b000, I_INTEST = 3'b001, I_SAMPLE = 3'b010,
                         I_SCANFB = 3'b011, I_BYPASS = 3'b100;

  initial begin
    logic [15:0] rx, m, seed;
    int s, t, tot;
    logic vpd, vps, vpc;
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(posedge clk);
    #2 npor = 1;
    repeat (3) @(posedge clk);
    chk(tap_dcba == 4'hF && instr[4], "power-on: App1 in Test-Logic-Reset, BYPASS");

    // ---- RSBUS: reset the slave
    run(RSBUS, TT, 3, 0, 0, 0);
    wait_done();
    chk(n_nrst == 4, $sformatf("/RST low %0d cycles for TC=3", n_nrst));
    chk(tap_dcba == 4'hC && instr[4], "slave reset to BYPASS, then Run-Test/Idle");
    mech[K_RSBUS]++; mech[K_TRST]++;

    // ---- INS: every instruction code
    for (int c = 0; c < 8; c++) begin
      logic [2:0] ir012;
      logic [4:0] exp;
      ir012 = 3'(c);
      load_ir(ir012, rx);
      chk(rx[2:0] == 3'b101, $sformatf("captured IR status %b, expected 101", rx[2:0]));
      exp = ir012[2] ? 5'b10000 : 5'(1 << ir012[1:0]);
      chk(instr == exp, $sformatf("IR %b decodes to %b", ir012, instr));
      if (instr[0]) mech[K_EXTEST]++;
      if (instr[4]) mech[K_BYPASS]++;
    end

    // ---- EXTEST: SUM and CO driven from the scan cells
    load_ir(I_EXTEST, rx);
    for (int v = 0; v < 4; v++) begin
      shift_dr(3, {1'(v >> 1), 1'(v), 14'b0}, rx);   // CO cell, SUM cell, DIN cell
      chk({co, sum} == 2'(v), $sformatf("EXTEST drives CO SUM = %0d", v));
      mech[K_EXTEST]++;
    end

    // ---- SAMPLE: capture DIN and the adder outputs
    load_ir(I_SAMPLE, rx);
    chk(instr[2], "SAMPLE selected");
    for (int v = 0; v < 2; v++) begin
      din = 1'(v);
      @(posedge clk);
      #1 m = {13'b0, nco, nsum, din};
      shift_dr(3, 16'h0, rx);
      chk(rx[2:0] == m[2:0], $sformatf("SAMPLE captured %b, expected %b", rx[2:0], m[2:0]));
      mech[K_SAMPLE]++;
    end
    din = 0;

    // ---- the full-adder test, 8 vectors
    for (int v = 0; v < 8; v++) begin
      {vpd, vps, vpc} = 3'(v);
      load_ir(I_INTEST, rx);
      chk(instr[1], "INTEST selected");
      shift_dr(3, {2'b00, vpd, 13'b0}, rx);    // the third bit lands in the DIN/PD cell
      mech[K_INTEST]++;
      load_ir(I_SCANFB, rx);
      chk(instr[3], "SCANFB selected");
      shift_dr(2, {vpc, vps, 14'b0}, rx);      // PCO first, then PSUM
      mech[K_SCANFB]++;
      tot = int'(vpd) + int'(vps) + int'(vpc);
      chk(pd == vpd && psum == vps && pco == vpc, $sformatf("vector %0d%0d%0d applied", vpd, vps,
                                                            vpc));
      chk({co, sum} == 2'(tot), $sformatf("PD PSUM PCO = %0d%0d%0d gives CO SUM = %0d%0d",
                                          vpd, vps, vpc, co, sum));
    end

    // ---- BYPASS: functional accumulation and pseudorandom test through it
    load_ir(I_BYPASS, rx);
    begin
      logic [1:0] acc;
      din = 1;
      @(posedge clk); #1;
      acc = {pco, psum};
      for (int k = 0; k < 6; k++) begin
        tot = 1 + int'(acc[0]) + int'(acc[1]);
        @(posedge clk); #1;
        chk({pco, psum} == 2'(tot), "feedback register accumulates");
        acc = {pco, psum};
        mech[K_FB_ACCUM]++;
      end
      din = 0;
    end

    // PTCR: t vectors of s bits; App1 returns TDI one bit late, 0 first
    t = 6; s = 11; seed = 16'h8001 ^ 16'($urandom);
    run(PTCR, TT, t - 1, s - 2, seed, 0);
    wait_done();
    mech[K_PTCR]++;
    chk(sent.size() == t * s, $sformatf("PTCR moved %0d bits, expected %0d", sent.size(), t * s));
    chk(n_upd == t, $sformatf("PTCR applied %0d vectors, expected %0d", n_upd, t));
    m = seed;
    foreach (sent[k]) begin
      chk(sent[k] == m[15], "PTCR pattern sequence");
      m = lfsr(m);
    end
    m = 0;
    for (int v = 0; v < t; v++)
      for (int k = 0; k < s; k++) m = sa_step(m, k == 0 ? 1'b0 : sent[v * s + k - 1]);
    rd16(A_RXR, rx);
    chk(rx == m, $sformatf("PTCR signature %h, expected %h", rx, m));

    // DTCR through the bypass register
    run(DTCR, TT, 12 - 2, 15, 16'hC3A5, 0);
    wait_done();
    mech[K_DTCR]++;
    m = 0;
    for (int k = 0; k < 12; k++) m = sa_step(m, k == 0 ? 1'b0 : 1'(16'hC3A5 >> (16 - k)));
    rd16(A_RXR, rx);
    chk(rx == m, $sformatf("DTCR signature %h, expected %h", rx, m));

    // PTUR: returned bits recirculate
    run(PTUR, TT, 16 - 2, 15, 16'hFFFF, 0);
    wait_done();
    mech[K_PTUR]++;
    chk(sent.size() == 16, "PTUR length");
    for (int k = 3; k < 16; k++) chk(sent[k] == recv[k - 2], "PTUR recirculation");

    // 32-bit DTUR in two 16-bit chunks
    run(DTUR, TT, 30, 14, 16'hA5F0, 0);
    wait_done();
    mech[K_DTUR]++;
    chk(sent.size() == 32, $sformatf("32-bit DTUR moved %0d bits", sent.size()));
    for (int k = 0; k < 16; k++) chk(sent[k] == 1'(16'hA5F0 >> (15 - k)), "first chunk bits");
    for (int k = 1; k < 32; k++) chk(recv[k] == sent[k - 1], "bypass returns each bit");

    // ---- RTEST: App1 idles for TC+1 cycles
    run(RTEST, TT | IE, 20, 0, 0, 0);
    wait_done();
    mech[K_RTEST]++;
    chk(n_s19_rti == 21, $sformatf("RTEST %0d cycles in Run-Test/Idle", n_s19_rti));
    chk(irq, "IRQ at the end of an operation");
    mech[K_IRQ]++;
    wr16(A_SRCLR, 0);
    wr16(A_SYNR, 0);
    #1 chk(!irq, "IRQ cleared");
    ev1 = 1; #1 chk(irq, "EV1 raises IRQ");
    @(posedge clk); #1 ev1 = 0; ev0 = 1;
    @(posedge clk); #1 ev0 = 0;
    rd16(A_CR, rx);
    chk(rx[1:0] == 2'b11, "EV0 and EV1 recorded in SR");
    mech[K_EVENT]++;

    // ---- STBUS: 0,1,0,0 walks App1 from Run-Test/Idle to Shift-DR, then 1s reset it.
    // In STBUS mode TMS shows STR5 even while the channel waits, so a sequence
    // that must not disturb the slave beforehand starts with 0.
    wr16(A_SRCLR, 0);
    run(STBUS, TT, 3, 0, 0, 16'b010000);
    wait_done();
    chk(tap_dcba == 4'h2, $sformatf("STBUS 0100 takes App1 to Shift-DR (%h)", tap_dcba));
    run(STBUS, TT, 5, 0, 0, 16'b111110);
    wait_done();
    mech[K_STBUS]++;
    chk(tap_dcba == 4'hC && instr[4], "STBUS 11111 resets App1's TAP, then idle");
    // TMS1: the same sequence goes to the other line and App1 does not move
    run(STBUS, TT | E1, 5, 0, 0, 16'b111110);
    fork
      begin
        int seen;
        seen = 0;
        repeat (60) begin
          @(posedge clk);
          if (tms1) seen++;
          chk(tms0 == 1'b0, "TMS0 low while EN1 is set");
        end
        chk(seen == 5, $sformatf("TMS1 carried %0d ones", seen));
      end
    join
    wait_done();
    mech[K_TMS1]++;

    // ---- soft reset
    run(RTEST, TT, 1000, 0, 0, 0);
    repeat (20) @(posedge clk);
    wr16(A_SOFTRS, 0);
    rd16(A_RXR, rx);
    chk(rx == 0, "soft reset clears RxR");
    repeat (50) @(posedge clk);
    chk(!sr3 && ps == 5'd19, "restarted after soft reset");
    mech[K_SOFTRS]++;
    wr16(A_CR, 0);

    // ---- internal scan of the Test Channel
    test = 1;
    repeat (70) @(posedge clk);
    #1 si = 1;
    @(posedge clk); #1 si = 0;
    s = 1;
    while (!so && s < 100) begin
      @(posedge clk); #1;
      s++;
    end
    chk(s == 60, $sformatf("internal scan chain of %0d cells", s));
    mech[K_SCAN]++;
    test = 0;

    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", i);
      end
    end
    $display("mechanisms:");
    foreach (mech[i]) begin
      mech_t k;
      k = mech_t'(i);
      $display("  %s %0d", k.name(), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
