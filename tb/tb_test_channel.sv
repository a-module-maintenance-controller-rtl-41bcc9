// Testbench for test_channel, the complete Test Channel chip.
//
// The chip is driven only through its pins. A host model performs asynchronous
// 16-bit register writes and reads. On the test bus sits a slave model written
// here from the IEEE 1149.1 rules: a TAP controller following TMS0, reset by /RST,
// with a one-bit data and instruction register between TDI and TDO (sampled on
// the rising edge of TCK, TDO changing on the falling edge, a random value loaded
// in Capture-DR/IR). The slave records, for every shift edge, the bit it received
// from the channel and the bit it returned. Each mode is run and checked:
//  - DTUR: TC = s-2 moves exactly s bits; the bits leave TxR MSB first; RxR holds
//    the returned bits; with CNR = 14 a 32-bit transfer is cut into two 16-bit
//    chunks with the slave parked in Pause-DR while the host reloads TxR;
//  - DTCR: RxR ends with the signature of the returned bits;
//  - PTCR: TC = t-1 applies t vectors of CNR+2 bits (t Update-DR visits), the
//    vectors follow the pattern-generator sequence, RxR holds their signature;
//  - PTUR: TDO returns the TDI stream one cycle later;
//  - INS: the shift goes through Capture-IR/Shift-IR/Update-IR, TC+2 bits;
//  - RTEST: TC+1 cycles in Run-Test/Idle; RSBUS: /RST low for TC+1 cycles;
//  - STBUS: TC+1 cycles, TMS carrying STR most significant bit first, on TMS1
//    when EN1 is set;
//  - status register, interrupt, external events, soft reset, read multiplexer,
//    and the 60-cell internal scan chain.
// The reference values (shift streams, LFSR sequence, signatures) are computed
// in this file from the polynomial x^16 + x^5 + x^3 + x^2 + 1.
module tb_test_channel;
  import tc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, reset = 1;
  logic ncs = 1, nwr = 1, nrd = 1;
  logic [3:0] pa = 0;
  logic [15:0] pd_i = 0, pd_o;
  logic pd_oe, irq, tdo, tdi, tms0, tms1, nrst;
  logic ev0 = 0, ev1 = 0, test = 0, si = 0, so, aeng;
  logic [4:0] ps;
  logic dtur, sctc, sr3, sr2;

  test_channel dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (ps=%0d)", what, ps);
    end
  endtask

  // ---------------------------------------------------------------- slave model
  typedef enum int {
    TLR, RTI, SELDR, CAPDR, SHDR, EX1DR, PDR, EX2DR, UPDR,
    SELIR, CAPIR, SHIR, EX1IR, PIR, EX2IR, UPIR
  } tap_t;

  function automatic tap_t tap_next(input tap_t s, input logic m);
    case (s)
      TLR:   return m ? TLR   : RTI;
      RTI:   return m ? SELDR : RTI;
      SELDR: return m ? SELIR : CAPDR;
      CAPDR: return m ? EX1DR : SHDR;
      SHDR:  return m ? EX1DR : SHDR;
      EX1DR: return m ? UPDR  : PDR;
      PDR:   return m ? EX2DR : PDR;
      EX2DR: return m ? UPDR  : SHDR;
      UPDR:  return m ? SELDR : RTI;
      SELIR: return m ? TLR   : CAPIR;
      CAPIR: return m ? EX1IR : SHIR;
      SHIR:  return m ? EX1IR : SHIR;
      EX1IR: return m ? UPIR  : PIR;
      PIR:   return m ? EX2IR : PIR;
      EX2IR: return m ? UPIR  : SHIR;
      default: return m ? SELDR : RTI;  // UPIR
    endcase
  endfunction

  tap_t tap = TLR;
  logic sreg = 0, slave_tdo = 1;
  bit   sent[$], recv[$];
  int   n_updr = 0, n_upir = 0, n_capir = 0, n_pdr = 0, n_rti = 0, n_nrst = 0;
  int   n_s19 = 0, n_s22 = 0, n_s0 = 0;
  bit   tms0_s22[$], tms1_s22[$];

  assign tdi = slave_tdo;

  always @(posedge clk) begin
    if (!nrst) begin
      tap <= TLR;
      n_nrst <= n_nrst + 1;
    end else begin
      tap <= tap_next(tap, tms0);
      if (tap == CAPDR || tap == CAPIR) sreg <= 1'($urandom);
      if (tap == SHDR || tap == SHIR) begin
        sreg <= tdo;
        sent.push_back(tdo);
        recv.push_back(slave_tdo);
      end
      if (tap == UPDR) n_updr <= n_updr + 1;
      if (tap == UPIR) n_upir <= n_upir + 1;
      if (tap == CAPIR) n_capir <= n_capir + 1;
      if (tap == PDR) n_pdr <= n_pdr + 1;
      if (tap == RTI) n_rti <= n_rti + 1;
    end
    if (ps == 5'd19) n_s19 <= n_s19 + 1;
    if (ps == 5'd0) n_s0 <= n_s0 + 1;
    if (ps == 5'd22) begin
      n_s22 <= n_s22 + 1;
      tms0_s22.push_back(tms0);
      tms1_s22.push_back(tms1);
    end
  end

  always @(negedge clk) slave_tdo <= (tap == SHDR || tap == SHIR) ? sreg : 1'b1;

  // ---------------------------------------------------------------- host model
  task automatic host_write(input logic [3:0] a, input logic [15:0] d);
    @(posedge clk);
    #2 pa = a; pd_i = d; ncs = 0;
    #1 nwr = 0;
    #4 nwr = 1;
    #1 ncs = 1;
    repeat (3) @(posedge clk);
    #1;
  endtask

  task automatic host_read(input logic [3:0] a, output logic [15:0] d);
    @(posedge clk);
    #2 pa = a; ncs = 0; nrd = 0;
    #4 d = pd_o;
    chk(pd_oe, "read enable");
    #1 ncs = 1; nrd = 1;
  endtask

  task automatic wait_sr(input int bitno, input int limit);
    logic [15:0] d;
    int n = 0;
    do begin
      host_read(4'h0, d);
      n++;
    end while (!d[bitno] && n < limit);
    chk(d[bitno], $sformatf("SR%0d set within %0d reads", bitno, limit));
    // the controller finishes the operation a few cycles after the count ends
    repeat (5) @(posedge clk);
    #1;
  endtask

  // wait for the end of an operation, letting each finished chunk continue
  task automatic wait_done(input int limit);
    logic [15:0] d;
    int n = 0;
    do begin
      host_read(4'h0, d);
      n++;
      if (d[2] && !d[3]) begin
        repeat (4) @(posedge clk);
        host_write(A_SRCLR, 0);
      end
    end while (!d[3] && n < limit);
    chk(d[3], "operation finished");
    repeat (5) @(posedge clk);
    #1;
  endtask

  // hold the controller in S1, load registers, then release it
  task automatic run(input op_mode_e m, input logic [15:0] crx, input int tcv, input int cnrv,
                     input logic [15:0] txv, input logic [15:0] rxv, input logic [15:0] strv);
    host_write(A_SYNR, 16'h0000);
    host_write(A_CR, {10'b0, crx[5:3], 3'(m)});
    host_write(A_TC, 16'(tcv));
    host_write(A_CNR, 16'(cnrv));
    host_write(A_TXR, txv);
    host_write(A_RXR, rxv);
    host_write(A_STR, strv);
    host_write(A_SRCLR, 16'h0000);
    sent.delete(); recv.delete(); tms0_s22.delete(); tms1_s22.delete();
    n_updr = 0; n_upir = 0; n_capir = 0; n_pdr = 0; n_rti = 0; n_nrst = 0;
    n_s19 = 0; n_s22 = 0;
    host_write(A_SYNR, 16'h0001);
  endtask

  function automatic logic [15:0] lfsr(input logic [15:0] v);
    return {v[14:0], 1'b0} ^ (v[15] ? 16'h002D : 16'h0);
  endfunction
  function automatic logic [15:0] sa_step(input logic [15:0] v, input bit b);
    return {v[14:0], 1'b0} ^ ((v[15] ^ b) ? 16'h002D : 16'h0);
  endfunction

  localparam logic [15:0] TT = 16'h0020, IE = 16'h0008, E1 = 16'h0010;

  initial begin
    logic [15:0] d, m, tx, tx2, seed;
    int s, t;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    chk(tms0 == 1 && nrst == 1 && !irq, "idle outputs after reset");

    // ---------------- DTUR, short transfer, s = 10
    s = 10; tx = 16'($urandom);
    run(M_DTUR, TT, s - 2, 15, tx, 16'hBEEF, 0);
    wait_sr(3, 100);
    chk(sent.size() == s, $sformatf("DTUR shifts %0d bits, expected %0d", sent.size(), s));
    for (int k = 0; k < s; k++) chk(sent[k] == tx[15 - k], "DTUR bit order, MSB first");
    m = 16'hBEEF;
    foreach (recv[k]) m = {m[14:0], recv[k]};
    host_read(4'h6, d);
    chk(d == m, $sformatf("DTUR RxR %h expected %h", d, m));
    chk(n_updr == 1 && tap == RTI, "DTUR ends with one Update-DR, slave idle");

    // ---------------- DTUR, 32 bits in two 16-bit chunks, host reloads TxR
    tx = 16'($urandom); tx2 = 16'($urandom);
    run(M_DTUR, TT, 30, 14, tx, 16'h0, 0);
    wait_sr(2, 100);
    repeat (5) @(posedge clk);
    chk(tap == PDR, "slave parked in Pause-DR between chunks");
    chk(sent.size() == 16, $sformatf("first chunk %0d bits", sent.size()));
    m = 0;
    foreach (recv[k]) m = {m[14:0], recv[k]};
    host_read(4'h6, d);
    chk(d == m, "first chunk received");
    host_write(A_TXR, tx2);
    host_write(A_SRCLR, 0);
    wait_sr(3, 100);
    chk(sent.size() == 32, $sformatf("32-bit transfer moved %0d bits", sent.size()));
    for (int k = 0; k < 32; k++)
      chk(sent[k] == (k < 16 ? tx[15 - k] : tx2[31 - k]), "two-chunk bit order");
    m = 0;
    foreach (recv[k]) m = {m[14:0], recv[k]};
    host_read(4'h6, d);
    chk(d == m, "second chunk received");
    chk(n_updr == 1, "one Update-DR for the whole transfer");

    // ---------------- DTCR, signature of the returned bits
    s = 24; tx = 16'($urandom);
    run(M_DTCR, TT, s - 2, 15, tx, 16'h1234, 0);
    wait_done(100);
    chk(sent.size() == s, "DTCR length");
    m = 16'h1234;
    foreach (recv[k]) m = sa_step(m, recv[k]);
    host_read(4'h6, d);
    chk(d == m, $sformatf("DTCR signature %h expected %h", d, m));

    // ---------------- PTCR, t vectors of s bits
    t = 5; s = 9; seed = 16'($urandom) | 16'h1;
    run(M_PTCR, TT, t - 1, s - 2, seed, 16'h0, 0);
    wait_sr(3, 200);
    repeat (3) @(posedge clk);
    chk(n_updr == t, $sformatf("PTCR applied %0d vectors, expected %0d", n_updr, t));
    chk(sent.size() == t * s, $sformatf("PTCR moved %0d bits, expected %0d", sent.size(), t * s));
    m = seed;
    foreach (sent[k]) begin
      chk(sent[k] == m[15], "PTCR pattern sequence");
      m = lfsr(m);
    end
    m = 0;
    foreach (recv[k]) m = sa_step(m, recv[k]);
    host_read(4'h6, d);
    chk(d == m, $sformatf("PTCR signature %h expected %h", d, m));
    chk(tap == RTI, "PTCR ends in Run-Test/Idle");

    // ---------------- PTUR, TDI returned on TDO one cycle later
    s = 16;
    run(M_PTUR, TT, s - 2, 15, 16'hFFFF, 16'h0, 0);
    wait_sr(3, 100);
    chk(sent.size() == s, "PTUR length");
    for (int k = 2; k < s; k++) chk(sent[k] == recv[k - 2], "PTUR recirculation");
    m = 0;
    foreach (recv[k]) m = {m[14:0], recv[k]};
    host_read(4'h6, d);
    chk(d == m, "PTUR RxR uncompacted");

    // ---------------- INS, instruction scan of 7 bits
    s = 7; tx = 16'($urandom);
    run(M_INS, TT, s - 2, 15, tx, 16'h0, 0);
    wait_sr(3, 100);
    chk(n_capir == 1 && n_upir == 1 && n_updr == 0,
        $sformatf("INS uses the instruction path (%0d %0d %0d)", n_capir, n_upir, n_updr));
    chk(sent.size() == s, $sformatf("INS shifted %0d bits", sent.size()));
    for (int k = 0; k < s; k++) chk(sent[k] == tx[15 - k], "INS bit order");

    // ---------------- RTEST, t cycles in Run-Test/Idle
    t = 13;
    run(M_RTEST, TT, t - 1, 0, 0, 0, 0);
    wait_sr(3, 100);
    chk(n_s19 == t, $sformatf("RTEST ran %0d cycles, expected %0d", n_s19, t));

    // ---------------- RSBUS, /RST for t cycles
    t = 4;
    run(M_RSBUS, TT, t - 1, 0, 0, 0, 0);
    wait_sr(3, 100);
    chk(n_nrst == t, $sformatf("/RST low %0d cycles, expected %0d", n_nrst, t));
    repeat (3) @(posedge clk);
    chk(tap == RTI, "slave reset then idle");

    // ---------------- STBUS on TMS0 and on TMS1
    for (int e = 0; e < 2; e++) begin
      s = 6; tx = 16'b101101;
      run(M_STBUS, TT | (e ? E1 : 16'h0), s - 1, 0, 0, 0, tx);
      wait_sr(3, 100);
      chk(n_s22 == s, $sformatf("STBUS %0d cycles", n_s22));
      for (int k = 0; k < s; k++) begin
        chk((e ? tms1_s22[k] : tms0_s22[k]) == tx[5 - k], "STR sequence on TMS");
        chk((e ? tms0_s22[k] : tms1_s22[k]) == 1'b0, "other TMS line low");
      end
    end
    // STBUS sequence takes the slave to Shift-DR: 0 1 0 0 from Run-Test/Idle
    run(M_RSBUS, TT, 0, 0, 0, 0, 0);
    wait_sr(3, 100);
    chk(tap == RTI, "slave idle after reset pulse");
    run(M_STBUS, TT, 3, 0, 0, 0, 16'b010000);
    wait_sr(3, 100);
    chk(tap == SHDR, "STR sequence 0100 takes the slave to Shift-DR");

    // ---------------- interrupt and events
    run(M_RTEST, TT | IE, 2, 0, 0, 0, 0);
    wait_sr(3, 100);
    chk(irq, "IRQ at end of operation");
    host_write(A_SRCLR, 0);
    host_write(A_SYNR, 0);
    @(posedge clk); #1;
    chk(!irq, "IRQ cleared with SR");
    ev0 = 1; #1 chk(irq, "EV0 interrupt");
    @(posedge clk); #1 ev0 = 0;
    ev1 = 1; @(posedge clk); #1 ev1 = 0;
    host_read(4'h0, d);
    chk(d[1:0] == 2'b11, "EV0/EV1 latched in SR");
    host_write(A_RXR, 16'hA5C3);
    host_read(4'h2, d);
    chk(d == 16'hA5C3, "PA1 = 1 reads RxR");
    host_read(4'h0, d);
    chk(d == 16'hA5C3 & 16'hFFF0 | 16'h0003, "PA1 = 0 reads RxR15-4 and SR");

    // ---------------- soft reset
    run(M_RTEST, TT, 100, 0, 0, 0, 0);
    repeat (10) @(posedge clk);
    n_s0 = 0;
    host_write(A_SOFTRS, 0);
    @(posedge clk); #1;
    chk(n_s0 == 1, $sformatf("soft reset returns to S0 (%0d cycles in S0)", n_s0));
    host_read(4'h6, d);
    chk(d == 0, "soft reset clears RxR");

    // ---------------- internal scan chain length
    host_write(A_CR, 0);
    test = 1;
    si = 0;
    repeat (70) @(posedge clk);
    chk(!aeng && tms0 == 0, "controller outputs off in scan mode");
    #1 si = 1;
    @(posedge clk); #1 si = 0;
    s = 1;
    while (!so && s < 100) begin
      @(posedge clk); #1;
      s++;
    end
    chk(s == 60, $sformatf("scan chain length %0d, expected 60", s));
    test = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
