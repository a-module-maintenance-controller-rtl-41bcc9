// Testbench for tc_xr2, the Test Channel data registers TxR and RxR.
//
// Reference models in this file, written bit by bit from the polynomial
// x^16 + x^5 + x^3 + x^2 + 1:
//  - uncompacted: 16 shifts move TxR out MSB first and collect the serial input in
//    RxR, first bit ending in RxR15;
//  - pattern generation: TxR steps through a maximal-length sequence, so it returns
//    to its start after exactly 65535 shifts and not before;
//  - signature analysis: RxR divides the serial input stream by the polynomial
//    (starting from the value RxR held); the model does the same division by
//    explicit polynomial long division over the whole bit stream and the two
//    remainders are compared;
//  - host writes, the clear, and scan order (TxR0..TxR15, RxR0..RxR15).
module tb_tc_xr2;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clr = 0, test = 0, scan_in = 0, scan_out;
  logic txr_wr = 0, rxr_wr = 0, shift = 0, tpg = 0, sa = 0, sin = 0, txr_so;
  logic [15:0] wdata = 0, txr, rxr;

  tc_xr2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (txr=%h rxr=%h)", what, txr, rxr);
    end
  endtask

  task automatic wr_txr(input logic [15:0] v);
    wdata = v; txr_wr = 1; @(posedge clk); #1 txr_wr = 0;
  endtask
  task automatic wr_rxr(input logic [15:0] v);
    wdata = v; rxr_wr = 1; @(posedge clk); #1 rxr_wr = 0;
  endtask

  // remainder of (seed * x^n + stream * x^16) modulo the polynomial, stream first
  // bit of highest degree, by long division
  function automatic logic [15:0] lfsr_rem(input logic [15:0] seed, input bit stream[$]);
    bit d[$];
    bit p[17];
    p = '{default: 0};
    p[16] = 1; p[5] = 1; p[3] = 1; p[2] = 1; p[0] = 1;
    foreach (stream[i]) d.push_back(stream[i]);
    for (int i = 0; i < 16; i++) d.push_back(0);
    for (int i = 0; i < 16; i++) d[i] ^= seed[15 - i];
    for (int i = 0; i + 16 < d.size(); i++)
      if (d[i]) for (int j = 0; j <= 16; j++) d[i + j] ^= p[16 - j];
    lfsr_rem = '0;
    for (int i = 0; i < 16; i++) lfsr_rem[15 - i] = d[d.size() - 16 + i];
  endfunction

  initial begin
    logic [15:0] v, seed;
    bit st[$];
    int n;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // uncompacted shift
    for (int r = 0; r < 5; r++) begin
      v = 16'($urandom);
      wr_txr(v);
      wr_rxr(16'($urandom));
      chk(txr == v, "TxR write");
      shift = 1;
      for (int k = 0; k < 16; k++) begin
        sin = 1'($urandom);
        st.push_back(sin);
        #1 chk(txr_so == v[15 - k], "TxR serial out MSB first");
        @(posedge clk); #1;
      end
      shift = 0;
      for (int k = 0; k < 16; k++) chk(rxr[15 - k] == st[k], "RxR collected bit");
      chk(txr == 0, "TxR empty after 16 shifts");
      st.delete();
    end
    // pattern generator period
    seed = 16'h0001 + 16'($urandom % 65535);
    wr_txr(seed);
    tpg = 1; shift = 1;
    n = 0;
    do begin
      @(posedge clk); #1;
      n++;
    end while (txr != seed && n < 70000);
    shift = 0; tpg = 0;
    chk(n == 65535, $sformatf("TPG period %0d", n));
    // signature analysis
    for (int r = 0; r < 6; r++) begin
      seed = 16'($urandom);
      wr_rxr(seed);
      sa = 1; shift = 1;
      n = 20 + $urandom % 60;
      for (int k = 0; k < n; k++) begin
        sin = 1'($urandom);
        st.push_back(sin);
        @(posedge clk); #1;
      end
      shift = 0; sa = 0;
      v = lfsr_rem(seed, st);
      chk(rxr == v, $sformatf("signature %h expected %h", rxr, v));
      st.delete();
    end
    // clear
    wr_txr(16'hFFFF); wr_rxr(16'hFFFF);
    clr = 1; @(posedge clk); #1 clr = 0;
    chk(txr == 0 && rxr == 0, "clear");
    // scan: TxR then RxR
    wr_txr(16'hA5C3); wr_rxr(16'h1234);
    test = 1;
    for (int k = 0; k < 32; k++) begin
      #1 chk(scan_out == (k < 16 ? 1'(16'h1234 >> (15 - k)) : 1'(16'hA5C3 >> (31 - k))),
             $sformatf("scan out bit %0d", k));
      scan_in = 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
