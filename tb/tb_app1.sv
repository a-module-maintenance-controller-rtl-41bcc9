// Testbench for app1, the boundary-scan test chip, through its TAP pins only.
//
// A JTAG driver in this file walks the TAP with TMS and shifts instruction and
// data registers, sampling TDO on the rising edge of CLK (TDO changes on the
// falling edge). Checks:
//  - after reset BYPASS is selected and the instruction register captures the
//    status 1, 0, 1 (IR2 first out);
//  - BYPASS delays TDI by one bit and captures 0;
//  - EXTEST drives SUM and CO from the scan cells and captures DIN;
//  - SAMPLE captures DIN, SUM and CO while the pins pass through;
//  - the full-adder truth table: for each of the 8 input combinations PD is set
//    through INTEST and PSUM/PCO through SCANFB; the sum must appear on the SUM
//    and CO pins and stay there, and a SCANFB capture must return it;
//  - TDO is high outside the shift states, and /TRST selects BYPASS again.
module tb_app1;
  import app1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, ntrst = 1, tms = 1, tdi = 0, din = 0;
  logic tdo, sum, co, pd, psum, pco, nsum, nco, a, b, c, d;
  logic extest, intest, sample, scanfb, bypass;

  app1 dut (.*);

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

  // one TCK cycle: TMS/TDI change after the falling edge, TDO read at the rising edge
  task automatic tck(input logic m, input logic i, output logic o);
    @(negedge clk);
    #1 tms = m; tdi = i;
    @(posedge clk);
    o = tdo;
    #1;
  endtask

  task automatic goto_rti();
    logic o;
    repeat (5) tck(1, 0, o);
    tck(0, 0, o);
  endtask

  // from Run-Test/Idle: scan n bits (in[0] first) into IR or DR, back to Run-Test/Idle.
  // If stop_in_update is set, stop in Update-DR/IR instead.
  task automatic scan(input bit ir, input int n, input logic [15:0] in, output logic [15:0] out,
                      input bit stop_in_update = 0);
    logic o;
    out = 0;
    tck(1, 0, o);            // Select-DR
    if (ir) tck(1, 0, o);    // Select-IR
    tck(0, 0, o);            // Capture
    tck(0, 0, o);            // Shift
    for (int k = 0; k < n; k++) begin
      tck(k == n - 1, in[k], o);
      out[k] = o;
    end
    tck(1, 0, o);            // Update
    if (!stop_in_update) tck(0, 0, o);  // Run-Test/Idle
  endtask

  // IR0 IR1 IR2; shifted IR2 first
  task automatic load_ir(input logic [2:0] ir012, output logic [15:0] cap);
    scan(1, 3, {13'b0, ir012}, cap);
  endtask

  localparam logic [2:0] EXTEST = 3'b000, INTEST = 3'b001, SAMPLE = 3'b010,
                         SCANFB = 3'b011, BYPASS = 3'b100;

  initial begin
    logic [15:0] o16;
    logic o;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    chk(bypass && {d, c, b, a} == 4'hF, "reset: Test-Logic-Reset and BYPASS");
    goto_rti();
    chk({d, c, b, a} == 4'hC, "Run-Test/Idle code");
    chk(tdo == 1'b1, "TDO high outside shift states");

    // instruction capture and BYPASS
    load_ir(BYPASS, o16);
    chk(o16[2:0] == 3'b101, $sformatf("IR capture %b, expected 101 (IR2 first)", o16[2:0]));
    chk(bypass, "BYPASS decoded");
    scan(0, 10, 16'b1011001110, o16);
    chk(o16[0] == 1'b0 && o16[9:1] == 9'b011001110, "bypass register: one-bit delay");

    // EXTEST: drive SUM/CO from the cells, capture DIN
    load_ir(EXTEST, o16);
    chk(extest && !bypass, "EXTEST decoded");
    scan(0, 3, 16'b011, o16);       // CO cell <- 1, SUM cell <- 1, DIN cell <- 0
    chk(sum == 1 && co == 1, "EXTEST drives SUM and CO from the scan cells");
    scan(0, 3, 16'b100, o16);       // CO <- 0, SUM <- 0, DIN <- 1
    chk(sum == 0 && co == 0, "EXTEST output update");
    chk(o16[1:0] == 2'b11, "EXTEST captures the driven output values");
    din = 1;
    scan(0, 3, 16'b000, o16);
    chk(o16[2] == 1'b1, "EXTEST captures DIN");
    din = 0;
    scan(0, 3, 16'b000, o16);
    chk(o16[2] == 1'b0, "EXTEST captures DIN low");

    // SAMPLE: pins pass through, capture observes them
    load_ir(SAMPLE, o16);
    chk(sample, "SAMPLE decoded");
    din = 1;
    #1 chk(pd == 1, "SAMPLE: PD follows DIN");
    @(posedge clk); #1;
    scan(0, 3, 16'b000, o16);
    chk(o16[2] == 1'b1, "SAMPLE captures DIN");
    din = 0;

    // full-adder truth table through INTEST and SCANFB
    for (int v = 0; v < 8; v++) begin
      logic vpd, vps, vpc;
      int tot;
      {vpd, vps, vpc} = 3'(v);
      load_ir(INTEST, o16);
      chk(intest, "INTEST decoded");
      scan(0, 3, {13'b0, vpd, 2'b00}, o16);      // DIN/PD cell gets the last bit
      chk(pd == vpd, "INTEST applies PD from the scan cell");
      load_ir(SCANFB, o16);
      chk(scanfb, "SCANFB decoded");
      scan(0, 2, {14'b0, vps, vpc}, o16);        // PCO cell first, then PSUM
      tot = int'(vpd) + int'(vps) + int'(vpc);
      chk(pd == vpd && psum == vps && pco == vpc, $sformatf("adder inputs for vector %0d", v));
      chk({nco, nsum} == 2'(tot) && {co, sum} == 2'(tot),
          $sformatf("full adder %0d%0d%0d -> CO SUM %0d%0d", vpd, vps, vpc, co, sum));
      repeat (5) @(posedge clk);
      #1 chk(psum == vps && pco == vpc && {co, sum} == 2'(tot),
             $sformatf("SCANFB holds the vector: %0d%0d %0d%0d ir=%0d tap=%h tms=%0d v=%0d", psum, pco, co, sum, scanfb, {d,c,b,a}, tms, v));
      // the feedback register captures NCO/NSUM in Capture-DR
      scan(0, 2, 16'b0, o16);
      chk({o16[0], o16[1]} == 2'(tot), "SCANFB captures NCO/NSUM");
    end

    // /TRST
    load_ir(EXTEST, o16);
    ntrst = 0;
    #1 chk({d, c, b, a} == 4'hF, "/TRST resets the TAP at once");
    @(posedge clk); #1 chk(bypass, "Test-Logic-Reset selects BYPASS on the next edge");
    ntrst = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
