// Testbench for tc_host_if, the Test Channel host interface.
//
// Performs asynchronous host writes (/CS and /WR low, address and data held over
// the rising edge of /WR) with random timing relative to CLK and checks: exactly one write
// strobe, for the addressed register only, one CLK cycle wide, asserted by the
// first CLK edge after /WR rises; the data of the write on WDATA; FEN following
// bit 0 of writes to the synchronisation register; no strobe for a write with /CS
// high or in scan mode; the read output enable; and the scan path AEN -> FEN.
module tb_tc_host_if;
  import tc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, test = 0, scan_in = 0, scan_out;
  logic ncs = 1, nwr = 1, nrd = 1;
  logic [3:0] pa = 0;
  logic [15:0] pd_i = 0, wdata;
  tc_wr_t wr;
  logic fen, oe, aeng;

  tc_host_if dut (.*);

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
      $display("FAIL %s (wr=%b fen=%0d)", what, wr, fen);
    end
  endtask

  function automatic tc_wr_t strobe_of(input logic [3:0] a);
    tc_wr_t w = '0;
    case (a)
      A_CR:     w.cr = 1;
      A_CNR:    w.cnr = 1;
      A_STR:    w.str = 1;
      A_TC:     w.tc = 1;
      A_TXR:    w.txr = 1;
      A_RXR:    w.rxr = 1;
      A_SYNR:   w.synr = 1;
      A_SRCLR:  w.srclr = 1;
      A_SOFTRS: w.softrs = 1;
      default:  ;
    endcase
    return w;
  endfunction

  task automatic host_write(input logic [3:0] a, input logic [15:0] d, input logic cs_n);
    #($urandom % 10);
    pa = a; pd_i = d; ncs = cs_n;
    #3 nwr = 0;
    #(4 + $urandom % 20);
    // /WR rises at a random point of the second half of a CLK period
    @(negedge clk);
    #(1 + $urandom % 3) nwr = 1;
    fork
      begin
        #1 ncs = 1; pa = 4'($urandom); pd_i = 16'($urandom);
      end
    join_none
  endtask

  initial begin
    logic [3:0] a;
    logic [15:0] d;
    logic exp_fen;
    int seen, first;
    exp_fen = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 120; i++) begin
      a = 4'($urandom);
      d = 16'($urandom);
      host_write(a, d, 1'b0);
      // find strobe: must appear on the first clock edge after /WR rose
      seen = 0; first = -1;
      for (int c = 0; c < 4; c++) begin
        @(posedge clk); #1;
        if (wr != 0) begin
          seen++;
          if (first < 0) first = c;
          chk(wr == strobe_of(a), $sformatf("strobe for address %0d", a));
          chk(wdata == d, "write data");
          chk(aeng, "AEN visible");
        end
      end
      if (strobe_of(a) != 0) begin
        chk(seen == 1, $sformatf("one strobe cycle, saw %0d", seen));
        chk(first == 0, $sformatf("strobe on first edge, was edge %0d", first));
      end else chk(seen == 0, "no strobe for unused address");
      if (a == A_SYNR) exp_fen = d[0];
      chk(fen == exp_fen, "FEN follows SYNR bit 0");
    end
    // /CS high: ignored
    host_write(A_SYNR, 16'h0001 ^ 16'(exp_fen), 1'b1);
    repeat (3) @(posedge clk);
    #1 chk(fen == exp_fen, "write without /CS ignored");
    // read enable
    ncs = 0; nrd = 0; #1 chk(oe, "OE on read");
    ncs = 1; #1 chk(!oe, "no OE without /CS");
    ncs = 0; nrd = 1; #1 chk(!oe, "no OE without /RD");
    ncs = 1;
    // scan mode: writes do nothing, AEN -> FEN shift
    test = 1;
    host_write(A_CR, 16'h0003, 1'b0);
    for (int c = 0; c < 3; c++) begin
      @(posedge clk); #1 chk(wr == 0 && !aeng, "no strobe in scan mode");
    end
    scan_in = 1; @(posedge clk); #1 scan_in = 0;
    @(posedge clk); #1 chk(fen == 1 && scan_out == 1, "scan AEN->FEN");
    @(posedge clk); #1 chk(fen == 0, "scan shift on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
