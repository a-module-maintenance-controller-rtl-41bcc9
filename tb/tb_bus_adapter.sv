// Testbench for bus_adapter, the 8-to-16-bit host bus adapter.
//
// A host model does 16-bit transfers as byte pairs: a write puts the high byte at
// address F and then the low byte at the register's address; a read takes the
// low byte from the register's address and then the high byte from F. A model of
// the 16-bit device checks what it sees on its side during each strobe (address,
// 16-bit data, /CS, /WR, /RD) and answers reads from a register file kept here.
// Also checks that accesses to F never select the device and that RESET follows
// /POR.
module tb_bus_adapter;
  int checks = 0, failures = 0;
  logic npor = 0, npior = 1, npiow = 1;
  logic [3:0] ha = 0;
  logic [7:0] hd_i = 0, hd_o;
  logic hd_oe;
  logic [3:0] tc_pa;
  logic [15:0] tc_pd_o, tc_pd_i;
  logic tc_ncs, tc_nrd, tc_nwr, tc_reset;
  logic [15:0] regs[16];
  int n_dev_wr = 0;

  bus_adapter dut (.*);

  initial begin
    #200000;
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

  // device model: registers written on the rising edge of /WR while selected
  assign tc_pd_i = regs[tc_pa];
  always @(posedge tc_nwr) if (!tc_ncs) begin
    regs[tc_pa] = tc_pd_o;
    n_dev_wr++;
  end

  task automatic io_write(input logic [3:0] a, input logic [7:0] v);
    #5 ha = a; hd_i = v;
    #5 npiow = 0;
    #5 chk(a == 4'hF ? (tc_ncs && tc_nwr) : (!tc_ncs && !tc_nwr && tc_pa == a),
           "device select on write");
    chk(tc_nrd, "no device read during a write");
    #5 npiow = 1;
    #5 hd_i = 8'($urandom);
  endtask

  task automatic io_read(input logic [3:0] a, output logic [7:0] v);
    #5 ha = a;
    #5 npior = 0;
    #5 chk(hd_oe, "host data driven on read");
    chk(a == 4'hF ? (tc_ncs && tc_nrd) : (!tc_ncs && !tc_nrd && tc_pa == a),
        "device select on read");
    v = hd_o;
    #5 npior = 1;
    #1 chk(!hd_oe, "host data released");
  endtask

  initial begin
    logic [15:0] w[16];
    logic [7:0] lo, hi;
    int n;
    foreach (regs[i]) regs[i] = 16'($urandom);
    #10 chk(tc_reset, "RESET while /POR low");
    npor = 1;
    #1 chk(!tc_reset, "RESET released");
    for (int r = 0; r < 100; r++) begin
      logic [3:0] a;
      logic [15:0] v;
      a = 4'($urandom % 15);
      v = 16'($urandom);
      n = n_dev_wr;
      io_write(4'hF, v[15:8]);
      chk(n_dev_wr == n, "high byte write does not reach the device");
      io_write(a, v[7:0]);
      chk(n_dev_wr == n + 1 && regs[a] == v, $sformatf("16-bit write to %0d: %0d %h %h", a, n_dev_wr - n, regs[a], v));
      // read back, low byte first
      io_read(a, lo);
      io_read(4'hF, hi);
      chk({hi, lo} == regs[a], $sformatf("16-bit read from %0d: %h%h", a, hi, lo));
    end
    // device changes between reads: the high byte comes from the first read
    regs[3] = 16'hABCD;
    io_read(4'h3, lo);
    regs[3] = 16'h1234;
    io_read(4'hF, hi);
    chk({hi, lo} == 16'hABCD, "high byte held from the low-byte read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
