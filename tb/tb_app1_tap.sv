// Testbench for app1_tap, the App1 TAP controller.
//
// A reference TAP controller written in this file from the IEEE 1149.1 state
// diagram (its own state names, mapped to the D,C,B,A codes only for the
// comparison) follows the same random TMS stream for 2000 cycles, with occasional
// /TRST and RESET pulses; the state is compared after every CLK edge. Also checks
// that five TMS = 1 cycles reach Test-Logic-Reset from every state.
module tb_app1_tap;
  import app1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset = 1, ntrst = 1, tms = 1;
  tap_state_e state;

  app1_tap dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    R_TLR, R_RTI, R_SELDR, R_CAPDR, R_SHDR, R_EX1DR, R_PDR, R_EX2DR, R_UPDR,
    R_SELIR, R_CAPIR, R_SHIR, R_EX1IR, R_PIR, R_EX2IR, R_UPIR
  } ref_t;

  function automatic ref_t ref_next(input ref_t s, input logic m);
    case (s)
      R_TLR:   return m ? R_TLR   : R_RTI;
      R_RTI:   return m ? R_SELDR : R_RTI;
      R_SELDR: return m ? R_SELIR : R_CAPDR;
      R_CAPDR: return m ? R_EX1DR : R_SHDR;
      R_SHDR:  return m ? R_EX1DR : R_SHDR;
      R_EX1DR: return m ? R_UPDR  : R_PDR;
      R_PDR:   return m ? R_EX2DR : R_PDR;
      R_EX2DR: return m ? R_UPDR  : R_SHDR;
      R_UPDR:  return m ? R_SELDR : R_RTI;
      R_SELIR: return m ? R_TLR   : R_CAPIR;
      R_CAPIR: return m ? R_EX1IR : R_SHIR;
      R_SHIR:  return m ? R_EX1IR : R_SHIR;
      R_EX1IR: return m ? R_UPIR  : R_PIR;
      R_PIR:   return m ? R_EX2IR : R_PIR;
      R_EX2IR: return m ? R_UPIR  : R_SHIR;
      default: return m ? R_SELDR : R_RTI;
    endcase
  endfunction

  // state codes of the IEEE 1149.1 example implementation, D C B A
  function automatic logic [3:0] code(input ref_t s);
    logic [3:0] c[16] = '{4'hF, 4'hC, 4'h7, 4'h6, 4'h2, 4'h1, 4'h3, 4'h0, 4'h5,
                          4'h4, 4'hE, 4'hA, 4'h9, 4'hB, 4'h8, 4'hD};
    return c[int'(s)];
  endfunction

  ref_t r;
  int visited[16];
  // TMS paths (first bit first) from Test-Logic-Reset to each state, in ref_t order
  int plen[16] = '{0, 1, 2, 3, 4, 4, 5, 6, 5, 3, 4, 5, 5, 6, 7, 6};
  logic [7:0] path[16] = '{8'b0, 8'b0, 8'b10, 8'b010, 8'b0010, 8'b1010, 8'b01010,
                           8'b101010, 8'b11010, 8'b110, 8'b0110, 8'b00110, 8'b10110,
                           8'b010110, 8'b1010110, 8'b110110};

  initial begin
    r = R_TLR;
    visited = '{default: 0};
    repeat (2) @(posedge clk);
    #1 reset = 0;
    checks++;
    if (state !== TLR) begin failures++; $display("FAIL reset state"); end
    for (int i = 0; i < 2000; i++) begin
      tms = ($urandom % 8) < 3;
      if (i % 300 == 150) ntrst = 0;
      @(posedge clk);
      r = ntrst ? ref_next(r, tms) : R_TLR;
      #1;
      ntrst = 1;
      if (!ntrst) r = R_TLR;
      checks++;
      if (4'(state) !== code(r)) begin
        failures++;
        $display("FAIL cycle %0d: state %h expected %h (%s)", i, state, code(r), r.name());
      end
      visited[int'(r)]++;
    end
    // /TRST asynchronous
    tms = 0;
    repeat (3) @(posedge clk);
    #2 ntrst = 0;
    #1 checks++;
    if (state !== TLR) begin failures++; $display("FAIL /TRST not asynchronous"); end
    #1 ntrst = 1;
    // five TMS=1 reach Test-Logic-Reset from every state
    for (int s0 = 0; s0 < 16; s0++) begin
      reset = 1; #1 reset = 0;
      r = R_TLR;
      // walk from Test-Logic-Reset to state s0 along a fixed TMS path
      for (int k = 0; k < plen[s0]; k++) begin
        tms = path[s0][k];
        @(posedge clk); #1;
      end
      checks++;
      if (4'(state) !== code(ref_t'(s0))) begin
        failures++;
        $display("FAIL could not reach %s", ref_t'(s0));
      end
      tms = 1;
      repeat (5) @(posedge clk);
      #1 checks++;
      if (state !== TLR) begin failures++; $display("FAIL 5xTMS from %s", ref_t'(s0)); end
    end
    foreach (visited[k]) begin
      checks++;
      if (visited[k] == 0) begin failures++; $display("FAIL state %0d never visited", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
