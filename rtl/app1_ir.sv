// App1 instruction register (IR, three IRCELLs).
//
// Each bit is an IRCELL: a capture/shift flip-flop (enabled by /E1, S selecting the
// serial input over the capture value) followed by an update flip-flop (enabled by
// /E2) that holds the active instruction. Both are clocked directly by CLK; no
// clock is gated. In Capture-IR the shift stages load the status 1, 0, ST into
// IR0, IR1, IR2; in Shift-IR data moves TDI -> IR0 -> IR1 -> IR2 -> so; in Update-IR
// the update stages take the shifted value. PRE (Test-Logic-Reset) presets the
// update stages to 111, the BYPASS instruction.
// Structure, capture values and shift order follow the source design.
module app1_ir (
  input  logic       clk,
  input  logic       reset,
  input  logic       pre,
  input  logic       si,
  input  logic       e1_n,
  input  logic       s,
  input  logic       e2_n,
  input  logic       st,
  output logic       so,
  output logic [2:0] ir     // ir[0] = IR0
);

  logic [2:0] sh;
  logic [2:0] cap;

  assign cap = {st, 1'b0, 1'b1};  // {IR2, IR1, IR0}

  always_ff @(posedge clk or posedge reset) begin
    if (reset)      sh <= '0;
    else if (!e1_n) sh <= s ? {sh[1:0], si} : cap;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)      ir <= 3'b111;
    else if (pre)   ir <= 3'b111;
    else if (!e2_n) ir <= sh;
  end

  assign so = sh[2];

endmodule
