// App1 core: full adder, boundary-scan register, feedback register, bypass.
//
// The full adder adds PD, PSUM and PCO into NSUM and NCO. PSUM and PCO come from the
// two-bit feedback register FB, which in functional operation loads NSUM and NCO on
// every CLK edge, so the adder accumulates. The boundary-scan register has three
// JTCELLs: the input cell between pin DIN and PD, and two output cells between NSUM
// and pin SUM and between NCO and pin CO, so the adder outputs are visible on the
// pins whenever the output cells pass through. A JTCELL's capture/shift stage captures
// the cell's output (S=0) or shifts (S=1) when /E1 is low; its update stage loads
// the shift stage when /E2 is low; its output is the update stage when /BP is high
// and the pass-through input otherwise. FB is made of two DRCELLs: a capture/shift
// stage (capturing NSUM/NCO) and an output stage that loads either the functional
// input (/FM=0) or the shift stage (/FM=1) when /E2 is low. The bypass register
// loads S & TDI every cycle.
// Scan paths: TDI -> DIN cell -> SUM cell -> CO cell -> so_bsr;
//             TDI -> PSUM cell -> PCO cell -> so_fb;  TDI -> BPR -> so_bpr.
// All registers use the rising edge of CLK. Cells, adder and connections follow the
// source design; the order of the cells along each scan path is this
// implementation's choice. The whole APOL control bundle is taken as one port, so
// the lint note that its instruction-register and TDO fields are unused here is
// expected and left as is.
module app1_core
  import app1_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  input  app1_ctl_t ctl,
  input  logic      tdi,
  input  logic      din,
  output logic      sum,
  output logic      co,
  output logic      pd,
  output logic      psum,
  output logic      pco,
  output logic      nsum,
  output logic      nco,
  output logic      so_bsr,
  output logic      so_fb,
  output logic      so_bpr
);

  logic [2:0] bsr_sh, bsr_up, bsr_q, bsr_d, bsr_bp_n;
  logic [1:0] fb_sh, fb_q, fb_d;
  logic       bpr;

  // full adder
  assign nsum = pd ^ psum ^ pco;
  assign nco  = (pd & psum) | (pd & pco) | (psum & pco);

  // boundary-scan register (cell 0: DIN/PD, cell 1: NSUM/SUM, cell 2: NCO/CO)
  assign bsr_d    = {nco, nsum, din};
  assign bsr_bp_n = {ctl.bpo_n, ctl.bpo_n, ctl.bpi_n};
  for (genvar i = 0; i < 3; i++) begin : g_bsr
    assign bsr_q[i] = bsr_bp_n[i] ? bsr_up[i] : bsr_d[i];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      bsr_sh <= '0;
      bsr_up <= '0;
    end else begin
      if (!ctl.bsr_e1_n) bsr_sh <= ctl.bsr_s ? {bsr_sh[1:0], tdi} : bsr_q;
      if (!ctl.bsr_e2_n) bsr_up <= bsr_sh;
    end
  end

  assign pd  = bsr_q[0];
  assign sum = bsr_q[1];
  assign co  = bsr_q[2];
  assign so_bsr = bsr_sh[2];

  // feedback register (cell 0: PSUM, cell 1: PCO)
  assign fb_d = {nco, nsum};
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      fb_sh <= '0;
      fb_q  <= '0;
    end else begin
      if (!ctl.fb_e1_n) fb_sh <= ctl.fb_s ? {fb_sh[0], tdi} : fb_d;
      if (!ctl.fb_e2_n) fb_q  <= ctl.fm_n ? fb_sh : fb_d;
    end
  end

  assign psum  = fb_q[0];
  assign pco   = fb_q[1];
  assign so_fb = fb_sh[1];

  // bypass register
  always_ff @(posedge clk or posedge reset) begin
    if (reset) bpr <= 1'b0;
    else        bpr <= ctl.bpr_s & tdi;
  end
  assign so_bpr = bpr;

endmodule
