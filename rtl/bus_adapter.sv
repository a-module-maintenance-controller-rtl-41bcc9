// 8-to-16-bit data bus adapter.
//
// Lets a host with an 8-bit I/O data bus reach the 16-bit Test Channel registers.
// A 16-bit transfer takes two host cycles through a pair of byte buffers, both
// reached at the port address whose low nibble is F:
//  - write: the host first writes the high byte to address F, which the write
//    buffer holds (it latches HD on the rising edge of /PIOW); it then writes the
//    low byte to the register's own address, and the Test Channel sees one 16-bit
//    write made of the buffered high byte and the low byte on HD.
//  - read: a read of a register's own address returns the low byte and, on the
//    rising edge of /PIOR, stores the high byte in the read buffer; a following
//    read of address F returns that stored high byte.
// Accesses to F never reach the Test Channel (its /CS, /RD and /WR stay high).
// /CS is decoded from the address alone, so it is stable around the rising edge of
// /WR on which the Test Channel takes the write.
// Interface: host side HA[3:0], HD (split into hd_i/hd_o/hd_oe), /PIOR, /PIOW, /POR;
// Test Channel side PA, PD (tc_pd_o to the channel, tc_pd_i from it), /CS, /RD, /WR
// and the active-high RESET derived from /POR.
// The two-buffer scheme and the use of address F follow the source design; the
// edges on which the buffers load are this implementation's choice.
// The address and the low data byte pass straight through to the Test Channel, so
// those outputs follow inputs without logic in between.
module bus_adapter (
  input  logic        npor,
  input  logic [3:0]  ha,
  input  logic [7:0]  hd_i,
  output logic [7:0]  hd_o,
  output logic        hd_oe,
  input  logic        npior,
  input  logic        npiow,
  output logic [3:0]  tc_pa,
  output logic [15:0] tc_pd_o,
  input  logic [15:0] tc_pd_i,
  output logic        tc_ncs,
  output logic        tc_nrd,
  output logic        tc_nwr,
  output logic        tc_reset
);

  localparam logic [3:0] HI_ADDR = 4'hF;

  logic       hi_sel;
  logic [7:0] wbuf, rbuf;

  assign hi_sel   = (ha == HI_ADDR);
  assign tc_reset = ~npor;

  always_ff @(posedge npiow or negedge npor) begin
    if (!npor)       wbuf <= '0;
    else if (hi_sel) wbuf <= hd_i;
  end

  always_ff @(posedge npior or negedge npor) begin
    if (!npor)        rbuf <= '0;
    else if (!hi_sel) rbuf <= tc_pd_i[15:8];
  end

  assign tc_pa   = ha;
  assign tc_pd_o = {wbuf, hd_i};
  assign tc_nwr  = npiow | hi_sel;
  assign tc_nrd  = npior | hi_sel;
  assign tc_ncs  = hi_sel;

  assign hd_o  = hi_sel ? rbuf : tc_pd_i[7:0];
  assign hd_oe = ~npior;

endmodule
