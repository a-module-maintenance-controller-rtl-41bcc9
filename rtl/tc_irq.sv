// Test Channel interrupt circuit.
//
// IRQ = (!TEST & SR3 | EV0 | EV1) & CR3: the host is interrupted when TC has expired
// or a chip under test reports an event, provided CR3 enables interrupts. The SR3
// term is masked in scan mode because SR then holds scan data. Purely combinational.
// The equation is the source design's.
module tc_irq (
  input  logic test,
  input  logic sr3,
  input  logic ev0,
  input  logic ev1,
  input  logic irq_en,  // CR3
  output logic irq
);
  assign irq = ((~test & sr3) | ev0 | ev1) & irq_en;
endmodule
