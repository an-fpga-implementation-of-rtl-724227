// clock_gate: glitch-free clock gate.
//
// The document turns off the clocks of idle blocks to save power: the read
// logic and the field compute cores while the BRAMs are being loaded, the
// write logic while the cores compute.  This design gates with an enable
// captured on the falling clock edge and ANDed with the clock, so the gated
// clock can only start or stop while the clock is low and never produces a
// short pulse.  On the document's FPGA the same job is done by a global
// clock buffer with enable; this module is the portable equivalent.
//
// Timing: en must be stable around the falling edge; the gated clock
// follows it from the next rising edge.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_q;

  always_ff @(negedge clk) en_q <= en;

  assign gclk = clk & en_q;

endmodule
