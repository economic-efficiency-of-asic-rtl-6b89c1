// clk_gate: clock gate for one function unit (the "clock signal protection" that keeps
// idle units from toggling).
//
// The enable is captured by a latch that is transparent while the clock is low, and the
// gated clock is the AND of the clock and the latched enable, so the gated clock never
// glitches when the enable changes during the high phase. A test-mode input forces the
// clock on. This is the usual integrated clock-gating cell; in a real implementation the
// library's ICG cell replaces it. The latch is intended and is the only one in the design.
// The paper states that idle function units are clock gated; this cell structure is the
// usual one, chosen here.
// Timing: enable must be stable by the rising clock edge; the gated edge follows it.
module clk_gate (
  input  logic clk,
  input  logic en,       // unit needs a clock edge at the next rising edge
  input  logic test_en,  // scan/test: clock always on
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en | test_en;
  end

  assign gclk = clk & en_l;
endmodule
