// clock_gate: integrated clock gating cell. gclk follows clk while en is
// high and stays low while en is low.
//
// The enable is captured by a latch that is transparent while clk is low
// and closed while clk is high, and the latched enable is ANDed with clk.
// An enable that changes after a rising edge therefore only takes effect
// from the next rising edge, and gclk never shows a shortened pulse. The
// AND of clock and enable is what the document uses; the latch in front of
// it is the usual gating cell the document shows for comparison and is
// this implementation's choice, because a bare AND would glitch when the
// enable register changes while clk is high. The latch is intended and is
// the only one in the design.
//
// Ports: clk, en, gclk. en must be stable around the rising edge of clk.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
