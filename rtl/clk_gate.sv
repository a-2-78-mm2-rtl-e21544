// clk_gate: glitch-free clock gate (integrated clock-gating cell). The enable
// is captured by a latch that is transparent while clk is low, so the gated
// clock only ever passes whole high phases of clk. The latch is intentional:
// it is the standard clock-gating structure and is what makes the gating
// glitch-free. Used for the SD cores (selective deactivation) and for the
// shared L-memory clocks.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch
    if (!clk) en_l = en;
  assign gclk = clk & en_l;
endmodule
