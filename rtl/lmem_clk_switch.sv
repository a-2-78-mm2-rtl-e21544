// lmem_clk_switch: clock selection for the two shared L-memory blocks.
// Each block (CB1, CB2) is clocked either by the detector clock or by the
// decoder clock. det_cb_sel (detector domain) and dec_cb_sel (decoder domain)
// say which block each processing element owns: 0 = CB1, 1 = CB2. The control
// unit keeps them complementary and changes them only while neither element
// is running, so a block never receives both clocks. Each clock reaches a
// block only while its owner is running, through a clock gate whose enable
// is the AND of the running signal and the (inverted for CB1) select, and
// the two gated clocks are merged with an XOR; at most one of them is
// active, so the XOR passes it unchanged. Signal names, the AND terms, the
// clock gates and the XOR-shaped merging gate follow the published
// clock-switching drawing; the latch-based gating cell is this design's
// choice. The latch inside each clock gate is intentional.
module lmem_clk_switch (
  input  logic det_clk,
  input  logic dec_clk,
  input  logic det_cb_sel,
  input  logic det_running,
  input  logic dec_cb_sel,
  input  logic dec_running,
  output logic cb1_clk,
  output logic cb2_clk
);
  logic g_det1, g_det2, g_dec1, g_dec2;
  clk_gate u_det1 (.clk(det_clk), .en(det_running & ~det_cb_sel), .gclk(g_det1));
  clk_gate u_det2 (.clk(det_clk), .en(det_running &  det_cb_sel), .gclk(g_det2));
  clk_gate u_dec1 (.clk(dec_clk), .en(dec_running & ~dec_cb_sel), .gclk(g_dec1));
  clk_gate u_dec2 (.clk(dec_clk), .en(dec_running &  dec_cb_sel), .gclk(g_dec2));
  assign cb1_clk = g_det1 ^ g_dec1;
  assign cb2_clk = g_det2 ^ g_dec2;
endmodule
