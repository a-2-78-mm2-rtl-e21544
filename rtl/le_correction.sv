// le_correction: post-processing of the detector output. Every extrinsic
// L-value of a vector is replaced by lut[L], a programmable 32-entry table
// indexed by the 5-bit two's complement L-value, which holds a precomputed
// correction function. All L-values of a vector are corrected in parallel
// and the result is registered (one cycle latency, one vector per cycle).
// The table is written one entry per cycle through lut_we/lut_addr/lut_data
// and resets to the identity. The table approach is published; its size
// (all 5-bit inputs), reset contents and write port are this design's choices.
module le_correction
  import idd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lut_we,
  input  logic [LW-1:0]     lut_addr,
  input  lval_t             lut_data,
  input  logic              in_valid,
  input  sd_out_t           in_pkt,
  output logic              out_valid,
  output sd_out_t           out_pkt
);
  lval_t lut [2**LW];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int a = 0; a < 2**LW; a++) lut[a] <= lval_t'(a);
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      if (lut_we) lut[lut_addr] <= lut_data;
      out_valid   <= in_valid;
      out_pkt.idx <= in_pkt.idx;
      for (int e = 0; e < VEC_L; e++) out_pkt.le[e] <= lut[in_pkt.le[e]];
    end
endmodule
