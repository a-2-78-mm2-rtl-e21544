// ldpc_writeback: LDPC writeback unit. In the decoder's last iteration it
// receives the final a-posteriori L-values lambda^p of each block column,
// still in the column's cyclic rotation. In the same cycle it reads the
// column's lambda^a from the shared L-memory (ra; the port is switched to
// this unit while the decoder is in a write pass) and registers both
// (stage 1). Stage 2 rotates lambda^p back into natural order, forms
// lambda^e = sat(lambda^p - lambda^a) on the lanes below z and registers
// the shared-memory write and the hard decisions (lambda^p < 0 -> bit 1).
// Latency two cycles, one column per cycle. The structure (registers,
// shifter, subtractor) follows the published block diagram.
// Note: the writeback always accesses whole words, so the second-word
// address and the per-lane word selects of its write port are constant,
// and its read address is the incoming column itself.
module ldpc_writeback
  import idd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [Z_W-1:0]   z,
  input  logic             in_valid,
  input  logic [COL_W-1:0] in_col,
  input  logic [Z_W-1:0]   in_shift,
  input  lval_t [ZMAX-1:0] in_lp,
  output logic [COL_W-1:0] ra,
  input  lval_t [ZMAX-1:0] rd,
  output lm_wr_t           wr,
  output logic             hard_valid,
  output logic [COL_W-1:0] hard_col,
  output logic [ZMAX-1:0]  hard_bits,
  output logic             pending
);
  logic             v1;
  logic [COL_W-1:0] col1;
  logic [Z_W-1:0]   sh1;
  lval_t [ZMAX-1:0] lp1, la1, nat;
  logic [Z_W-1:0]   back;

  assign ra = in_col;
  assign back = (sh1 == '0) ? '0 : z - sh1;
  cyc_shift u_shift (.din(lp1), .rot(back), .z, .dout(nat));
  assign pending = v1 | wr.we[0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1 <= 1'b0; col1 <= '0; sh1 <= '0; lp1 <= '0; la1 <= '0;
      wr <= '0; hard_valid <= 1'b0; hard_col <= '0; hard_bits <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin col1 <= in_col; sh1 <= in_shift; lp1 <= in_lp; la1 <= rd; end
      hard_valid <= v1;
      wr.we <= '0;
      if (v1) begin
        wr.a <= '{addr0: col1, addr1: col1, sel1: '0};
        hard_col <= col1;
        for (int k = 0; k < ZMAX; k++) begin
          wr.we[k]     <= (k < int'(z));
          wr.d[k]      <= sat_l(16'(nat[k]) - 16'(la1[k]));
          hard_bits[k] <= (k < int'(z)) && nat[k][LW-1];
        end
      end
    end
endmodule
