// ldpc_writeback_tb: feeds random rotated lambda^p columns; serves the
// shared-memory read port from a testbench array and checks, two cycles
// later, the write address, the lane enables (lanes below z), the
// lambda^e = sat(lambda^p - lambda^a) values in natural order and the hard
// decisions.
module ldpc_writeback_tb;
  import idd_pkg::*;
  import idd_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [Z_W-1:0] z, in_shift; logic in_valid, hard_valid, pending;
  logic [COL_W-1:0] in_col, ra, hard_col; lval_t [ZMAX-1:0] in_lp, rd; lm_wr_t wr; logic [ZMAX-1:0] hard_bits;
  int la [NP][ZMAX];
  int checks = 0, failures = 0;
  ldpc_writeback dut (.*);

  always_comb for (int k = 0; k < ZMAX; k++) rd[k] = lval_t'(la[ra][k]);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int zs [3] = '{27, 54, 81};
    in_valid = 0; in_col = '0; in_shift = '0; in_lp = '0; z = Z_W'(27);
    for (int j = 0; j < NP; j++) for (int k = 0; k < ZMAX; k++) la[j][k] = int'($urandom_range(30, 0)) - 15;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      int zz, sh, col, nat [ZMAX];
      zz = zs[n % 3]; sh = int'($urandom_range(zz-1, 0)); col = int'($urandom_range(NP-1, 0));
      z = Z_W'(zz); in_valid = 1; in_col = COL_W'(col); in_shift = Z_W'(sh);
      for (int k = 0; k < ZMAX; k++) in_lp[k] = lval_t'($urandom);
      // lane m of the rotated column holds natural position (m + sh) mod z
      for (int m = 0; m < zz; m++) nat[(m + sh) % zz] = int'(in_lp[m]);
      @(posedge clk); #1 in_valid = 0;
      @(posedge clk); #1;
      checks++;
      if (!hard_valid || int'(hard_col) != col || wr.a.addr0 != COL_W'(col) || wr.a.sel1 != '0) failures++;
      for (int k = 0; k < ZMAX; k++) begin
        checks++;
        if (k < zz) begin
          if (!wr.we[k] || int'(wr.d[k]) != lsat(nat[k] - la[col][k]) || hard_bits[k] != (nat[k] < 0)) failures++;
        end else if (wr.we[k]) failures++;
      end
      @(posedge clk); #1;
      checks++; if (wr.we != '0 || pending) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
