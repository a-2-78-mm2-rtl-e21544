// ldpc_decoder_tb: builds a random quasi-cyclic code (12 x 24 blocks,
// dual-diagonal parity part), encodes random information bits, forms noisy
// channel L-values and decodes them for z = 27 and z = 81 with several
// iteration counts. The shared-memory read port is served from a
// testbench array. Every column handed to the writeback port is rotated
// back and compared with the layered offset-min-sum reference; each column
// must appear exactly once. Checks the cycle count of two cycles per
// prototype element per iteration and, at the larger iteration count, that
// the hard decisions equal the transmitted code word.
module ldpc_decoder_tb;
  import idd_pkg::*;
  import idd_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we, start, busy, done, wr_phase, wb_valid;
  logic [6:0] prog_addr; ldpc_instr_t prog_data;
  logic [Z_W-1:0] z, wb_shift; logic [7:0] n_elem; logic [3:0] iters; logic [LW-2:0] beta;
  logic [COL_W-1:0] ext_ra, wb_col; lval_t [ZMAX-1:0] ext_rd, wb_lp;
  int chan [NPC*ZMAX];
  int checks = 0, failures = 0;

  ldpc_decoder dut (.*);

  always_comb for (int k = 0; k < ZMAX; k++)
    ext_rd[k] = (k < int'(z)) ? lval_t'(chan[int'(ext_ra)*int'(z) + k]) : '0;

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int zs [2] = '{27, 81};
    prog_we = 0; start = 0; prog_addr = '0; prog_data = '0; z = '0; n_elem = '0; iters = '0; beta = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      code_t c; ldpc_instr_t p [96]; int n, zz, it, cyc, seen [NPC];
      bit bits [NPC*ZMAX]; int lv [NPC*ZMAX];
      zz = zs[run % 2]; it = (run < 2) ? 2 : 8;
      c = make_code(zz);
      n = make_prog(c, p);
      for (int k = 0; k < NPC*ZMAX; k++) bits[k] = 0;
      for (int k = 0; k < 12*zz; k++) bits[k] = bit'($urandom_range(1, 0));
      encode(c, zz, bits);
      for (int k = 0; k < NPC*zz; k++) begin
        chan[k] = lsat((bits[k] ? -6 : 6) + int'($urandom_range(10, 0)) - 5);
        if ($urandom_range(60, 0) == 0) chan[k] = bits[k] ? 2 : -2;   // a few wrong signs
        lv[k] = chan[k];
      end
      ref_ldpc(c, zz, it, 1, lv);
      for (int a = 0; a < n; a++) begin
        prog_we = 1; prog_addr = 7'(a); prog_data = p[a]; @(posedge clk); #1;
      end
      prog_we = 0;
      z = Z_W'(zz); n_elem = 8'(n); iters = 4'(it); beta = 4'd1;
      for (int k = 0; k < NPC; k++) seen[k] = 0;
      start = 1; @(posedge clk); #1 start = 0;
      cyc = 0;
      while (!done) begin
        if (wb_valid) begin
          seen[wb_col]++;
          for (int k = 0; k < zz; k++) begin
            int src; src = (k - int'(wb_shift) + zz) % zz;  // lane holding variable k
            checks++;
            if (int'(wb_lp[src]) != lv[int'(wb_col)*zz + k]) begin failures++; if (failures < 6) $display("run %0d col %0d k %0d got %0d exp %0d", run, wb_col, k, wb_lp[src], lv[int'(wb_col)*zz + k]); end
            if (it == 8) begin
              checks++;
              if ((wb_lp[src] < 0) != bits[int'(wb_col)*zz + k]) begin failures++; if (failures < 6) $display("hard run %0d", run); end
            end
          end
        end
        @(posedge clk); #1; cyc++;
      end
      for (int k = 0; k < NPC; k++) begin checks++; if (seen[k] != 1) failures++; end
      checks++;
      if (cyc != it*2*n) begin failures++; $display("cycles %0d, expected %0d", cyc, it*2*n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
