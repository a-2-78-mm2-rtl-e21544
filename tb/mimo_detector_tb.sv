// mimo_detector_tb: the multi-core detector against a behavioural shared
// L-memory block. Loads random received vectors into both input-memory
// slots, pre-fills the memory with random lambda^a, and runs code blocks
// with all five cores and with two cores switched off, in first-iteration
// mode (lambda^a forced to zero) and with priors, for 4x4 64-QAM (z = 27
// and 81) and 2x2 16-QAM. After each run every L-value of the block must
// equal the reference lambda^e of its vector. Checks the run time against
// the throughput of the enabled cores (MT + 2 cycles per vector and core)
// and of the dispatcher (one vector per cycle), plus a pipeline allowance.
// Ring shifts are counted and reported; with fixed-run-time cores they do
// not occur in these runs.
module mimo_detector_tb;
  import idd_pkg::*;
  import idd_ref_pkg::*;
  localparam int NC = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  det_cfg_t cfg; logic [NC-1:0] core_en; logic start, cb, first, running, done;
  logic im_we, im_cb; logic [VIDX_W-1:0] im_idx; rxvec_t im_data;
  logic lut_we; logic [LW-1:0] lut_addr; lval_t lut_data;
  lm_addr_t lm_ra; lval_t [ZMAX-1:0] lm_rd; lm_wr_t lm_wr; logic shift;
  int mem [NP][ZMAX];
  rxvec_t vecs [2][81];
  int checks = 0, failures = 0, shifts = 0;

  mimo_detector #(.NC(NC), .DEPTH(162), .MSHIFT(6)) dut (.*);

  always_comb for (int k = 0; k < ZMAX; k++)
    lm_rd[k] = lval_t'(mem[lm_ra.sel1[k] ? lm_ra.addr1 : lm_ra.addr0][k]);
  always @(posedge clk) begin
    for (int k = 0; k < ZMAX; k++)
      if (lm_wr.we[k]) mem[lm_wr.a.sel1[k] ? lm_wr.a.addr1 : lm_wr.a.addr0][k] <= int'(lm_wr.d[k]);
    if (rst_n && shift) shifts++;
  end

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    start = 0; cb = 0; first = 0; im_we = 0; im_cb = 0; im_idx = '0; im_data = '0;
    lut_we = 0; lut_addr = '0; lut_data = '0; core_en = '1; cfg = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int run = 0; run < 6; run++) begin
      int mt, q, z, nvec, len, cyc, ncores, bound;
      int la [NP*ZMAX];
      mt = (run < 4) ? 4 : 2; q = (run < 4) ? 6 : 4; z = (run % 2 == 0 || run >= 4) ? 27 : 81;
      len = mt*q; nvec = NP*z/len;
      cfg = '{mt: 3'(mt), q: 3'(q), ncb: NCB_W'(NP*z), z: Z_W'(z)};
      core_en = (run >= 2 && run < 4) ? 5'b01101 : 5'b11111;
      ncores = $countones(core_en);
      cb = run[0]; first = (run % 3 == 0);
      // input memory
      for (int v = 0; v < nvec; v++) begin
        bit [VEC_L-1:0] bits;
        bits = VEC_L'($urandom);
        vecs[cb][v] = gen_vec(mt, q, 8, 60, 15, 20, bits);
        im_we = 1; im_cb = cb; im_idx = VIDX_W'(v); im_data = vecs[cb][v];
        @(posedge clk); #1;
      end
      im_we = 0;
      for (int j = 0; j < NP; j++) for (int k = 0; k < ZMAX; k++) begin
        mem[j][k] = int'($urandom_range(30, 0)) - 15;
        la[j*z + k] = mem[j][k];
      end
      start = 1; @(posedge clk); #1 start = 0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      checks++; if (running) failures++;
      // cores: MT+2 cycles per vector each; dispatcher and collector: one
      // vector per cycle
      bound = ((nvec + ncores - 1) / ncores) * (mt + 2);
      if (bound < nvec) bound = nvec;
      bound += 12;
      checks++;
      if (cyc > bound) begin failures++; $display("run %0d: %0d cycles > %0d", run, cyc, bound); end
      $display("run %0d: %0d vectors in %0d cycles (%0d cores)", run, nvec, cyc, ncores);
      for (int v = 0; v < nvec; v++) begin
        lval_t [VEC_L-1:0] lav, le;
        lav = '0;
        for (int e = 0; e < len; e++) lav[e] = first ? lval_t'(0) : lval_t'(la[v*len + e]);
        ref_sd(vecs[cb][v], lav, mt, q, 6, le);
        for (int e = 0; e < len; e++) begin
          int f; f = v*len + e;
          checks++;
          if (mem[f / z][f % z] != int'(le[e])) begin
            failures++;
            if (failures < 5) $display("run %0d v %0d e %0d: %0d exp %0d", run, v, e, mem[f/z][f%z], le[e]);
          end
        end
      end
    end
    $display("shifts %0d", shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
