// idd_top_tb: end-to-end test of the IDD receiver at its default sizes.
// A random quasi-cyclic LDPC code (24 block columns, z = 81, N_CB = 1944)
// is programmed into the decoder. Random information bits are encoded,
// mapped to 4x4 64-QAM received vectors over random triangular channels
// with noise, and loaded into both input-memory slots; both code blocks are
// then run through I = 2 IDD iterations with 4 LDPC iterations each, on two
// unrelated clocks (the decoder clock faster than the detector clock). A
// second pair of code blocks is run with two detector cores switched off.
// Checks: every decoded hard bit equals the transmitted code word; each
// block reports done once per pair; each detector run finishes within the
// throughput bound of the enabled cores, each decoder run takes two cycles
// per prototype element and iteration plus the writeback latency. Counts
// the mechanisms of the design (block swaps, overlap of detection and
// decoding, hard outputs, vectors split over two memory words, detector
// runs with switched-off cores) and fails if one never happened. Ring
// shifts of the detector input buffers are counted and reported only: the
// detector cores have a fixed run-time of MT+2 cycles, so the imbalance at
// the end of a code block that triggers a shift does not occur in this
// design (the shifter is exercised by its own testbench).
module idd_top_tb;
  import idd_pkg::*;
  import idd_ref_pkg::*;
  localparam int MT = 4, QB = 6, Z = 81, NCB = NPC*Z, LEN = MT*QB, NVEC = NCB/LEN;
  localparam int I_IDD = 2, I_LDPC = 4;
  logic det_clk = 0, dec_clk = 0, det_rst_n = 0, dec_rst_n = 0;
  always #7 det_clk = ~det_clk;
  always #3 dec_clk = ~dec_clk;

  det_cfg_t cfg; logic [4:0] core_en; logic [3:0] idd_iters, ldpc_iters; logic [7:0] n_elem; logic [3:0] beta;
  logic im_we, im_cb; logic [VIDX_W-1:0] im_idx; rxvec_t im_data;
  logic lut_we; logic [LW-1:0] lut_addr; lval_t lut_data;
  logic prog_we; logic [6:0] prog_addr; ldpc_instr_t prog_data;
  logic [1:0] cb_start, cb_busy, cb_done;
  logic hard_valid, hard_cb; logic [COL_W-1:0] hard_col; logic [ZMAX-1:0] hard_bits;
  logic det_running, dec_running, mem_cb_sel, shuffle;

  idd_top dut (.*);

  int checks = 0, failures = 0;
  int n_swap = 0, n_overlap = 0, n_shuffle = 0, n_hard = 0, n_split = 0, n_gated = 0;
  int n_done [2], det_runs = 0, dec_runs = 0, n_elem_i;
  bit cw [2][NPC*ZMAX];
  int hard_seen [2][NPC];

  initial begin #60000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---- monitors ----
  logic sel_d = 0;
  always @(posedge dec_clk) if (dec_rst_n) begin
    sel_d <= mem_cb_sel;
    if (sel_d != mem_cb_sel) n_swap++;
    if (det_running && dec_running) n_overlap++;
    for (int s = 0; s < 2; s++) if (cb_done[s]) n_done[s]++;
    if (hard_valid) begin
      n_hard++;
      hard_seen[hard_cb][hard_col]++;
      for (int k = 0; k < Z; k++) begin
        checks++;
        if (hard_bits[k] != cw[hard_cb][int'(hard_col)*Z + k]) begin failures++; if (failures < 10) $display("bit error: block %0d column %0d lane %0d", hard_cb, hard_col, k); end
      end
    end
  end
  always @(posedge det_clk) if (det_rst_n && shuffle) n_shuffle++;

  // detector run time (detector clock cycles)
  initial begin
    @(posedge det_rst_n);
    forever begin
      int cyc, bound, nc;
      @(posedge det_running);
      cyc = 0; nc = $countones(core_en);
      if (nc < 5) n_gated++;
      while (det_running) begin @(posedge det_clk); cyc++; end
      det_runs++;
      bound = ((NVEC + nc - 1) / nc) * (MT + 2) + 12;
      checks++;
      if (cyc > bound) begin failures++; $display("detector run: %0d cycles > %0d", cyc, bound); end
    end
  end
  // decoder run time (decoder clock cycles)
  initial begin
    @(posedge dec_rst_n);
    forever begin
      int cyc;
      @(posedge dec_running);
      cyc = 0;
      while (dec_running) begin @(posedge dec_clk); cyc++; end
      dec_runs++;
      checks++;
      // 2 cycles per element and iteration, plus 3 cycles of pipeline and writeback
      if (cyc != I_LDPC*2*n_elem_i + 3) begin
        failures++; $display("decoder run: %0d cycles, expected %0d", cyc, I_LDPC*2*n_elem_i + 3);
      end
    end
  end

  task automatic load_block(input int s, input code_t c);
    for (int k = 0; k < NPC*ZMAX; k++) cw[s][k] = 0;
    for (int k = 0; k < 12*Z; k++) cw[s][k] = bit'($urandom_range(1, 0));
    encode(c, Z, cw[s]);
    for (int v = 0; v < NVEC; v++) begin
      bit [VEC_L-1:0] bits;
      for (int e = 0; e < LEN; e++) bits[e] = cw[s][v*LEN + e];
      @(negedge det_clk);
      im_we = 1; im_cb = s[0]; im_idx = VIDX_W'(v);
      im_data = gen_vec(MT, QB, 12, 40, 12, 6, bits);
      if ((v*LEN) / Z != (v*LEN + LEN - 1) / Z) n_split++;
    end
    @(negedge det_clk); im_we = 0;
  endtask

  initial begin
    code_t c; ldpc_instr_t p [96];
    cfg = '{mt: 3'(MT), q: 3'(QB), ncb: NCB_W'(NCB), z: Z_W'(Z)};
    core_en = '1; idd_iters = 4'(I_IDD); ldpc_iters = 4'(I_LDPC); beta = 4'd1;
    im_we = 0; im_cb = 0; im_idx = '0; im_data = '0; lut_we = 0; lut_addr = '0; lut_data = '0;
    prog_we = 0; prog_addr = '0; prog_data = '0; cb_start = '0;
    n_done[0] = 0; n_done[1] = 0;
    for (int s = 0; s < 2; s++) for (int j = 0; j < NPC; j++) hard_seen[s][j] = 0;
    c = make_code(Z);
    n_elem_i = make_prog(c, p);
    n_elem = 8'(n_elem_i);
    #50 det_rst_n = 1; dec_rst_n = 1;
    for (int a = 0; a < n_elem_i; a++) begin
      @(negedge dec_clk); prog_we = 1; prog_addr = 7'(a); prog_data = p[a];
    end
    @(negedge dec_clk); prog_we = 0;
    for (int pair = 0; pair < 2; pair++) begin
      core_en = (pair == 0) ? 5'b11111 : 5'b10110;
      for (int s = 0; s < 2; s++) for (int j = 0; j < NPC; j++) hard_seen[s][j] = 0;
      load_block(0, c);
      load_block(1, c);
      @(negedge dec_clk); cb_start = 2'b11;
      @(negedge dec_clk); cb_start = '0;
      while (n_done[0] + n_done[1] < 2*(pair + 1)) @(posedge dec_clk);
      for (int s = 0; s < 2; s++) for (int j = 0; j < NPC; j++) begin
        checks++; if (hard_seen[s][j] != 1) failures++;
      end
      repeat (10) @(posedge dec_clk);
    end
    checks++; if (n_done[0] != 2 || n_done[1] != 2) failures++;
    checks++; if (det_runs != 4*I_IDD || dec_runs != 4*I_IDD) failures++;
    $display("swaps %0d, det/dec overlap cycles %0d, ring shifts %0d, hard outputs %0d,",
             n_swap, n_overlap, n_shuffle, n_hard);
    $display("split vectors %0d, detector runs with cores off %0d, det runs %0d, dec runs %0d",
             n_split, n_gated, det_runs, dec_runs);
    checks++; if (n_swap == 0) failures++;
    checks++; if (n_overlap == 0) failures++;
    checks++; if (n_hard == 0) failures++;
    checks++; if (n_split == 0) failures++;
    checks++; if (n_gated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
