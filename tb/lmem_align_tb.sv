// lmem_align_tb: for random antenna, modulation and lifting-size settings
// and every vector of a 24-column code block, checks that exactly MT*Q lanes
// are written, each at the word and lane given by the vector's flat L-value
// index (word = f / Z, lane = f mod Z), with the right element, and that a
// read returns the lanes in vector order. Also counts vectors that straddle
// two words.
module lmem_align_tb;
  import idd_pkg::*;
  det_cfg_t cfg; logic [VIDX_W-1:0] vidx; logic wvalid;
  lval_t [VEC_L-1:0] wvec, rvec; lm_wr_t wr; lval_t [ZMAX-1:0] rlanes;
  int checks = 0, failures = 0, split = 0;
  lmem_align dut (.*);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int zs [3] = '{27, 54, 81};
    int qs [3] = '{2, 4, 6};
    for (int c = 0; c < 12; c++) begin
      int z, mt, q, len, nv;
      z = zs[c % 3]; q = qs[(c / 3) % 3]; mt = (c % 4) + 1;
      len = mt*q;
      if (c == 0) begin z = 27; mt = 4; q = 6; len = 24; end
      nv = (NP*z) / len;
      cfg = '{mt: 3'(mt), q: 3'(q), ncb: NCB_W'(NP*z), z: Z_W'(z)};
      for (int v = 0; v < nv; v++) begin
        int nw;
        vidx = VIDX_W'(v); wvalid = 1;
        for (int e = 0; e < VEC_L; e++) wvec[e] = lval_t'($urandom);
        for (int k = 0; k < ZMAX; k++) rlanes[k] = lval_t'($urandom);
        #1;
        nw = 0;
        for (int k = 0; k < ZMAX; k++) nw += int'(wr.we[k]);
        checks++; if (nw != len) begin failures++; $display("lanes %0d != %0d", nw, len); end
        if ((v*len) / z != (v*len + len - 1) / z) split++;
        for (int e = 0; e < len; e++) begin
          int f, w, l, aw;
          f = v*len + e; w = f / z; l = f % z;
          aw = wr.a.sel1[l] ? int'(wr.a.addr1) : int'(wr.a.addr0);
          checks++;
          if (!wr.we[l] || aw != w || wr.d[l] != wvec[e] || rvec[e] != rlanes[l]) begin
            failures++;
            $display("cfg z=%0d mt=%0d q=%0d v=%0d e=%0d: we=%b word %0d/%0d", z, mt, q, v, e, wr.we[l], aw, w);
          end
        end
      end
    end
    checks++; if (split == 0) failures++;
    $display("vectors split over two words: %0d", split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
