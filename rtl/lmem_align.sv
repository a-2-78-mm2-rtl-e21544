// lmem_align: alignment unit between the detector and a shared L-memory
// block. Received vector v carries L-values v*MT*Q ... v*MT*Q+MT*Q-1 of the
// code block; with j0 = (v*MT*Q) / Z and k0 = (v*MT*Q) mod Z they start at
// lane k0 of word j0 and may continue at lane 0 of word j0+1. The unit
// derives the two word addresses and the per-lane word select for the
// memory's address decoder, rotates a vector into lane position for a write
// (write enables only on the vector's lanes) and rotates lanes back into
// vector order for a read. Element e of a vector is bit e mod Q of antenna
// e / Q. Combinational. Requires Z >= MT*Q (true for all codes with Z >= 27).
module lmem_align
  import idd_pkg::*;
(
  input  det_cfg_t          cfg,
  input  logic [VIDX_W-1:0] vidx,
  // write side
  input  logic              wvalid,
  input  lval_t [VEC_L-1:0] wvec,
  output lm_wr_t            wr,
  // read side (the address is wr.a)
  input  lval_t [ZMAX-1:0]  rlanes,
  output lval_t [VEC_L-1:0] rvec
);
  logic [NCB_W+4:0] b;
  logic [COL_W-1:0] j0;
  logic [Z_W-1:0]   k0;
  logic [4:0]       len;

  always_comb begin
    len = 5'(cfg.mt * cfg.q);
    b   = (NCB_W+5)'(vidx) * (NCB_W+5)'(len);
    j0  = COL_W'(b / (NCB_W+5)'(cfg.z));
    k0  = Z_W'(b % (NCB_W+5)'(cfg.z));
  end

  always_comb begin
    wr.a.addr0 = j0;
    wr.a.addr1 = j0 + 1'b1;
    for (int k = 0; k < ZMAX; k++) begin
      logic [Z_W:0] e;   // vector element that lands on lane k
      logic         in0, in1;
      in0 = (k < int'(cfg.z)) && (Z_W'(k) >= k0) && ((Z_W+1)'(k) < (Z_W+1)'(k0) + (Z_W+1)'(len));
      in1 = (Z_W'(k) < k0) && ((Z_W+2)'(k) + (Z_W+2)'(cfg.z) < (Z_W+2)'(k0) + (Z_W+2)'(len));
      e   = in0 ? (Z_W+1)'(k) - (Z_W+1)'(k0) : (Z_W+1)'(k) + (Z_W+1)'(cfg.z) - (Z_W+1)'(k0);
      wr.a.sel1[k] = in1;
      wr.we[k]     = wvalid && (in0 || in1);
      wr.d[k]      = (in0 || in1) ? wvec[e[4:0]] : '0;
    end
  end

  always_comb begin
    for (int e = 0; e < VEC_L; e++) begin
      logic [Z_W:0] l;
      l = (Z_W+1)'(k0) + (Z_W+1)'(e);
      if (l >= (Z_W+1)'(cfg.z)) l = l - (Z_W+1)'(cfg.z);
      rvec[e] = (e < int'(len)) ? rlanes[l[Z_W-1:0]] : '0;
    end
  end
endmodule
