// idd_ref_pkg: reference models and stimulus helpers for the IDD receiver
// testbenches. The models are written from the arithmetic the RTL is meant
// to implement, in a plain behavioural style (exhaustive loops, full
// message storage, natural bit order), not from the RTL structure:
//  - ref_sd: soft-output SIC detection with max-log L-values and priors;
//  - a quasi-cyclic LDPC code with a dual-diagonal parity part, its encoder
//    and a layered offset-min-sum reference decoder;
//  - Gray-mapped QAM modulation matching the detector's bit order.
package idd_ref_pkg;
  import idd_pkg::*;

  // ---------------- QAM ----------------
  // PAM level index k (0..M-1) carries Gray bits k ^ (k >> 1), MSB first.
  function automatic int pam_point(input int bits, input int nb);
    int M, k;
    M = 1 << nb;
    for (k = 0; k < M; k++) if ((k ^ (k >> 1)) == bits) break;
    return 2*k - (M-1);
  endfunction

  // Random received vector: R upper triangular with real diagonal in
  // [dmin, dmax] and off-diagonal parts in [-off, off]; y = R s + noise,
  // where s carries the mt*q bits in detector bit order.
  function automatic rxvec_t gen_vec(input int mt, input int q, input int dmin, input int dmax,
                                     input int off, input int noise, input bit [VEC_L-1:0] bits);
    rxvec_t d;
    int nb, sr [4], si [4];
    nb = q/2;
    d = '0;
    for (int i = 0; i < mt; i++) begin
      int br, bi;
      br = 0; bi = 0;
      for (int t = 0; t < nb; t++) begin
        br = (br << 1) | int'(bits[i*q + t]);
        bi = (bi << 1) | int'(bits[i*q + nb + t]);
      end
      sr[i] = pam_point(br, nb); si[i] = pam_point(bi, nb);
    end
    for (int i = 0; i < mt; i++) begin
      int yr, yi;
      for (int j = i; j < mt; j++) begin
        if (j == i) begin
          d.r[i][j].re = smp_t'($urandom_range(dmax, dmin)); d.r[i][j].im = '0;
        end else begin
          d.r[i][j].re = smp_t'(int'($urandom_range(2*off, 0)) - off);
          d.r[i][j].im = smp_t'(int'($urandom_range(2*off, 0)) - off);
        end
      end
      yr = int'($urandom_range(2*noise, 0)) - noise;
      yi = int'($urandom_range(2*noise, 0)) - noise;
      for (int j = i; j < mt; j++) begin
        yr += int'(d.r[i][j].re)*sr[j] - int'(d.r[i][j].im)*si[j];
        yi += int'(d.r[i][j].re)*si[j] + int'(d.r[i][j].im)*sr[j];
      end
      d.y[i].re = smp_t'(yr); d.y[i].im = smp_t'(yi);
    end
    return d;
  endfunction

  // ---------------- detector reference ----------------
  function automatic int lsat(input int v);
    return (v > 15) ? 15 : (v < -15) ? -15 : v;
  endfunction

  function automatic void ref_sd(input rxvec_t d, input lval_t [VEC_L-1:0] la,
                                 input int mt, input int q, input int mshift,
                                 output lval_t [VEC_L-1:0] le);
    int nb, M;
    longint xr [4], xi [4];
    nb = q/2; M = 1 << nb;
    le = '0;
    for (int i = mt-1; i >= 0; i--) begin
      longint z [2];
      longint rii;
      z[0] = d.y[i].re; z[1] = d.y[i].im;
      for (int j = i+1; j < mt; j++) begin
        z[0] -= longint'(d.r[i][j].re)*xr[j] - longint'(d.r[i][j].im)*xi[j];
        z[1] -= longint'(d.r[i][j].re)*xi[j] + longint'(d.r[i][j].im)*xr[j];
      end
      rii = d.r[i][i].re;
      for (int dim = 0; dim < 2; dim++) begin
        longint best; int bestp;
        longint mn [2][3];
        for (int t = 0; t < 3; t++) begin mn[0][t] = 1<<40; mn[1][t] = 1<<40; end
        best = 1<<40; bestp = 0;
        for (int bits = 0; bits < M; bits++) begin
          int p; longint e, m;
          p = pam_point(bits, nb);
          e = z[dim] - rii*p;
          m = (e*e) >>> mshift;
          if (m > 4095) m = 4095;
          for (int t = 0; t < nb; t++) begin
            int l; int bit_;
            l = int'(la[i*q + dim*nb + t]);
            bit_ = (bits >> (nb-1-t)) & 1;
            m += bit_ ? ((l > 0) ? l : 0) : ((l < 0) ? -l : 0);
          end
          // the first minimum in PAM order wins
          if (m < best || (m == best && p < bestp)) begin best = m; bestp = p; end
          for (int t = 0; t < nb; t++) begin
            int bit_;
            bit_ = (bits >> (nb-1-t)) & 1;
            if (m < mn[bit_][t]) mn[bit_][t] = m;
          end
        end
        for (int t = 0; t < nb; t++)
          le[i*q + dim*nb + t] = lval_t'(lsat(int'(mn[1][t] - mn[0][t]) - int'(la[i*q + dim*nb + t])));
        if (dim == 0) xr[i] = bestp; else xi[i] = bestp;
      end
    end
  endfunction

  // ---------------- QC-LDPC test code ----------------
  // 24 block columns: 12 information columns, 12 parity columns with a
  // dual-diagonal structure (layer l holds parity columns l and l-1, shift
  // 0), plus NINFO information blocks per layer with random shifts.
  localparam int ML = 12, NPC = 24, NINFO = 3;
  typedef struct { int col; int sh; } edge_t;
  typedef struct { int deg [ML]; edge_t e [ML][8]; } code_t;

  function automatic code_t make_code(input int z);
    code_t c;
    for (int l = 0; l < ML; l++) begin
      int n;
      n = 0;
      // every information column is used by exactly three layers
      for (int t = 0; t < NINFO; t++) begin
        c.e[l][n].col = (l + 4*t) % 12; c.e[l][n].sh = int'($urandom_range(z-1, 0)); n++;
      end
      if (l > 0) begin c.e[l][n].col = 12 + l - 1; c.e[l][n].sh = 0; n++; end
      c.e[l][n].col = 12 + l; c.e[l][n].sh = 0; n++;
      c.deg[l] = n;
    end
    return c;
  endfunction

  // Program for the decoder, with first/last-use flags per column.
  function automatic int make_prog(input code_t c, output ldpc_instr_t p [96]);
    int n, first_l [NPC], last_l [NPC];
    for (int k = 0; k < NPC; k++) begin first_l[k] = -1; last_l[k] = -1; end
    for (int l = 0; l < ML; l++)
      for (int e = 0; e < c.deg[l]; e++) begin
        if (first_l[c.e[l][e].col] < 0) first_l[c.e[l][e].col] = l;
        last_l[c.e[l][e].col] = l;
      end
    n = 0;
    for (int l = 0; l < ML; l++)
      for (int e = 0; e < c.deg[l]; e++) begin
        p[n].col       = COL_W'(c.e[l][e].col);
        p[n].shift     = Z_W'(c.e[l][e].sh);
        p[n].layer_end = (e == c.deg[l]-1);
        p[n].first_use = (first_l[c.e[l][e].col] == l);
        p[n].last_use  = (last_l[c.e[l][e].col] == l);
        n++;
      end
    return n;
  endfunction

  // Encoder: bits[col*z + k]. Check row r of layer l involves variable
  // (r + sh) mod z of every block of the layer.
  function automatic void encode(input code_t c, input int z, inout bit bits [NPC*ZMAX]);
    bit prev [ZMAX];
    for (int r = 0; r < z; r++) prev[r] = 0;
    for (int l = 0; l < ML; l++)
      for (int r = 0; r < z; r++) begin
        bit s; s = 0;
        for (int e = 0; e < c.deg[l]; e++)
          if (c.e[l][e].col < 12) s ^= bits[c.e[l][e].col*z + (r + c.e[l][e].sh) % z];
        s ^= prev[r];
        bits[(12 + l)*z + r] = s;
        prev[r] = s;
      end
  endfunction

  // Layered offset-min-sum reference (natural order, full message storage).
  // lv: channel L-values in, a-posteriori L-values out.
  function automatic void ref_ldpc(input code_t c, input int z, input int iters, input int beta,
                                   inout int lv [NPC*ZMAX]);
    int rmsg [ML][8][ZMAX];
    for (int l = 0; l < ML; l++) for (int e = 0; e < 8; e++) for (int r = 0; r < ZMAX; r++) rmsg[l][e][r] = 0;
    for (int it = 0; it < iters; it++)
      for (int l = 0; l < ML; l++)
        for (int r = 0; r < z; r++) begin
          int qv [8]; int sgn; 
          for (int e = 0; e < c.deg[l]; e++) begin
            int vi; vi = c.e[l][e].col*z + (r + c.e[l][e].sh) % z;
            qv[e] = lsat(lv[vi] - rmsg[l][e][r]);
          end
          for (int e = 0; e < c.deg[l]; e++) begin
            int mn, s, mag, vi;
            mn = 15; s = 0;
            for (int j = 0; j < c.deg[l]; j++)
              if (j != e) begin
                int a; a = (qv[j] < 0) ? -qv[j] : qv[j];
                if (a < mn) mn = a;
                if (qv[j] < 0) s ^= 1;
              end
            mag = (mn > beta) ? mn - beta : 0;
            if (mag > 5) mag = 5;   // message magnitude limit
            rmsg[l][e][r] = s ? -mag : mag;
            vi = c.e[l][e].col*z + (r + c.e[l][e].sh) % z;
            lv[vi] = lsat(qv[e] + rmsg[l][e][r]);
          end
        end
  endfunction
endpackage
