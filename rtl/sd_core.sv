// sd_core: soft-in soft-out MIMO detection core for one received vector.
// It runs a successive-interference-cancellation (SIC) pass over the layers
// of the triangular system y~ = R s + n, from antenna MT-1 down to 0, one
// layer per cycle. For each layer it subtracts the interference of the
// symbols already decided, then treats the real and imaginary parts as two
// Gray-mapped PAM symbols: for every PAM point it forms the metric
//   (z - R_ii * p)^2 >> MSHIFT  +  prior penalty from lambda^a
// and produces max-log L-values (L = ln P(b=0)/P(b=1)):
//   lambda^p_b = min_{b=1} metric - min_{b=0} metric,
//   lambda^e   = sat(lambda^p - lambda^a)   (5-bit, +-15),
// and keeps the minimum-metric point as the decision for the layers below.
// This is the minimum-effort operating point of a depth-first sphere
// decoder (the SIC path), and it has the published minimum run-time of
// MT + 2 cycles per vector: one cycle to latch the input, MT layer cycles
// and one cycle to hand the result to the external output buffer. The full
// depth-first tree search, and with it max-log-MAP optimality and the
// run-time constraints, are not reproduced. Inputs are assumed pre-scaled
// (by the noise standard deviation) so that the metric is in L-value units.
// Interface: take a packet when in_valid & in_ready (in_ready only in the
// idle state); out_valid holds the result until out_ready.
module sd_core
  import idd_pkg::*;
#(
  parameter int MSHIFT = 6    // metric scaling (right shift of squared distance)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  det_cfg_t cfg,
  input  logic     in_valid,
  output logic     in_ready,
  input  sd_in_t   in_pkt,
  output logic     out_valid,
  input  logic     out_ready,
  output sd_out_t  out_pkt
);
  typedef enum logic [1:0] {S_IDLE, S_LAYER, S_OUT} state_t;
  state_t st;
  sd_in_t in_int;                          // internal input buffer
  logic [1:0] layer;
  logic signed [3:0] xr [MT_MAX], xi [MT_MAX];  // decided PAM points
  lval_t [VEC_L-1:0] le;                   // internal output buffer

  // ---- one layer, combinational ----
  logic signed [23:0] zr, zi;
  lval_t [Q_MAX-1:0]  le_lay;
  logic signed [3:0]  dec_r, dec_i;

  function automatic logic [11:0] pos5(input lval_t v);
    return (v > 0) ? 12'(v) : 12'd0;
  endfunction

  // Demap one PAM dimension. nb = bits per dimension, off = first L-value.
  task automatic demap(input logic signed [23:0] z, input smp_t d,
                       input int nb, input lval_t [Q_MAX/2-1:0] la,
                       output lval_t [Q_MAX/2-1:0] leo, output logic signed [3:0] xd);
    logic [15:0] m [8];
    logic [15:0] best, mn0 [3], mn1 [3];
    int M;
    M = 1 << nb;
    best = '1; xd = '0;
    for (int t = 0; t < 3; t++) begin mn0[t] = '1; mn1[t] = '1; end
    for (int k = 0; k < 8; k++) begin
      logic signed [4:0]  p;
      logic signed [47:0] e, e2;
      logic [2:0] g;
      logic [15:0] dsq;
      p    = 5'(2*k - (M-1));
      e    = 48'(z) - 48'(d) * 48'(p);
      e2   = (e * e) >>> MSHIFT;
      dsq = (e2 > 48'sd4095) ? 16'd4095 : 16'(e2);
      g    = 3'(k ^ (k >> 1));
      m[k] = dsq;
      for (int t = 0; t < 3; t++)
        if (t < nb)
          m[k] = m[k] + 16'(g[nb-1-t] ? pos5(la[t]) : pos5(-la[t]));
      if (k < M) begin
        if (m[k] < best) begin best = m[k]; xd = 4'(p); end
        for (int t = 0; t < 3; t++)
          if (t < nb) begin
            if (g[nb-1-t]) begin if (m[k] < mn1[t]) mn1[t] = m[k]; end
            else           begin if (m[k] < mn0[t]) mn0[t] = m[k]; end
          end
      end
    end
    for (int t = 0; t < 3; t++)
      leo[t] = (t < nb) ? sat_l(16'(mn1[t]) - 16'(mn0[t]) - 16'(la[t])) : '0;
  endtask

  always_comb begin
    lval_t [Q_MAX/2-1:0] la_r, la_i, le_r, le_i;
    int nb;
    nb = int'(cfg.q) / 2;
    zr = 24'(in_int.d.y[layer].re);
    zi = 24'(in_int.d.y[layer].im);
    for (int j = 0; j < MT_MAX; j++)
      if (j > int'(layer) && j < int'(cfg.mt)) begin
        zr = zr - (24'(in_int.d.r[layer][j].re) * 24'(xr[j]) - 24'(in_int.d.r[layer][j].im) * 24'(xi[j]));
        zi = zi - (24'(in_int.d.r[layer][j].re) * 24'(xi[j]) + 24'(in_int.d.r[layer][j].im) * 24'(xr[j]));
      end
    for (int t = 0; t < Q_MAX/2; t++) begin
      la_r[t] = (t < nb) ? in_int.la[int'(layer)*int'(cfg.q) + t]      : '0;
      la_i[t] = (t < nb) ? in_int.la[int'(layer)*int'(cfg.q) + nb + t] : '0;
    end
    demap(zr, in_int.d.r[layer][layer].re, nb, la_r, le_r, dec_r);
    demap(zi, in_int.d.r[layer][layer].re, nb, la_i, le_i, dec_i);
    le_lay = '0;
    for (int t = 0; t < Q_MAX/2; t++)
      if (t < nb) begin
        le_lay[t]      = le_r[t];
        le_lay[nb + t] = le_i[t];
      end
  end

  assign in_ready  = (st == S_IDLE);
  assign out_valid = (st == S_OUT);
  assign out_pkt   = '{idx: in_int.idx, le: le};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; layer <= '0; in_int <= '0; le <= '0;
      for (int j = 0; j < MT_MAX; j++) begin xr[j] <= '0; xi[j] <= '0; end
    end else begin
      case (st)
        S_IDLE: if (in_valid) begin
          in_int <= in_pkt;
          layer  <= 2'(cfg.mt - 3'd1);
          le     <= '0;
          st     <= S_LAYER;
        end
        S_LAYER: begin
          xr[layer] <= dec_r;
          xi[layer] <= dec_i;
          for (int t = 0; t < Q_MAX; t++)
            if (t < int'(cfg.q)) le[int'(layer)*int'(cfg.q) + t] <= le_lay[t];
          if (layer == 2'd0) st <= S_OUT;
          else               layer <= layer - 2'd1;
        end
        S_OUT: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
endmodule
