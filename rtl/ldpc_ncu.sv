// ldpc_ncu: node computation unit of the layered offset-min-sum LDPC
// decoder, one per lane (Z_MAX of them). A layer is processed in two passes.
// Read pass (a_valid): for each block column of the layer the unit receives
// the aligned L-value L, rebuilds the old check-to-variable message r_old
// from the stored compressed message and edge sign (r_old = 0 in the first
// iteration), outputs q = sat(L - r_old) and tracks the two smallest |q|,
// the position of the smallest and the sign product. Write pass: for each
// column it gets its stored q back and outputs L' = sat(q + r_new) with
//   r_new = (sign product xor sign q) ? -m : m,
//   m     = min(max(min_other - beta, 0), RMAX),
// where min_other is the second minimum at the position of the minimum and
// the minimum elsewhere. msg_new holds the compressed new message for the
// layer memory. The algorithm is the published one; the two-pass split and
// the compressed message format are this design's choices, and so is the
// limit RMAX = 5 on message magnitudes: with 5-bit a-posteriori L-values a
// saturated L minus a larger old message could change sign and make the
// decoder diverge.
module ldpc_ncu
  import idd_pkg::*;
#(
  parameter logic [LW-2:0] RMAX = 4'd5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LW-2:0]   beta,
  // read pass
  input  logic            a_valid,
  input  logic            a_first,
  input  logic [4:0]      a_eidx,
  input  lval_t           a_l,
  input  logic            a_rzero,
  input  msg_t            a_msg_old,
  input  logic            a_sgn_old,
  output lval_t           a_q,
  // write pass
  input  lval_t           b_q,
  input  logic [4:0]      b_eidx,
  output lval_t           b_l,
  output msg_t            msg_new
);
  logic [LW-2:0] m1, m2;
  logic [4:0]    idx;
  logic          sp;

  function automatic lval_t rmsg(input msg_t m, input logic [4:0] e, input logic sq);
    logic [LW-2:0] mag;
    mag = (e == m.idx) ? m.m2 : m.m1;
    return (m.sp ^ sq) ? -lval_t'({1'b0, mag}) : lval_t'({1'b0, mag});
  endfunction

  // offset, then limit to RMAX so that a saturated L-value minus the old
  // message keeps its sign
  function automatic logic [LW-2:0] offs(input logic [LW-2:0] v, input logic [LW-2:0] b);
    logic [LW-2:0] m;
    m = (v > b) ? v - b : '0;
    return (m > RMAX) ? RMAX : m;
  endfunction

  always_comb begin
    lval_t r_old;
    r_old = a_rzero ? '0 : rmsg(a_msg_old, a_eidx, a_sgn_old);
    a_q   = sat_l(16'(a_l) - 16'(r_old));
  end

  logic [LW-2:0] qmag;
  assign qmag = (LW-1)'(a_q[LW-1] ? -a_q : a_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      m1 <= '1; m2 <= '1; idx <= '0; sp <= 1'b0;
    end else if (a_valid) begin
      if (a_first) begin
        m1 <= qmag; m2 <= '1; idx <= a_eidx; sp <= a_q[LW-1];
      end else begin
        sp <= sp ^ a_q[LW-1];
        if (qmag < m1) begin m2 <= m1; m1 <= qmag; idx <= a_eidx; end
        else if (qmag < m2) m2 <= qmag;
      end
    end

  assign msg_new = '{m1: offs(m1, beta), m2: offs(m2, beta), idx: idx, sp: sp};

  always_comb b_l = sat_l(16'(b_q) + 16'(rmsg(msg_new, b_eidx, b_q[LW-1])));
endmodule
