// cyc_shift: cyclic shifter over the first z of ZMAX lanes. Output lane k
// takes input lane (k + rot) mod z; lanes at or above z are zero. rot must
// be below z. Combinational. The detector-side alignment, the LDPC decoder
// and the LDPC writeback each use one.
module cyc_shift
  import idd_pkg::*;
(
  input  lval_t [ZMAX-1:0]  din,
  input  logic  [Z_W-1:0]   rot,
  input  logic  [Z_W-1:0]   z,
  output lval_t [ZMAX-1:0]  dout
);
  always_comb begin
    for (int k = 0; k < ZMAX; k++) begin
      logic [Z_W:0] s;
      s = {1'b0, rot} + (Z_W+1)'(k);
      if (s >= {1'b0, z}) s = s - {1'b0, z};
      dout[k] = (k < int'(z)) ? din[s[Z_W-1:0]] : '0;
    end
  end
endmodule
