// shared_lmem: one shared L-memory block (CB1 or CB2). It holds one code
// block of L-values as NP words of NBANKS*BANK_W lanes (3 banks x 24 words x
// 27 L-values of 5 bits, as published); lane k of word j holds L-value
// j*Z + k of the code block. It has one write port and one read port.
// The address decoder lets every lane pick one of two word addresses, so the
// detector can read or write a vector that straddles two words, even in the
// same bank, in a single cycle; the decoder uses a single address for all
// lanes. Writes take effect at the rising edge of clk (the switched memory
// clock); reads are combinational, as in a latch-based standard-cell memory.
// The array is modelled with flip-flops.
module shared_lmem
  import idd_pkg::*;
(
  input  logic              clk,
  input  lm_wr_t            wr,
  input  lm_addr_t          ra,
  output lval_t [ZMAX-1:0]  rd
);
  lval_t mem [NP][ZMAX];

  always_ff @(posedge clk)
    for (int k = 0; k < ZMAX; k++)
      if (wr.we[k]) mem[wr.a.sel1[k] ? wr.a.addr1 : wr.a.addr0][k] <= wr.d[k];

  always_comb
    for (int k = 0; k < ZMAX; k++)
      rd[k] = mem[ra.sel1[k] ? ra.addr1 : ra.addr0][k];
endmodule
