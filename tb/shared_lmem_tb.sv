// shared_lmem_tb: random single-word (decoder style) and two-word (detector
// style, per-lane word select) writes against a behavioural array, with
// random two-word reads compared lane by lane.
module shared_lmem_tb;
  import idd_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  lm_wr_t wr; lm_addr_t ra; lval_t [ZMAX-1:0] rd;
  int model [NP][ZMAX];
  int checks = 0, failures = 0;
  shared_lmem dut (.*);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic lm_addr_t rand_addr();
    lm_addr_t a;
    a.addr0 = COL_W'($urandom_range(NP-1, 0));
    a.addr1 = COL_W'($urandom_range(NP-1, 0));
    for (int k = 0; k < ZMAX; k++) a.sel1[k] = $urandom_range(1, 0) == 1;
    return a;
  endfunction

  initial begin
    wr = '0; ra = '0;
    // fill every word
    for (int j = 0; j < NP; j++) begin
      wr.a = '{addr0: COL_W'(j), addr1: '0, sel1: '0};
      wr.we = '1;
      for (int k = 0; k < ZMAX; k++) begin wr.d[k] = lval_t'($urandom); model[j][k] = int'(wr.d[k]); end
      @(posedge clk); #1;
    end
    for (int n = 0; n < 400; n++) begin
      wr.a = rand_addr();
      for (int k = 0; k < ZMAX; k++) begin
        wr.we[k] = $urandom_range(3, 0) == 0;
        wr.d[k]  = lval_t'($urandom);
        if (wr.we[k]) model[wr.a.sel1[k] ? wr.a.addr1 : wr.a.addr0][k] = int'(wr.d[k]);
      end
      @(posedge clk); #1;
      wr.we = '0;
      ra = rand_addr();
      #1;
      for (int k = 0; k < ZMAX; k++) begin
        checks++;
        if (int'(rd[k]) != model[ra.sel1[k] ? ra.addr1 : ra.addr0][k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
