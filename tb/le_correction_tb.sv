// le_correction_tb: checks the identity table after reset, then programs a
// random table and checks every L-value of random vectors against it, with
// the one-cycle latency.
module le_correction_tb;
  import idd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lut_we, in_valid, out_valid; logic [LW-1:0] lut_addr; lval_t lut_data;
  sd_out_t in_pkt, out_pkt;
  lval_t tab [32];
  int checks = 0, failures = 0;
  le_correction dut (.*);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      sd_out_t p;
      p.idx = VIDX_W'($urandom);
      for (int e = 0; e < VEC_L; e++) p.le[e] = lval_t'($urandom);
      in_valid = 1; in_pkt = p;
      @(posedge clk); #1;
      in_valid = 0;
      checks++;
      if (!out_valid || out_pkt.idx != p.idx) failures++;
      for (int e = 0; e < VEC_L; e++) begin
        checks++;
        if (out_pkt.le[e] != tab[p.le[e]]) failures++;
      end
    end
  endtask

  initial begin
    lut_we = 0; in_valid = 0; lut_addr = '0; lut_data = '0; in_pkt = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int a = 0; a < 32; a++) tab[a] = lval_t'(a);
    run(10);
    for (int a = 0; a < 32; a++) begin
      int v; v = int'(lval_t'(a));
      tab[a] = lval_t'(v - (v > 0 ? 1 : v < 0 ? -1 : 0) + int'($urandom_range(2, 0)) - 1);
      lut_we = 1; lut_addr = LW'(a); lut_data = tab[a];
      @(posedge clk); #1;
    end
    lut_we = 0;
    run(50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
