// lmem_clk_switch_tb: two unrelated clocks; for each select/running setting
// counts the rising edges reaching CB1 and CB2 and compares them with the
// edges of the clock that should own each block (or none).
module lmem_clk_switch_tb;
  logic det_clk = 0, dec_clk = 0;
  always #5 det_clk = ~det_clk;
  always #7 dec_clk = ~dec_clk;
  logic det_cb_sel, det_running, dec_cb_sel, dec_running, cb1_clk, cb2_clk;
  int n1, n2, nd, nc;
  int checks = 0, failures = 0;
  lmem_clk_switch dut (.*);
  always @(posedge cb1_clk) n1++;
  always @(posedge cb2_clk) n2++;
  always @(posedge det_clk) nd++;
  always @(posedge dec_clk) nc++;

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int s = 0; s < 8; s++) begin
      int e1, e2;
      det_cb_sel = s[0]; dec_cb_sel = ~s[0]; det_running = s[1]; dec_running = s[2];
      #50;                     // let the gates settle
      n1 = 0; n2 = 0; nd = 0; nc = 0;
      #1400;
      e1 = (det_running && !det_cb_sel ? nd : 0) + (dec_running && !dec_cb_sel ? nc : 0);
      e2 = (det_running &&  det_cb_sel ? nd : 0) + (dec_running &&  dec_cb_sel ? nc : 0);
      checks += 2;
      if (n1 < e1 - 1 || n1 > e1 + 1) begin failures++; $display("s=%0d cb1 %0d exp %0d", s, n1, e1); end
      if (n2 < e2 - 1 || n2 > e2 + 1) begin failures++; $display("s=%0d cb2 %0d exp %0d", s, n2, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
