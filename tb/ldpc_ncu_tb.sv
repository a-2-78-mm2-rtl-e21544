// ldpc_ncu_tb: runs random check nodes of degree 2..10 through one node
// computation unit for two iterations (the second with the stored old
// message and edge signs) and compares q and the updated L-values with a
// direct offset-min-sum computation over all other edges.
module ldpc_ncu_tb;
  import idd_pkg::*;
  import idd_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [LW-2:0] beta; logic a_valid, a_first, a_rzero, a_sgn_old; logic [4:0] a_eidx, b_eidx;
  lval_t a_l, a_q, b_q, b_l; msg_t a_msg_old, msg_new;
  int checks = 0, failures = 0;
  ldpc_ncu dut (.*);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    a_valid = 0; a_first = 0; a_rzero = 1; a_sgn_old = 0; a_eidx = '0; b_eidx = '0;
    a_l = '0; b_q = '0; a_msg_old = '0; beta = 4'd1;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int d, L [10], r [10], q [10];
      msg_t m; logic [9:0] sg;
      d = int'($urandom_range(10, 2));
      beta = 4'($urandom_range(2, 0));
      for (int e = 0; e < d; e++) begin L[e] = int'($urandom_range(30, 0)) - 15; r[e] = 0; end
      for (int itr = 0; itr < 2; itr++) begin
        // read pass
        for (int e = 0; e < d; e++) begin
          a_valid = 1; a_first = (e == 0); a_eidx = 5'(e); a_l = lval_t'(L[e]);
          a_rzero = (itr == 0); a_msg_old = m; a_sgn_old = sg[e];
          #1;
          q[e] = lsat(L[e] - r[e]);
          checks++; if (int'(a_q) != q[e]) failures++;
          sg[e] = a_q[LW-1];
          @(posedge clk); #1;
        end
        a_valid = 0;
        m = msg_new;
        // write pass
        for (int e = 0; e < d; e++) begin
          int mn, s, mag;
          mn = 15; s = 0;
          for (int j = 0; j < d; j++) if (j != e) begin
            if ((q[j] < 0 ? -q[j] : q[j]) < mn) mn = (q[j] < 0 ? -q[j] : q[j]);
            if (q[j] < 0) s ^= 1;
          end
          mag = (mn > int'(beta)) ? mn - int'(beta) : 0;
          if (mag > 5) mag = 5;
          r[e] = s ? -mag : mag;
          b_q = lval_t'(q[e]); b_eidx = 5'(e);
          #1;
          L[e] = lsat(q[e] + r[e]);
          checks++; if (int'(b_l) != L[e]) failures++;
          @(posedge clk); #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
