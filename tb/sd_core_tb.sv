// sd_core_tb: drives random received vectors with random priors through one
// detector core for every antenna/modulation configuration and compares the
// extrinsic L-values with the reference model. It also checks the run-time
// of MT + 2 cycles per vector (accept to accept with back-to-back inputs).
module sd_core_tb;
  import idd_pkg::*;
  import idd_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  det_cfg_t cfg;
  logic in_valid, in_ready, out_valid, out_ready;
  sd_in_t in_pkt;
  sd_out_t out_pkt;
  int checks = 0, failures = 0;

  sd_core #(.MSHIFT(6)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, t_acc [$];
    cfg = '0; in_valid = 0; out_ready = 1; in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mt = 1; mt <= 4; mt++)
      for (int q = 2; q <= 6; q += 2) begin
        cfg.mt = 3'(mt); cfg.q = 3'(q);
        t_acc.delete();
        for (int n = 0; n < 12; n++) begin
          bit [VEC_L-1:0] bits;
          lval_t [VEC_L-1:0] la, le_ref;
          bits = VEC_L'($urandom);
          la = '0;
          for (int e = 0; e < mt*q; e++) la[e] = lval_t'(int'($urandom_range(30, 0)) - 15);
          in_pkt.idx = VIDX_W'(n);
          in_pkt.d   = gen_vec(mt, q, 8, 100, 20, 25, bits);
          in_pkt.la  = la;
          ref_sd(in_pkt.d, la, mt, q, 6, le_ref);
          in_valid = 1;
          do @(posedge clk); while (!in_ready);
          t_acc.push_back($time / 10);
          #1 in_valid = 0;
          while (!out_valid) @(posedge clk);
          #1;
          checks++;
          if (out_pkt.le !== le_ref || out_pkt.idx != VIDX_W'(n)) begin
            failures++;
            $display("mismatch mt=%0d q=%0d n=%0d got %h exp %h", mt, q, n, out_pkt.le, le_ref);
          end
        end
        // back-to-back run-time: out_ready held, new input offered at once
        in_valid = 1;
        cyc = 0;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(posedge clk);
        while (!in_ready) begin @(posedge clk); cyc++; end
        cyc++;
        #1 in_valid = 0;
        checks++;
        if (cyc != mt + 2) begin
          failures++; $display("run-time mt=%0d: %0d cycles, expected %0d", mt, cyc, mt+2);
        end
        while (!in_ready) @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
