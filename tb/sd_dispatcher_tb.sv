// sd_dispatcher_tb: the testbench models the input buffers and cores. It
// checks that vectors 0..nvec-1 are issued in order, at most one per cycle
// and one in every cycle in which an enabled buffer is empty and no shift
// is requested, that buffers in front of idle cores are preferred, that
// disabled cores get nothing, that lambda^a is zero in the first iteration
// and passed through otherwise, and that active falls after the last vector.
module sd_dispatcher_tb;
  import idd_pkg::*;
  localparam int NC = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, first, shift, active;
  logic [VIDX_W-1:0] nvec, vidx;
  logic [NC-1:0] core_en, core_avail, ext_valid, load;
  rxvec_t im_data; lval_t [VEC_L-1:0] la_vec; sd_in_t pkt;
  int checks = 0, failures = 0;
  sd_dispatcher #(.NC(NC)) dut (.*);

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // data depend on the vector index so the packet can be checked
  always_comb begin
    im_data = '0;
    im_data.y[0].re = smp_t'(vidx) + 12'sd7;
    for (int e = 0; e < VEC_L; e++) la_vec[e] = lval_t'(int'(vidx) + e);
  end

  initial begin
    start = 0; first = 0; shift = 0; nvec = '0; core_en = '0; core_avail = '0; ext_valid = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int expect_idx;
      first = (run % 2 == 0); nvec = VIDX_W'(20 + run*7);
      core_en = (run == 3) ? 5'b10110 : 5'b11111;
      start = 1; @(posedge clk); #1 start = 0;
      expect_idx = 0;
      while (active) begin
        logic [NC-1:0] free_idle, free_en;
        shift = ($urandom_range(5, 0) == 0);
        ext_valid = NC'($urandom) & NC'($urandom);
        core_avail = NC'($urandom) & core_en;
        #1;
        free_idle = ~ext_valid & core_avail;
        free_en = ~ext_valid & core_en;
        checks++;
        if (!shift && free_en != '0) begin
          logic [NC-1:0] want;
          want = (free_idle != '0) ? (free_idle & -free_idle) : (free_en & -free_en);
          if (load != want) failures++;
          checks++;
          if (int'(pkt.idx) != expect_idx || pkt.d.y[0].re != smp_t'(expect_idx + 7)) failures++;
          for (int e = 0; e < VEC_L; e++) begin
            checks++;
            if (pkt.la[e] != (first ? lval_t'(0) : lval_t'(expect_idx + e))) failures++;
          end
          expect_idx++;
        end else if (load != '0) failures++;
        @(posedge clk); #1;
      end
      checks++; if (expect_idx != int'(nvec)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
