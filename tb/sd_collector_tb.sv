// sd_collector_tb: five output buffers filled at random; checks that each
// chosen buffer is popped and its packet appears on the output one cycle
// later, that the collector forwards a vector in every cycle in which any
// buffer holds one, that service is round-robin, and that every packet is
// forwarded exactly once.
module sd_collector_tb;
  import idd_pkg::*;
  localparam int NC = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NC-1:0] valid, pop; sd_out_t [NC-1:0] pkt; logic out_valid; sd_out_t out_pkt;
  int seen [300];
  int checks = 0, failures = 0;
  sd_collector #(.NC(NC)) dut (.*);

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int made, last; logic any; logic [NC-1:0] p_old; sd_out_t exp; int sel;
    valid = '0; pkt = '0; made = 0; last = NC-1;
    for (int n = 0; n < 300; n++) seen[n] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (made < 300 || valid != '0) begin
      for (int i = 0; i < NC; i++)
        if (!valid[i] && made < 300 && $urandom_range(2, 0) == 0) begin
          valid[i] = 1; pkt[i].idx = VIDX_W'(made); pkt[i].le = {VEC_L{lval_t'(i)}}; made++;
        end
      #1;
      any = |valid;
      sel = -1;
      for (int d = 1; d <= NC; d++) if (sel < 0 && valid[(last + d) % NC]) sel = (last + d) % NC;
      checks++;
      if (any && pop != (NC'(1) << sel)) failures++;
      if (!any && pop != '0) failures++;
      if (any) begin exp = pkt[sel]; last = sel; end
      p_old = pop;
      @(posedge clk); #1;
      checks++;
      if (out_valid != any || (any && out_pkt != exp)) failures++;
      if (out_valid) seen[out_pkt.idx]++;
      for (int i = 0; i < NC; i++) if (p_old[i]) valid[i] = 0;
    end
    for (int n = 0; n < 300; n++) begin checks++; if (seen[n] != 1) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
