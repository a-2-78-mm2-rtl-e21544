// sd_shuffler_tb: the testbench plays dispatcher and cores. Cores have
// random run-times; packets are loaded only into empty buffers and never
// during a shift. Checks every cycle that shift follows the rule (a packet
// blocked in front of a busy core while an idle core has an empty buffer),
// that the ring rotation moves packets to the next buffer, and at the end
// that every packet was taken exactly once. Counts the shifts.
module sd_shuffler_tb;
  import idd_pkg::*;
  localparam int NC = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NC-1:0] load, take, core_avail, ext_valid; sd_in_t load_pkt; logic shift_en; sd_in_t [NC-1:0] ext_pkt; logic shift;
  int busy [NC];
  int taken [200];
  int checks = 0, failures = 0, shifts = 0;
  sd_shuffler #(.NC(NC)) dut (.*);

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always_comb begin
    for (int i = 0; i < NC; i++) begin
      core_avail[i] = (busy[i] == 0);
      take[i] = ext_valid[i] && core_avail[i];
    end
  end

  initial begin
    int sent;
    logic [NC-1:0] v_old; sd_in_t [NC-1:0] p_old; logic [NC-1:0] t_old; logic s_old;
    for (int i = 0; i < NC; i++) busy[i] = 0;
    for (int n = 0; n < 200; n++) taken[n] = 0;
    load = '0; load_pkt = '0; sent = 0; shift_en = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000 && !(sent == 200 && ext_valid == '0); cyc++) begin
      // dispatcher: one packet into a random empty buffer if not shifting
      #1;
      load = '0;
      shift_en = (sent >= 150);   // enabled for the tail of the stream
      if (!shift && sent < 200 && $urandom_range(3, 0) != 0) begin
        int i; i = int'($urandom_range(NC-1, 0));
        if (!ext_valid[i]) begin load[i] = 1; load_pkt = '0; load_pkt.idx = VIDX_W'(sent); sent++; end
      end
      #1;
      checks++;
      if (shift != (shift_en && (|(ext_valid & ~core_avail)) && (|(core_avail & ~ext_valid)))) begin failures++; $display("rule"); end
      v_old = ext_valid; p_old = ext_pkt; t_old = take; s_old = shift;
      for (int i = 0; i < NC; i++)
        if (take[i]) taken[ext_pkt[i].idx]++;
      if (shift) shifts++;
      @(posedge clk);
      #1;
      for (int i = 0; i < NC; i++)
        if (t_old[i]) busy[i] = int'($urandom_range(12, 2));
        else if (busy[i] > 0) busy[i]--;
      if (s_old)
        for (int i = 0; i < NC; i++) begin
          int p; p = (i == 0) ? NC-1 : i-1;
          checks++;
          if (ext_valid[i] != (v_old[p] && !t_old[p]) || (ext_valid[i] && ext_pkt[i].idx != p_old[p].idx)) begin failures++; $display("rot %0d v=%b vo=%b to=%b", i, ext_valid, v_old, t_old); end
        end
    end
    for (int n = 0; n < 200; n++) begin checks++; if (taken[n] != 1) failures++; end
    checks++; if (shifts == 0) failures++;
    $display("shifts: %0d", shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
