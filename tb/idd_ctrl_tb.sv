// idd_ctrl_tb: the control unit with behavioural detector (own clock) and
// decoder models of random run-time. Two code blocks are started, then a
// third once a slot is free. Checks that the detector always works on the
// block selected by mem_cb_sel and the decoder on the other one, that each
// block alternates detection and decoding for I iterations starting with
// detection, that det_first and dec_last mark the first detection and the
// last decoding, that mem_cb_sel only changes while both elements are idle,
// that cb_done follows the last decoding, and that detection and decoding
// overlap in time (interleaving).
module idd_ctrl_tb;
  logic clk = 0, det_clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #7 det_clk = ~det_clk;
  logic [3:0] iters; logic [1:0] cb_start, cb_busy, cb_done;
  logic mem_cb_sel, det_start_tgl, det_first, det_done_tgl, det_running, dec_start, dec_last, dec_done, dec_running;
  int checks = 0, failures = 0, overlap = 0, ndet [2], ndec [2], ndone [2], blocks_done = 0;
  string hist [2];
  logic last_det_slot;
  idd_ctrl dut (.*);

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // detector model
  initial begin
    logic seen;
    det_running = 0; det_done_tgl = 0; seen = 0;
    forever begin
      @(posedge det_clk);
      if (rst_n && det_start_tgl != seen) begin
        int s;
        seen = det_start_tgl;
        s = int'(mem_cb_sel);
        checks++;
        if (hist[s].len() % 2 != 0 || !cb_busy[s]) begin failures++; $display("det order s=%0d %s", s, hist[s]); end
        checks++; if (det_first != (ndet[s] == 0)) begin failures++; $display("first"); end
        ndet[s]++; hist[s] = {hist[s], "D"};
        det_running = 1;
        repeat (int'($urandom_range(40, 3))) @(posedge det_clk);
        // done first, running falls some cycles later (as with a writeback tail)
        det_done_tgl = ~det_done_tgl;
        repeat (6) @(posedge det_clk);
        det_running = 0;
      end
    end
  end

  // decoder model
  initial begin
    dec_running = 0; dec_done = 0;
    forever begin
      @(posedge clk); #1;
      dec_done = 0;
      if (rst_n && dec_start) begin
        int s;
        s = mem_cb_sel ? 0 : 1;
        checks++;
        if (hist[s].len() % 2 != 1) begin failures++; $display("dec order %0d %s", s, hist[s]); end
        ndec[s]++; hist[s] = {hist[s], "d"};
        checks++; if (dec_last != (ndec[s] == int'(iters))) begin failures++; $display("last"); end
        dec_running = 1;
        repeat (int'($urandom_range(40, 3))) @(posedge clk);
        #1 dec_done = 1;
        @(posedge clk); #1 dec_done = 0;
        repeat (5) @(posedge clk);
        #1 dec_running = 0;
      end
    end
  end

  // monitor
  always @(posedge clk) begin
    if (det_running && dec_running) overlap++;
    for (int s = 0; s < 2; s++)
      if (rst_n && cb_done[s]) begin
        checks++;
        if (ndec[s] != int'(iters) || ndet[s] != int'(iters)) begin failures++; $display("done s=%0d %0d %0d t=%0t bd=%0d", s, ndec[s], ndet[s], $time, blocks_done); end
        ndone[s]++; blocks_done++;
        ndet[s] = 0; ndec[s] = 0; hist[s] = "";
      end
  end
  logic sel_d;
  always @(posedge clk) begin
    sel_d <= mem_cb_sel;
    if (rst_n && sel_d != mem_cb_sel) begin
      checks++;
      if (det_running || dec_running) begin failures++; $display("sel"); end
    end
  end

  initial begin
    iters = 4'd3; cb_start = '0;
    for (int s = 0; s < 2; s++) begin ndet[s] = 0; ndec[s] = 0; ndone[s] = 0; hist[s] = ""; end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    cb_start = 2'b11; @(posedge clk); #1 cb_start = '0;
    while (blocks_done < 1) @(posedge clk);
    #1 cb_start = ~cb_busy; @(posedge clk); #1 cb_start = '0;
    while (blocks_done < 3) @(posedge clk);
    checks++; if (overlap == 0) failures++;
    $display("overlap cycles %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
