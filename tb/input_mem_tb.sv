// input_mem_tb: fills both code-block slots for two configurations, reads
// every vector back and checks the data, the zeroed rows above MT and the
// vectors-per-block count N_CB / (MT*Q).
module input_mem_tb;
  import idd_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  det_cfg_t cfg; logic we, wcb, rcb; logic [VIDX_W-1:0] widx, ridx, nvec; rxvec_t wdata, rdata;
  rxvec_t mem [2][81];
  int checks = 0, failures = 0;
  input_mem #(.DEPTH(162)) dut (.*);

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int mts [2] = '{4, 2};
    int qs  [2] = '{6, 4};
    int ncbs [2] = '{1944, 648};
    we = 0; wcb = 0; rcb = 0; widx = '0; ridx = '0; wdata = '0;
    for (int c = 0; c < 2; c++) begin
      cfg = '{mt: 3'(mts[c]), q: 3'(qs[c]), ncb: NCB_W'(ncbs[c]), z: Z_W'(81)};
      #1;
      checks++; if (int'(nvec) != ncbs[c] / (mts[c]*qs[c])) failures++;
      for (int b = 0; b < 2; b++)
        for (int v = 0; v < int'(nvec); v++) begin
          rxvec_t d;
          for (int w = 0; w < $bits(rxvec_t)/32 + 1; w++) d = {d, $urandom};
          mem[b][v] = d;
          we = 1; wcb = b[0]; widx = VIDX_W'(v); wdata = d;
          @(posedge clk); #1;
        end
      we = 0;
      for (int b = 0; b < 2; b++)
        for (int v = 0; v < int'(nvec); v++) begin
          rcb = b[0]; ridx = VIDX_W'(v); #1;
          for (int i = 0; i < MT_MAX; i++) begin
            checks++;
            if (i < mts[c]) begin
              if (rdata.y[i] != mem[b][v].y[i] || rdata.r[i] != mem[b][v].r[i]) failures++;
            end else if (rdata.y[i] != '0 || rdata.r[i] != '0) failures++;
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
