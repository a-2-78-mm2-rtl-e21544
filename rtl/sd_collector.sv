// sd_collector: gathers results from the NC SD output buffers (out_ext) and
// forwards one complete lambda^e vector per cycle, tagged with its vector
// index so that it can be written back out of order. Buffers are served
// round-robin, starting after the one served last; a buffer is popped in
// the cycle it is chosen and the result appears registered one cycle later.
// Forwarding as soon as a buffer holds data and one vector per cycle are
// published; the round-robin order is this design's choice.
module sd_collector
  import idd_pkg::*;
#(
  parameter int NC = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NC-1:0]     valid,
  input  sd_out_t [NC-1:0]  pkt,
  output logic [NC-1:0]     pop,
  output logic              out_valid,
  output sd_out_t           out_pkt
);
  logic [$clog2(NC)-1:0] last;
  logic [$clog2(NC)-1:0] sel;
  logic                  any;

  always_comb begin
    pop = '0; sel = '0; any = 1'b0;
    for (int d = 1; d <= NC; d++) begin
      int i;
      i = (int'(last) + d) % NC;
      if (!any && valid[i]) begin any = 1'b1; sel = ($clog2(NC))'(i); end
    end
    if (any) pop[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      last <= ($clog2(NC))'(NC-1); out_valid <= 1'b0; out_pkt <= '0;
    end else begin
      out_valid <= any;
      if (any) begin
        out_pkt <= pkt[sel];
        last    <= sel;
      end
    end
endmodule
