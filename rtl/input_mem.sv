// input_mem: banked input memory of the detector. It holds y~ and R of the
// received vectors of both code blocks in flight. Bank i holds row i of the
// received vector (y~_i and row i of R), so one read delivers a complete
// data set per cycle; banks for rows >= MT are not enabled. The address
// generation unit places code block 0 at address 0 and code block 1
// directly behind it, at N_CB / (MT*Q), so the depth is shared between the
// two blocks whatever the configuration. Writes (one whole vector per cycle)
// are clocked; reads are combinational. The row-per-bank split and the
// packing rule are this design's choices; the published design only states
// that the memory is banked and that the addresses depend on the vector
// index, MT, Q and N_CB.
module input_mem
  import idd_pkg::*;
#(
  parameter int DEPTH = 162   // vectors for both code blocks (2 x 1944/24)
) (
  input  logic              clk,
  input  det_cfg_t          cfg,
  input  logic              we,
  input  logic              wcb,
  input  logic [VIDX_W-1:0] widx,
  input  rxvec_t            wdata,
  input  logic              rcb,
  input  logic [VIDX_W-1:0] ridx,
  output rxvec_t            rdata,
  output logic [VIDX_W-1:0] nvec    // received vectors per code block
);
  localparam int AW = $clog2(DEPTH);
  typedef cplx_t [MT_MAX:0] row_t;    // y_i and R[i][0..3]
  logic [AW-1:0] waddr, raddr;

  function automatic logic [AW-1:0] agu(input logic cb, input logic [VIDX_W-1:0] v,
                                        input logic [VIDX_W-1:0] n);
    return AW'((cb ? n : '0) + v);
  endfunction

  always_comb begin
    nvec  = VIDX_W'(cfg.ncb / (NCB_W)'(cfg.mt * cfg.q));
    waddr = agu(wcb, widx, nvec);
    raddr = agu(rcb, ridx, nvec);
  end

  for (genvar i = 0; i < MT_MAX; i++) begin : g_bank
    row_t mem [DEPTH];
    row_t rw;
    logic en;
    assign en = (i < int'(cfg.mt));
    always_ff @(posedge clk)
      if (we && en) mem[waddr] <= {wdata.y[i], wdata.r[i]};
    assign rw = en ? mem[raddr] : '0;
    assign rdata.y[i] = rw[MT_MAX];
    assign rdata.r[i] = rw[MT_MAX-1:0];
  end
endmodule
