// mimo_detector: multi-core MIMO detector. A dispatcher reads one complete
// data set per cycle (y~ and R from the banked input memory, lambda^a from
// the shared L-memory through an alignment unit) and loads it into the
// external input buffer of one of NC detector cores. The input buffers form
// a ring in which the shuffler moves queued packets from busy to idle cores.
// Each core has its own clock gate (core_en) so that cores can be switched
// off. Finished results wait in one external output buffer per core; the
// collector forwards one lambda^e vector per cycle, the correction table
// post-processes it and a second alignment unit writes it, out of order, to
// the shared L-memory block at the position given by its vector index.
// Handshake: start (one cycle) begins a code block in input-memory slot cb,
// with lambda^a forced to zero when first is set; running stays high until
// the last vector has been written, and done pulses for one cycle then.
// core_en may only change while running is low. The structure follows the
// published block diagram with five cores; the buffer sizes (one packet per
// buffer) are this design's choice.
// Lint notes: the write-side alignment unit leaves its read-path output
// (rvec) unconnected on purpose, and the reset is used both asynchronously
// by the flip-flops and synchronously by the assertions' disable condition.
// The per-core clock gates each hold one intentional enable latch.
module mimo_detector
  import idd_pkg::*;
#(
  parameter int NC     = 5,
  parameter int DEPTH  = 162,
  parameter int MSHIFT = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  det_cfg_t          cfg,
  input  logic [NC-1:0]     core_en,
  input  logic              start,
  input  logic              cb,
  input  logic              first,
  output logic              running,
  output logic              done,
  // input memory load port
  input  logic              im_we,
  input  logic              im_cb,
  input  logic [VIDX_W-1:0] im_idx,
  input  rxvec_t            im_data,
  // correction table load port
  input  logic              lut_we,
  input  logic [LW-1:0]     lut_addr,
  input  lval_t             lut_data,
  // shared L-memory ports
  output lm_addr_t          lm_ra,
  input  lval_t [ZMAX-1:0]  lm_rd,
  output lm_wr_t            lm_wr,
  // observation of the shuffler (one per ring shift)
  output logic              shift
);
  logic [VIDX_W-1:0] nvec, vidx, wcnt;
  rxvec_t            im_rdata;
  lval_t [VEC_L-1:0] la_vec;
  lm_wr_t            ra_unused;
  logic [NC-1:0]     load, take, core_avail, ext_valid, in_ready, out_valid_c, out_ready_c;
  logic [NC-1:0]     oext_valid, pop;
  sd_in_t            pkt;
  sd_in_t  [NC-1:0]  ext_pkt;
  sd_out_t [NC-1:0]  out_c, oext;
  logic              disp_active, col_valid, cor_valid;
  sd_out_t           col_pkt, cor_pkt;

  input_mem #(.DEPTH(DEPTH)) u_im (
    .clk, .cfg, .we(im_we), .wcb(im_cb), .widx(im_idx), .wdata(im_data),
    .rcb(cb), .ridx(vidx), .rdata(im_rdata), .nvec);

  lmem_align u_align_rd (
    .cfg, .vidx, .wvalid(1'b0), .wvec('0), .wr(ra_unused),
    .rlanes(lm_rd), .rvec(la_vec));
  assign lm_ra = ra_unused.a;

  sd_dispatcher #(.NC(NC)) u_disp (
    .clk, .rst_n, .start, .first, .nvec, .core_en, .core_avail, .ext_valid, .shift,
    .vidx, .im_data(im_rdata), .la_vec, .load, .pkt, .active(disp_active));

  sd_shuffler #(.NC(NC)) u_shuf (
    .clk, .rst_n, .load, .load_pkt(pkt), .take, .core_avail, .shift_en(!disp_active),
    .ext_valid, .ext_pkt, .shift);

  for (genvar i = 0; i < NC; i++) begin : g_core
    logic gclk;
    clk_gate u_cg (.clk, .en(core_en[i]), .gclk);
    sd_core #(.MSHIFT(MSHIFT)) u_sd (
      .clk(gclk), .rst_n, .cfg,
      .in_valid(ext_valid[i] & core_en[i]), .in_ready(in_ready[i]), .in_pkt(ext_pkt[i]),
      .out_valid(out_valid_c[i]), .out_ready(out_ready_c[i]), .out_pkt(out_c[i]));
    assign core_avail[i]  = core_en[i] & in_ready[i];
    assign take[i]        = ext_valid[i] & core_avail[i];
    assign out_ready_c[i] = !oext_valid[i] || pop[i];

    // external output buffer
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        oext_valid[i] <= 1'b0; oext[i] <= '0;
      end else if (out_valid_c[i] && out_ready_c[i] && core_en[i]) begin
        oext_valid[i] <= 1'b1; oext[i] <= out_c[i];
      end else if (pop[i]) begin
        oext_valid[i] <= 1'b0;
      end
  end

  sd_collector #(.NC(NC)) u_col (
    .clk, .rst_n, .valid(oext_valid), .pkt(oext), .pop,
    .out_valid(col_valid), .out_pkt(col_pkt));

  le_correction u_cor (
    .clk, .rst_n, .lut_we, .lut_addr, .lut_data,
    .in_valid(col_valid), .in_pkt(col_pkt), .out_valid(cor_valid), .out_pkt(cor_pkt));

  lmem_align u_align_wr (
    .cfg, .vidx(cor_pkt.idx), .wvalid(cor_valid), .wvec(cor_pkt.le), .wr(lm_wr),
    .rlanes('0), .rvec());

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running <= 1'b0; done <= 1'b0; wcnt <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        running <= (nvec != '0);
        wcnt    <= '0;
      end else if (running && cor_valid) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == nvec - 1'b1) begin running <= 1'b0; done <= 1'b1; end
      end
    end

  a_no_start_while_running: assert property (@(posedge clk) disable iff (!rst_n)
                                             start |-> !running);
endmodule
