// idd_top: MIMO iterative detection and decoding receiver core. A multi-core
// soft-in soft-out MIMO detector (detector clock) and a QC-LDPC decoder with
// writeback unit (decoder clock) exchange L-values through two shared
// L-memory blocks, CB1 and CB2. Two code blocks are processed in an
// interleaved fashion: while one is detected, the other is decoded; after
// each half-iteration the control unit swaps the blocks by switching the
// multiplexers between the processing elements and the memory ports
// (mem_cb_sel) and the clock of each block (lmem_clk_switch). Shared memory
// holds one L-value per code bit: the detector overwrites lambda^a with its
// lambda^e, the decoder reads that as its lambda^a and overwrites it with
// its own lambda^e. Control signals between the clock domains pass through
// 3-stage synchronizers. Host ports: input memory and correction table in
// the detector domain; decoder program, slot start/done and the decoded
// hard bits (one block column per hard_valid, in the last IDD iteration) in
// the decoder domain. Configuration inputs are static while blocks are in
// flight. Clocking: each memory block runs on a gated copy of the clock of
// its owner, so its writes follow that owner's clock edges.
module idd_top
  import idd_pkg::*;
#(
  parameter int NC     = 5,
  parameter int DEPTH  = 162,
  parameter int MSHIFT = 6,
  parameter int MAX_E  = 96,
  parameter int MAX_L  = 12,
  parameter int MAX_D  = 24
) (
  input  logic                     det_clk,
  input  logic                     det_rst_n,
  input  logic                     dec_clk,
  input  logic                     dec_rst_n,
  // configuration
  input  det_cfg_t                 cfg,
  input  logic [NC-1:0]            core_en,
  input  logic [3:0]               idd_iters,
  input  logic [3:0]               ldpc_iters,
  input  logic [$clog2(MAX_E):0]   n_elem,
  input  logic [LW-2:0]            beta,
  // detector-domain host ports
  input  logic                     im_we,
  input  logic                     im_cb,
  input  logic [VIDX_W-1:0]        im_idx,
  input  rxvec_t                   im_data,
  input  logic                     lut_we,
  input  logic [LW-1:0]            lut_addr,
  input  lval_t                    lut_data,
  // decoder-domain host ports
  input  logic                     prog_we,
  input  logic [$clog2(MAX_E)-1:0] prog_addr,
  input  ldpc_instr_t              prog_data,
  input  logic [1:0]               cb_start,
  output logic [1:0]               cb_busy,
  output logic [1:0]               cb_done,
  output logic                     hard_valid,
  output logic                     hard_cb,
  output logic [COL_W-1:0]         hard_col,
  output logic [ZMAX-1:0]          hard_bits,
  // observation
  output logic                     det_running,
  output logic                     dec_running,
  output logic                     mem_cb_sel,
  output logic                     shuffle
);
  // ---------------- control and clock-domain crossing ----------------
  logic det_start_tgl, det_start_s, det_start_d, det_start, det_first, det_done;
  logic det_done_tgl, det_cb_sel, dec_cb_sel;
  logic dec_start, dec_last, dec_done, dec_busy, wb_pending;

  idd_ctrl u_ctrl (
    .clk(dec_clk), .rst_n(dec_rst_n), .iters(idd_iters), .cb_start, .cb_busy, .cb_done,
    .mem_cb_sel, .det_start_tgl, .det_first, .det_done_tgl, .det_running,
    .dec_start, .dec_last, .dec_done, .dec_running);

  sync3 u_sync_sel   (.clk(det_clk), .rst_n(det_rst_n), .d(mem_cb_sel),    .q(det_cb_sel));
  sync3 u_sync_start (.clk(det_clk), .rst_n(det_rst_n), .d(det_start_tgl), .q(det_start_s));
  assign dec_cb_sel = ~mem_cb_sel;

  always_ff @(posedge det_clk or negedge det_rst_n)
    if (!det_rst_n) begin
      det_start_d <= 1'b0; det_done_tgl <= 1'b0;
    end else begin
      det_start_d <= det_start_s;
      if (det_done) det_done_tgl <= ~det_done_tgl;
    end
  assign det_start = det_start_s ^ det_start_d;

  // ---------------- detector ----------------
  lm_addr_t         det_ra;
  lm_wr_t           det_wr;
  lval_t [ZMAX-1:0] det_rd;

  mimo_detector #(.NC(NC), .DEPTH(DEPTH), .MSHIFT(MSHIFT)) u_det (
    .clk(det_clk), .rst_n(det_rst_n), .cfg, .core_en, .start(det_start), .cb(det_cb_sel),
    .first(det_first), .running(det_running), .done(det_done),
    .im_we, .im_cb, .im_idx, .im_data, .lut_we, .lut_addr, .lut_data,
    .lm_ra(det_ra), .lm_rd(det_rd), .lm_wr(det_wr), .shift(shuffle));

  // ---------------- decoder and writeback ----------------
  logic [COL_W-1:0] dec_ra_col, wb_ra_col, wb_col, hcol;
  logic             wr_phase, wb_valid, hvalid;
  logic [Z_W-1:0]   wb_shift;
  lval_t [ZMAX-1:0] wb_lp, dec_rd;
  lm_addr_t         dec_ra;
  lm_wr_t           wb_wr;

  ldpc_decoder #(.MAX_E(MAX_E), .MAX_L(MAX_L), .MAX_D(MAX_D)) u_dec (
    .clk(dec_clk), .rst_n(dec_rst_n), .prog_we, .prog_addr, .prog_data,
    .z(cfg.z), .n_elem, .iters(ldpc_iters), .beta, .start(dec_start), .busy(dec_busy),
    .done(dec_done), .ext_ra(dec_ra_col), .ext_rd(dec_rd), .wr_phase,
    .wb_valid, .wb_col, .wb_shift, .wb_lp);

  ldpc_writeback u_wb (
    .clk(dec_clk), .rst_n(dec_rst_n), .z(cfg.z), .in_valid(wb_valid), .in_col(wb_col),
    .in_shift(wb_shift), .in_lp(wb_lp), .ra(wb_ra_col), .rd(dec_rd), .wr(wb_wr),
    .hard_valid(hvalid), .hard_col(hcol), .hard_bits, .pending(wb_pending));

  // read-address multiplexer in front of the shared memory (decoder side)
  always_comb begin
    dec_ra.addr0 = wr_phase ? wb_ra_col : dec_ra_col;
    dec_ra.addr1 = dec_ra.addr0;
    dec_ra.sel1  = '0;
  end
  assign dec_running = dec_busy | wb_pending;
  assign hard_valid  = hvalid & dec_last;
  assign hard_col    = hcol;
  assign hard_cb     = dec_cb_sel;

  // ---------------- shared L-memory with its clock switch ----------------
  logic             cb1_clk, cb2_clk;
  lval_t [ZMAX-1:0] cb1_rd, cb2_rd;

  lmem_clk_switch u_clksw (
    .det_clk, .dec_clk, .det_cb_sel, .det_running, .dec_cb_sel, .dec_running,
    .cb1_clk, .cb2_clk);

  // The port multiplexers follow the decoder-domain select: right after a
  // swap the synchronized detector select still points at the block the
  // decoder has just taken over, but the detector is idle until its start
  // arrives through the same synchronizer depth, after its select.
  shared_lmem u_cb1 (.clk(cb1_clk), .wr(dec_cb_sel ? det_wr : wb_wr),
                     .ra(dec_cb_sel ? det_ra : dec_ra), .rd(cb1_rd));
  shared_lmem u_cb2 (.clk(cb2_clk), .wr(dec_cb_sel ? wb_wr : det_wr),
                     .ra(dec_cb_sel ? dec_ra : det_ra), .rd(cb2_rd));

  assign det_rd = det_cb_sel ? cb2_rd : cb1_rd;
  assign dec_rd = dec_cb_sel ? cb2_rd : cb1_rd;
endmodule
