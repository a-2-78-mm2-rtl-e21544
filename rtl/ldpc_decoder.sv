// ldpc_decoder: run-time programmable layered offset-min-sum decoder for
// quasi-cyclic LDPC codes. The code is given as a program of prototype-
// matrix elements (block column, cyclic shift, end-of-layer flag, and flags
// marking the first and last access to each column within an iteration),
// written through prog_we/prog_addr/prog_data, plus the lifting size z
// (<= Z_MAX = 81), the number of elements and of iterations and the offset.
// The data path handles one prototype element per cycle: Z_MAX L-values are
// read from the internal L-memory (3 banks x 24 words x 27 L-values, only
// the lanes below z written), cyclically shifted according to the element
// and fed to Z_MAX node computation units. The internal memory keeps every
// column in the rotation of its last update (cur_rot), so only one shifter
// is needed: a column is shifted by the difference between the new and the
// stored rotation. The first read of each column in the first iteration is
// taken from the shared L-memory (ext_ra/ext_rd, natural order, giving
// lambda^a); in the last iteration the last write of each column is also
// handed to the writeback unit (wb_*), still in its rotation wb_shift.
// Each layer takes a read pass and a write pass, so an element costs two
// cycles rather than the published one (no overlap of consecutive layers).
// Handshake: start for one cycle; busy until done pulses. wr_phase is high
// in write-pass cycles, when the shared-memory read port belongs to the
// writeback unit.
module ldpc_decoder
  import idd_pkg::*;
#(
  parameter int MAX_E = 96,   // program depth (prototype elements)
  parameter int MAX_L = 12,   // layers (rows of H_p)
  parameter int MAX_D = 24    // elements per layer
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_we,
  input  logic [$clog2(MAX_E)-1:0] prog_addr,
  input  ldpc_instr_t              prog_data,
  input  logic [Z_W-1:0]           z,
  input  logic [$clog2(MAX_E):0]   n_elem,
  input  logic [3:0]               iters,
  input  logic [LW-2:0]            beta,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [COL_W-1:0]         ext_ra,
  input  lval_t [ZMAX-1:0]         ext_rd,
  output logic                     wr_phase,
  output logic                     wb_valid,
  output logic [COL_W-1:0]         wb_col,
  output logic [Z_W-1:0]           wb_shift,
  output lval_t [ZMAX-1:0]         wb_lp
);
  localparam int EW = $clog2(MAX_E);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR} state_t;
  state_t st;

  ldpc_instr_t prog [MAX_E];
  logic [Z_W-1:0] cur_rot [NP];
  msg_t  [ZMAX-1:0] layer_mem [MAX_L];
  logic  [ZMAX-1:0] sgn_mem [MAX_E];
  lval_t [ZMAX-1:0] qbuf [MAX_D];

  logic [EW-1:0]        pc, lstart;
  logic [$clog2(MAX_L)-1:0] layer;
  logic [4:0]           eidx;
  logic [3:0]           it;
  ldpc_instr_t          ins;
  logic                 from_ext, last_it;
  logic [Z_W-1:0]       rot;
  lval_t [ZMAX-1:0]     im_rd, src, shifted, q, lnew;
  msg_t  [ZMAX-1:0]     msg_new;
  lm_wr_t               im_wr;
  lm_addr_t             im_ra;
  logic  [ZMAX-1:0]     q_sign;
  always_comb for (int k = 0; k < ZMAX; k++) q_sign[k] = q[k][LW-1];

  assign ins      = prog[pc];
  assign from_ext = (it == '0) && ins.first_use;
  assign last_it  = (it == iters - 4'd1);
  assign ext_ra   = ins.col;
  assign wr_phase = (st == S_WR);
  assign busy     = (st != S_IDLE);

  always_comb begin
    logic [Z_W:0] d;
    d   = {1'b0, ins.shift} + {1'b0, z} - {1'b0, cur_rot[ins.col]};
    if (d >= {1'b0, z}) d = d - {1'b0, z};
    rot = from_ext ? ins.shift : d[Z_W-1:0];
    src = from_ext ? ext_rd : im_rd;
  end

  // internal L-memory: same organisation as a shared L-memory block
  always_comb begin
    im_ra = '{addr0: ins.col, addr1: ins.col, sel1: '0};
    im_wr.a = im_ra;
    im_wr.d = lnew;
    for (int k = 0; k < ZMAX; k++) im_wr.we[k] = (st == S_WR) && (k < int'(z));
  end
  shared_lmem u_iml (.clk, .wr(im_wr), .ra(im_ra), .rd(im_rd));

  cyc_shift u_shift (.din(src), .rot, .z, .dout(shifted));

  for (genvar k = 0; k < ZMAX; k++) begin : g_ncu
    ldpc_ncu u_ncu (
      .clk, .rst_n, .beta,
      .a_valid(st == S_RD), .a_first(eidx == '0), .a_eidx(eidx), .a_l(shifted[k]),
      .a_rzero(it == '0), .a_msg_old(layer_mem[layer][k]), .a_sgn_old(sgn_mem[pc][k]),
      .a_q(q[k]),
      .b_q(qbuf[eidx][k]), .b_eidx(eidx), .b_l(lnew[k]), .msg_new(msg_new[k]));
  end

  assign wb_valid = (st == S_WR) && last_it && ins.last_use;
  assign wb_col   = ins.col;
  assign wb_shift = ins.shift;
  assign wb_lp    = lnew;

  always_ff @(posedge clk)
    if (prog_we && st == S_IDLE) prog[prog_addr] <= prog_data;

  always_ff @(posedge clk) begin
    if (st == S_RD) begin
      qbuf[eidx] <= q;
      sgn_mem[pc] <= q_sign;
    end
    if (st == S_WR) begin
      layer_mem[layer] <= msg_new;
      cur_rot[ins.col] <= ins.shift;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; lstart <= '0; layer <= '0; eidx <= '0; it <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_RD; pc <= '0; lstart <= '0; layer <= '0; eidx <= '0; it <= '0;
        end
        S_RD: begin
          if (ins.layer_end) begin st <= S_WR; pc <= lstart; eidx <= '0; end
          else begin pc <= pc + 1'b1; eidx <= eidx + 1'b1; end
        end
        S_WR: begin
          if (ins.layer_end) begin
            eidx <= '0;
            if ((EW+1)'(pc) == n_elem - 1'b1) begin
              pc <= '0; lstart <= '0; layer <= '0;
              if (last_it) begin st <= S_IDLE; done <= 1'b1; end
              else begin st <= S_RD; it <= it + 1'b1; end
            end else begin
              st <= S_RD; pc <= pc + 1'b1; lstart <= pc + 1'b1; layer <= layer + 1'b1;
            end
          end else begin
            pc <= pc + 1'b1; eidx <= eidx + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
endmodule
