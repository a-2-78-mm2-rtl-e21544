// idd_pkg: types and constants shared by the MIMO iterative detection and
// decoding (IDD) receiver. The memory geometry (3 banks x 24 words x 27
// L-values of 5 bits), five detector cores, up to 4x4 antennas and 64-QAM
// follow the published architecture. The sample width of y~ and R, the
// vector-index width and the bit order inside a received vector are choices
// of this design.
package idd_pkg;
  localparam int LW      = 5;            // L-value width (two's complement)
  localparam int NP      = 24;           // words per L-memory bank (N_p)
  localparam int BANK_W  = 27;           // L-values per bank word
  localparam int NBANKS  = 3;
  localparam int ZMAX    = BANK_W*NBANKS; // 81
  localparam int MT_MAX  = 4;            // transmit antennas
  localparam int Q_MAX   = 6;            // bits per QAM symbol (64-QAM)
  localparam int VEC_L   = MT_MAX*Q_MAX; // L-values per received vector
  localparam int DW      = 12;           // y~ / R component width
  localparam int VIDX_W  = 10;           // received-vector index width
  localparam int NCB_W   = 11;           // code block length width (<= 1944)
  localparam int COL_W   = 5;            // word (block column) index width
  localparam int Z_W     = 7;            // lifting size width

  typedef logic signed [LW-1:0] lval_t;
  typedef logic signed [DW-1:0] smp_t;
  typedef struct packed { smp_t re; smp_t im; } cplx_t;

  // One received vector: y~ and the upper-triangular R (row-major, full
  // 4x4 storage; entries below the diagonal are ignored, R[i][i] is real).
  typedef struct packed {
    cplx_t [MT_MAX-1:0]             y;
    cplx_t [MT_MAX-1:0][MT_MAX-1:0] r;
  } rxvec_t;

  // Packet from the dispatcher to an SD core.
  typedef struct packed {
    logic [VIDX_W-1:0]  idx;
    rxvec_t             d;
    lval_t [VEC_L-1:0]  la;
  } sd_in_t;

  // Result of an SD core: extrinsic L-values of one received vector.
  typedef struct packed {
    logic [VIDX_W-1:0]  idx;
    lval_t [VEC_L-1:0]  le;
  } sd_out_t;

  // Run-time configuration of the detector side.
  typedef struct packed {
    logic [2:0]       mt;   // 1..4 transmit antennas
    logic [2:0]       q;    // 2, 4 or 6 bits per symbol
    logic [NCB_W-1:0] ncb;  // code block length in bits
    logic [Z_W-1:0]   z;    // lifting size (L-values per memory word)
  } det_cfg_t;

  // Address of one memory access: lane k uses word addr1 when sel1[k] is
  // set and word addr0 otherwise (two-word access of the address decoder).
  typedef struct packed {
    logic [COL_W-1:0] addr0;
    logic [COL_W-1:0] addr1;
    logic [ZMAX-1:0]  sel1;
  } lm_addr_t;

  typedef struct packed {
    lm_addr_t          a;
    logic [ZMAX-1:0]   we;
    lval_t [ZMAX-1:0]  d;
  } lm_wr_t;

  // One prototype-matrix element of the LDPC decoder program.
  typedef struct packed {
    logic [COL_W-1:0] col;        // block column of H_p
    logic [Z_W-1:0]   shift;      // cyclic shift of the identity
    logic             layer_end;  // last element of its layer (row)
    logic             first_use;  // first access to this column in an iteration
    logic             last_use;   // last access to this column in an iteration
  } ldpc_instr_t;

  // Compressed check-node message of one lane and one layer (offset
  // min-sum): the two smallest input magnitudes after the offset, the
  // position of the smallest and the product of the input signs.
  typedef struct packed {
    logic [LW-2:0] m1;
    logic [LW-2:0] m2;
    logic [4:0]    idx;
    logic          sp;
  } msg_t;

  function automatic lval_t sat_l(input logic signed [15:0] v);
    if (v > 16'sd15)       return 5'sd15;
    else if (v < -16'sd15) return -5'sd15;
    else                   return lval_t'(v);
  endfunction
endpackage
