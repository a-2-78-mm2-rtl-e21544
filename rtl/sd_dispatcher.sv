// sd_dispatcher: issues the received vectors of one code block to the SD
// input buffers. After start it walks the vector index from 0 to nvec-1 and,
// in every cycle in which an input buffer is free and the shuffler is not
// shifting, sends one complete data set (vector index, y~ and R read from
// the input memory, lambda^a read through the alignment unit) to a free
// buffer. Buffers in front of an idle enabled core are preferred, then any
// empty buffer of an enabled core. In the first IDD iteration lambda^a is
// forced to zero. One vector per cycle is the published rate; the
// run-time constraints and scheduling policies of the published dispatcher
// are not included, because the detector cores here have a fixed run-time.
// Note: the received-vector part of the packet (pkt.d) is the input-memory
// read data passed through unchanged; the dispatcher only adds the index
// and the a priori values.
module sd_dispatcher
  import idd_pkg::*;
#(
  parameter int NC = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              first,
  input  logic [VIDX_W-1:0] nvec,
  input  logic [NC-1:0]     core_en,
  input  logic [NC-1:0]     core_avail,
  input  logic [NC-1:0]     ext_valid,
  input  logic              shift,
  output logic [VIDX_W-1:0] vidx,        // vector being read
  input  rxvec_t            im_data,     // input memory at vidx
  input  lval_t [VEC_L-1:0] la_vec,      // lambda^a of vector vidx
  output logic [NC-1:0]     load,
  output sd_in_t            pkt,
  output logic              active
);
  always_comb begin
    logic found;
    load  = '0;
    found = 1'b0;
    if (active && !shift) begin
      for (int i = 0; i < NC; i++)
        if (!found && !ext_valid[i] && core_avail[i]) begin load[i] = 1'b1; found = 1'b1; end
      for (int i = 0; i < NC; i++)
        if (!found && !ext_valid[i] && core_en[i]) begin load[i] = 1'b1; found = 1'b1; end
    end
    pkt.idx = vidx;
    pkt.d   = im_data;
    pkt.la  = first ? '0 : la_vec;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active <= 1'b0;
      vidx   <= '0;
    end else if (start) begin
      active <= (nvec != '0);
      vidx   <= '0;
    end else if (|load) begin
      vidx <= vidx + 1'b1;
      if (vidx == nvec - 1'b1) active <= 1'b0;
    end
endmodule
