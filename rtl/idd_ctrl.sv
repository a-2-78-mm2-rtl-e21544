// idd_ctrl: control unit of the interleaved IDD schedule, in the decoder
// clock domain. Two code blocks are kept in flight, one per shared L-memory
// block. mem_cb_sel = 0 gives CB1 to the detector and CB2 to the decoder,
// mem_cb_sel = 1 the reverse, so a code block is detected while the other
// one is decoded. In every round the unit starts the detector if the block
// on its side needs detection and the decoder if the block on its side
// needs decoding, waits until both have finished and both running signals
// are low, and then toggles mem_cb_sel. A block that has been decoded
// iters times is finished (cb_done) and its slot is free; a slot is started
// with cb_start once its input data are loaded. The detector start and done
// events cross the clock boundary as toggles through 3-stage synchronizers;
// det_first is quasi-static (it only changes while the detector is idle).
// The schedule and the switching rule are published; the toggle handshake
// and the per-slot bookkeeping are this design's choices.
module idd_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] iters,          // IDD iterations I (>= 1)
  input  logic [1:0] cb_start,       // slot 0 = CB1, slot 1 = CB2
  output logic [1:0] cb_busy,
  output logic [1:0] cb_done,
  output logic       mem_cb_sel,
  output logic       det_start_tgl,  // to the detector domain
  output logic       det_first,
  input  logic       det_done_tgl,   // from the detector domain
  input  logic       det_running,    // from the detector domain
  output logic       dec_start,
  output logic       dec_last,       // the decoding started is the last one
  input  logic       dec_done,
  input  logic       dec_running
);
  typedef enum logic [1:0] {S_PICK, S_WAIT} state_t;
  state_t st;
  logic [1:0] nxt_det;
  logic [3:0] cnt [2];
  logic det_done_s, det_done_d, det_run_s, wait_det, wait_dec, did_det, did_dec;
  logic det_slot, dec_slot, det_task, dec_task;

  sync3 u_sd (.clk, .rst_n, .d(det_done_tgl), .q(det_done_s));
  sync3 u_sr (.clk, .rst_n, .d(det_running),  .q(det_run_s));

  always_comb begin
    det_slot = mem_cb_sel;
    dec_slot = ~mem_cb_sel;
    det_task = cb_busy[det_slot] &&  nxt_det[det_slot];
    dec_task = cb_busy[dec_slot] && !nxt_det[dec_slot];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_PICK; cb_busy <= '0; cb_done <= '0; nxt_det <= '0;
      cnt[0] <= '0; cnt[1] <= '0;
      mem_cb_sel <= 1'b0; det_start_tgl <= 1'b0; det_first <= 1'b0;
      dec_start <= 1'b0; dec_last <= 1'b0;
      det_done_d <= 1'b0; wait_det <= 1'b0; wait_dec <= 1'b0;
      did_det <= 1'b0; did_dec <= 1'b0;
    end else begin
      cb_done    <= '0;
      dec_start  <= 1'b0;
      det_done_d <= det_done_s;
      for (int s = 0; s < 2; s++)
        if (cb_start[s] && !cb_busy[s]) begin
          cb_busy[s] <= 1'b1; nxt_det[s] <= 1'b1; cnt[s] <= '0;
        end
      case (st)
        S_PICK:
          if (det_task || dec_task) begin
            if (det_task) begin
              det_start_tgl <= ~det_start_tgl;
              det_first     <= (cnt[det_slot] == '0);
            end
            if (dec_task) begin
              dec_start <= 1'b1;
              dec_last  <= (cnt[dec_slot] == iters - 4'd1);
            end
            wait_det <= det_task;
            wait_dec <= dec_task;
            did_det  <= det_task;
            did_dec  <= dec_task;
            st <= S_WAIT;
          end else if (cb_busy != '0) begin
            mem_cb_sel <= ~mem_cb_sel;   // nothing to do on this side: swap
          end
        S_WAIT: begin
          if (det_done_s != det_done_d) wait_det <= 1'b0;
          if (dec_done) wait_dec <= 1'b0;
          if (!wait_det && !wait_dec && !det_run_s && !dec_running && !dec_start) begin
            if (did_det) nxt_det[det_slot] <= 1'b0;
            if (did_dec) begin
              cnt[dec_slot] <= cnt[dec_slot] + 4'd1;
              if (cnt[dec_slot] == iters - 4'd1) begin
                cb_busy[dec_slot] <= 1'b0; cb_done[dec_slot] <= 1'b1;
              end else nxt_det[dec_slot] <= 1'b1;
            end
            mem_cb_sel <= ~mem_cb_sel;
            st <= S_PICK;
          end
        end
        default: st <= S_PICK;
      endcase
    end
endmodule
