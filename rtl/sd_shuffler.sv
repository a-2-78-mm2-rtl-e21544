// sd_shuffler: the external input buffers (in_ext) of the NC detector cores,
// connected in a ring, and the shuffler that moves queued packets from busy
// cores to idle ones. Normally buffer i is loaded from the dispatcher (load[i])
// and emptied when core i takes its packet (take[i]). When some buffer holds
// a packet in front of a core that cannot take it (busy or switched off)
// while some enabled, idle core has an empty buffer, shift is raised and
// every buffer takes the content of its ring predecessor (i-1, with 0 fed
// from NC-1) in one cycle; a packet taken by its core in that same cycle is
// not passed on. Shifting is only enabled (shift_en) once the dispatcher has
// issued the last vector of the code block: before that, an idle core's
// empty buffer is simply refilled by the dispatcher. The dispatcher does not
// load while shift is high. The ring
// and the load/shift multiplexer follow the published block diagram; the
// shift condition is this design's choice.
// Lint note: the reset also appears in the assertions' disable condition,
// which some linters report as a reset used both synchronously and
// asynchronously; the flip-flops themselves use it asynchronously only.
module sd_shuffler
  import idd_pkg::*;
#(
  parameter int NC = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NC-1:0]     load,
  input  sd_in_t            load_pkt,
  input  logic [NC-1:0]     take,
  input  logic [NC-1:0]     core_avail,   // enabled and idle
  input  logic              shift_en,     // dispatcher has no vector left
  output logic [NC-1:0]     ext_valid,
  output sd_in_t [NC-1:0]   ext_pkt,
  output logic              shift
);
  logic blocked, idle_empty;
  always_comb begin
    blocked    = |(ext_valid & ~core_avail);
    idle_empty = |(core_avail & ~ext_valid);
    shift      = shift_en && blocked && idle_empty;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ext_valid <= '0;
      ext_pkt   <= '0;
    end else begin
      for (int i = 0; i < NC; i++) begin
        int p;
        p = (i == 0) ? NC-1 : i-1;
        if (shift) begin
          ext_valid[i] <= ext_valid[p] && !take[p];
          ext_pkt[i]   <= ext_pkt[p];
        end else if (load[i]) begin
          ext_valid[i] <= 1'b1;
          ext_pkt[i]   <= load_pkt;
        end else if (take[i]) begin
          ext_valid[i] <= 1'b0;
        end
      end
    end

  // A packet is only loaded into an empty buffer, never during a shift.
  a_load_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                 (load & ext_valid) == '0);
  a_load_shift: assert property (@(posedge clk) disable iff (!rst_n)
                                 shift |-> load == '0);
endmodule
