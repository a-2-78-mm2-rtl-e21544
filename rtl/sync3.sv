// sync3: three-stage flip-flop synchronizer for one control bit entering the
// clock domain of clk. The published receiver synchronizes its control
// signals with 3-stage synchronizers; the reset value is this design's choice.
// Latency: the input appears at q after the third rising edge of clk.
module sync3 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic [2:0] s;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) s <= '0;
    else        s <= {s[1:0], d};
  assign q = s[2];
endmodule
