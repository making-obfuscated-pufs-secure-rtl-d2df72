// response_ff: the flip-flop that stores the PUF response.
//
// It has a set and a reset input, with set taking priority: with both active
// the flip-flop goes to 1, with only reset active to 0. The randomized
// response setting uses this to load a pseudo-random bit before each query by
// asserting reset and driving set with the random bit. Otherwise the
// flip-flop captures d when en is high.
//
// Timing: set, reset and capture all act on the rising clock edge; q changes
// one cycle after the request. Set-over-reset priority follows the source;
// making set and reset synchronous is this design's choice.
module response_ff (
  input  logic clk,
  input  logic set,
  input  logic rst,
  input  logic en,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    if (set)      q <= 1'b1;
    else if (rst) q <= 1'b0;
    else if (en)  q <= d;
  end

endmodule
