// max2: the larger of two unsigned words together with a winner bit.
// w is 0 when input a wins and 1 when input b wins; on a tie a wins, so in a
// tree of these cells the lower-numbered input wins ties (this design's
// choice). Combinational.
module max2 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         w
);
  assign w = (b > a);
  assign y = w ? b : a;
endmodule
