// min2: the smaller of two unsigned words (fuzzy AND of two degrees).
// Combinational; on equal inputs either value is the answer.
module min2 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = (b < a) ? b : a;
endmodule
