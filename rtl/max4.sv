// max4: maximum of the four discriminant values and the winner bits Wn that
// tell which input supplied it.
// Three max2 cells: one compares inputs 0 and 1 (winner bit wn[0]), one
// compares inputs 2 and 3 (wn[1]) and the root compares the two partial
// maxima (wn[2], 0 = the pair 0/1 won). Ties go to the lower-numbered input.
// Combinational.
module max4 #(
  parameter int W = 8
) (
  input  logic [3:0][W-1:0] g,    // discriminant values of classes 0..3
  output logic [W-1:0]      y,    // largest value
  output logic [2:0]        wn    // winner bits {root, pair 2/3, pair 0/1}
);

  logic [W-1:0] m01, m23;

  max2 #(.W(W)) u_max01 (.a(g[0]), .b(g[1]), .y(m01), .w(wn[0]));
  max2 #(.W(W)) u_max23 (.a(g[2]), .b(g[3]), .y(m23), .w(wn[1]));
  max2 #(.W(W)) u_root  (.a(m01),  .b(m23),  .y(y),   .w(wn[2]));

endmodule
