// min8: minimum of eight membership degrees, the fuzzy AND of the eight sub
// rules of one class (g_k = min_j u_kj).
// Built as a balanced tree of min2 cells: four in the first level, two in the
// second and one at the root, so all eight degrees are compared concurrently
// and the result settles after three comparator delays. Combinational.
module min8 #(
  parameter int W = 8
) (
  input  logic [7:0][W-1:0] u,   // degrees, one per band
  output logic [W-1:0]      y    // smallest degree
);

  logic [3:0][W-1:0] l1;
  logic [1:0][W-1:0] l2;

  for (genvar i = 0; i < 4; i++) begin : g_l1
    min2 #(.W(W)) u_min (.a(u[2*i]), .b(u[2*i+1]), .y(l1[i]));
  end

  for (genvar i = 0; i < 2; i++) begin : g_l2
    min2 #(.W(W)) u_min (.a(l1[2*i]), .b(l1[2*i+1]), .y(l2[i]));
  end

  min2 #(.W(W)) u_root (.a(l2[0]), .b(l2[1]), .y(y));

endmodule
