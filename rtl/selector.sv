// selector: final decision of the classifier. It groups max4 (largest
// discriminant value and winner bits), class_dec (winner bits to class index)
// and rej (rejection when the largest value is under half scale).
// Combinational; the top level registers its outputs.
module selector
  import fuzzy_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic [3:0][W-1:0] g,         // discriminant values of classes 0..3
  output class_t            cls,       // final class
  output logic [W-1:0]      maxv,      // winning discriminant value
  output logic              rejected
);

  logic [2:0] wn;
  logic [1:0] idx;

  max4      #(.W(W)) u_max4 (.g(g), .y(maxv), .wn(wn));
  class_dec          u_cls  (.wn(wn), .idx(idx));
  rej       #(.W(W)) u_rej  (.maxv(maxv), .idx(idx), .cls(cls), .rejected(rejected));

endmodule
