// rej: rejection unit. The winning class is kept only when its discriminant
// value reaches half of the largest degree; otherwise the pixel goes to the
// rejection class. With 8-bit degrees the largest value is 255 and half of it
// is 127.5, so a value below THRESH = 128 is rejected. This is the same
// decision as comparing the rejection class's degree 1 - max with max.
// Combinational.
module rej
  import fuzzy_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int THRESH = 2 ** (W - 1)   // smallest accepted maximum
) (
  input  logic [W-1:0] maxv,      // largest discriminant value
  input  logic [1:0]   idx,       // index of the class that supplied it
  output class_t       cls,       // final class, CLS_REJ when rejected
  output logic         rejected
);
  always_comb begin
    rejected = (maxv < W'(THRESH));
    cls      = rejected ? CLS_REJ : class_t'({1'b0, idx});
  end
endmodule
