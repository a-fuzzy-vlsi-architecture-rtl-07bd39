// class_dec: turns the winner bits of max4 into the index of the winning
// class. The root bit chooses the pair, and the winner bit of that pair
// chooses the class inside it: idx = {wn[2], wn[2] ? wn[1] : wn[0]}.
// Combinational.
module class_dec (
  input  logic [2:0] wn,    // {root, pair 2/3, pair 0/1} winner bits
  output logic [1:0] idx    // index 0..3 of the winning class
);
  always_comb begin
    idx[1] = wn[2];
    idx[0] = wn[2] ? wn[1] : wn[0];
  end
endmodule
