// dfu: Discriminant Functional Unit of one class.
//
// An mbfu produces the eight membership degrees of the current pixel and a
// min8 tree takes their minimum, the discriminant value g_k of the class
// (fuzzy AND of its eight sub rules). The minimum is registered on g.
//
// Timing: g reflects a pixel two edges after its last byte was written (one
// edge for the degrees, one for the minimum). The write port is the mbfu's.
// The MBFU + MIN8 composition is the original architecture's; the output register is this
// design's choice.
module dfu
  import fuzzy_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic         wr_param,
  input  logic [4:0]   wr_addr,
  input  logic [W-1:0] wr_data,
  output logic [W-1:0] g          // registered discriminant value g_k(X)
);

  logic [NBANDS-1:0][W-1:0] mu;
  logic [W-1:0]             gmin;

  mbfu #(.W(W)) u_mbfu (
    .clk, .rst_n, .wr_en, .wr_param, .wr_addr, .wr_data, .mu
  );

  min8 #(.W(W)) u_min8 (.u(mu), .y(gmin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) g <= '0;
    else        g <= gmin;
  end

endmodule
