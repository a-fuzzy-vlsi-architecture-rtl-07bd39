// mbfu: Membership Functional Unit of one class.
//
// It keeps the four trapezoid corners (a, b, c, d) of each of the eight bands
// and the eight band values of the current pixel. Both arrive as a sequence of
// single bytes on the same write port: wr_param selects a corner register
// (wr_addr = {band, corner}) or a pixel register (wr_addr[2:0] = band). Eight
// trap_mf sub rules evaluate all bands in parallel, one per band, and their
// degrees are registered on mu.
//
// Timing: a byte written in cycle t is in its register after edge t; the
// degrees that use it appear on mu after the next edge, one cycle later.
// Reset clears all parameters and the pixel (a = b = c = d = 0 is a trapezoid
// that only contains x = 0).
// The unit, its parallel sub rules and its byte-wise loading follow the
// original architecture; the register organisation and write port are this design's own.
module mbfu
  import fuzzy_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,     // write one byte
  input  logic                   wr_param,  // 1: trapezoid corner, 0: pixel byte
  input  logic [4:0]             wr_addr,   // corner: {band, corner}; pixel: band in [2:0]
  input  logic [W-1:0]           wr_data,
  output logic [NBANDS-1:0][W-1:0] mu       // registered degrees, one per band
);

  logic [NBANDS-1:0][NPARAMS-1:0][W-1:0] prm;
  logic [NBANDS-1:0][W-1:0]              pix;
  logic [NBANDS-1:0][W-1:0]              u;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prm <= '0;
      pix <= '0;
    end else if (wr_en) begin
      if (wr_param) prm[wr_addr[4:2]][wr_addr[1:0]] <= wr_data;
      else          pix[wr_addr[2:0]]               <= wr_data;
    end
  end

  for (genvar j = 0; j < NBANDS; j++) begin : g_rule
    trap_mf #(.W(W)) u_trap (
      .x (pix[j]),
      .a (prm[j][P_A]),
      .b (prm[j][P_B]),
      .c (prm[j][P_C]),
      .d (prm[j][P_D]),
      .u (u[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mu <= '0;
    else        mu <= u;
  end

endmodule
