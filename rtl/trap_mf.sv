// trap_mf: one fuzzy sub rule, the trapezoidal membership function of one
// band of one class.
//
// For a band value x and the trapezoid corners a <= b <= c <= d it returns the
// degree u(x) scaled so that 1.0 is the all-ones word:
//   u = 0                              for x < a or x > d
//   u = floor(FULL * (x - a) / (b - a)) for a <= x <  b
//   u = FULL                           for b <= x <= c
//   u = floor(FULL * (d - x) / (d - c)) for c <  x <= d
// The cases are tested in that order, so corners that are out of order still
// give a defined result. Only one ramp is active at a time, so the two ramps
// share a single multiplier and divider; the divisor is never zero in a ramp
// because the ramp is empty when its two corners are equal.
// The function is the original architecture's; the fixed-point scaling and the truncating
// division are this design's choice. Purely combinational.
module trap_mf #(
  parameter int W = 8
) (
  input  logic [W-1:0] x,     // band value of the pixel
  input  logic [W-1:0] a,     // left foot
  input  logic [W-1:0] b,     // left shoulder
  input  logic [W-1:0] c,     // right shoulder
  input  logic [W-1:0] d,     // right foot
  output logic [W-1:0] u      // membership degree, all ones = 1.0
);

  localparam logic [W-1:0] FULL = '1;

  typedef enum logic [1:0] {SEG_ZERO, SEG_RISE, SEG_TOP, SEG_FALL} seg_t;

  seg_t           seg;
  logic [W-1:0]   offs;   // distance of x from the foot of the active ramp
  logic [W-1:0]   span;   // width of the active ramp
  logic [2*W-1:0] num;
  logic [W-1:0]   quo;    // never above FULL, since offs <= span

  always_comb begin
    if (x < a || x > d)   seg = SEG_ZERO;
    else if (x < b)       seg = SEG_RISE;
    else if (x <= c)      seg = SEG_TOP;
    else                  seg = SEG_FALL;
  end

  always_comb begin
    offs = '0;
    span = W'(1);
    unique case (seg)
      SEG_RISE: begin offs = x - a; span = b - a; end
      SEG_FALL: begin offs = d - x; span = d - c; end
      default:  begin offs = '0;    span = W'(1); end
    endcase
  end

  assign num = (2*W)'(offs) * (2*W)'(FULL);
  assign quo = W'(num / (2*W)'(span));

  always_comb begin
    unique case (seg)
      SEG_TOP:          u = FULL;
      SEG_RISE, SEG_FALL: u = quo;
      default:          u = '0;
    endcase
  end

endmodule
