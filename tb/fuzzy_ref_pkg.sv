// fuzzy_ref_pkg: reference model for the classifier testbenches.
// Evaluates the trapezoidal membership function in real arithmetic and maps
// the fraction to a byte as floor(255 * fraction), then applies the fuzzy
// AND (minimum over bands), the winner-class rule (maximum over classes, the
// first class on ties) and the rejection rule (maximum below 127.5).
package fuzzy_ref_pkg;

  typedef struct {
    int a, b, c, d;
  } trap_ref_t;

  function automatic int trap_ref(int x, trap_ref_t t);
    real fr;
    if (x < t.a || x > t.d) return 0;
    if (x < t.b) begin
      fr = real'(x - t.a) / real'(t.b - t.a);
      return int'($floor(fr * 255.0 + 1e-9));
    end
    if (x <= t.c) return 255;
    fr = real'(t.d - x) / real'(t.d - t.c);
    return int'($floor(fr * 255.0 + 1e-9));
  endfunction

  // Random trapezoid a <= b <= c <= d centred near ctr
  function automatic trap_ref_t rand_trap(int ctr);
    trap_ref_t t;
    int lo  = ctr - int'($urandom_range(2, 30));
    int hi  = ctr + int'($urandom_range(2, 30));
    t.b = (lo < 0) ? 0 : lo;
    t.c = (hi > 255) ? 255 : hi;
    t.a = t.b - int'($urandom_range(0, 40));
    t.d = t.c + int'($urandom_range(0, 40));
    if (t.a < 0)   t.a = 0;
    if (t.d > 255) t.d = 255;
    return t;
  endfunction

  // Class code of the winner; 4 is the rejection class
  function automatic int decide(int g[4], output int maxv);
    int widx = 0;
    maxv = g[0];
    for (int k = 1; k < 4; k++) if (g[k] > maxv) begin maxv = g[k]; widx = k; end
    return (2 * maxv < 255) ? 4 : widx;
  endfunction

endpackage
