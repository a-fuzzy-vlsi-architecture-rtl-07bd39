// tb_trap_mf: exhaustive-in-x check of one trapezoidal sub rule.
// For a set of fixed and random corner sets it sweeps every band value 0..255
// and compares the degree with a real-valued evaluation of the trapezoid,
// floor(255 * fraction), computed in the testbench. Also covers degenerate
// trapezoids (equal corners, vertical sides). Combinational block; a clock
// paces the sweep and bounds the run with a watchdog.
module tb_trap_mf;
  logic       clk = 1'b0;
  logic [7:0] x, a, b, c, d, u;
  int         checks = 0, failures = 0;

  trap_mf dut (.x, .a, .b, .c, .d, .u);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_u(int xv, int av, int bv, int cv, int dv);
    real fr;
    if (xv < av || xv > dv) return 0;
    if (xv < bv) begin
      fr = real'(xv - av) / real'(bv - av);
      return int'($floor(fr * 255.0 + 1e-9));
    end
    if (xv <= cv) return 255;
    fr = real'(dv - xv) / real'(dv - cv);
    return int'($floor(fr * 255.0 + 1e-9));
  endfunction

  task automatic sweep(int av, int bv, int cv, int dv);
    a = 8'(av); b = 8'(bv); c = 8'(cv); d = 8'(dv);
    for (int xv = 0; xv < 256; xv++) begin
      x = 8'(xv);
      @(posedge clk);
      checks++;
      if (int'(u) != ref_u(xv, av, bv, cv, dv)) begin
        failures++;
        if (failures < 10)
          $display("mismatch x=%0d a=%0d b=%0d c=%0d d=%0d: got %0d want %0d",
                   xv, av, bv, cv, dv, u, ref_u(xv, av, bv, cv, dv));
      end
    end
  endtask

  initial begin
    sweep(40, 80, 120, 200);
    sweep(0, 0, 255, 255);
    sweep(10, 10, 10, 10);
    sweep(50, 50, 60, 60);
    sweep(0, 255, 255, 255);
    sweep(0, 1, 254, 255);
    sweep(100, 101, 101, 150);
    for (int i = 0; i < 40; i++) begin
      int v[4];
      for (int k = 0; k < 4; k++) v[k] = int'($urandom_range(0, 255));
      v.sort();
      sweep(v[0], v[1], v[2], v[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
