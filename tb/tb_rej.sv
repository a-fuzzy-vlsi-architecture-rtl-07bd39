// tb_rej: checks the rejection decision for every maximum value 0..255 and
// every class index: values below half of 255 (127.5) give the rejection
// class, others keep the index.
module tb_rej;
  import fuzzy_pkg::*;
  logic       clk = 1'b0;
  logic [7:0] maxv;
  logic [1:0] idx;
  class_t     cls;
  logic       rejected;
  int         checks = 0, failures = 0;

  rej dut (.maxv, .idx, .cls, .rejected);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int k = 0; k < 4; k++) begin
        bit want_rej;
        int want_cls;
        maxv = 8'(v); idx = 2'(k);
        @(posedge clk);
        want_rej = (real'(v) < 255.0 / 2.0);
        want_cls = want_rej ? 4 : k;
        checks++;
        if (rejected != want_rej || int'(cls) != want_cls) begin
          failures++;
          $display("rej(%0d,%0d) = %0d/%0b, want %0d/%0b", v, k, cls, rejected, want_cls, want_rej);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
