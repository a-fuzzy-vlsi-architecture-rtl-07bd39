// tb_min2: checks the two-input minimum on corner cases and random pairs
// against the testbench's own comparison.
module tb_min2;
  logic       clk = 1'b0;
  logic [7:0] a, b, y;
  int         checks = 0, failures = 0;

  min2 dut (.a, .b, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int av, int bv);
    int want;
    a = 8'(av); b = 8'(bv);
    @(posedge clk);
    want = (av <= bv) ? av : bv;
    checks++;
    if (int'(y) != want) begin
      failures++;
      $display("min2(%0d,%0d) = %0d, want %0d", av, bv, y, want);
    end
  endtask

  initial begin
    check(0, 0); check(255, 0); check(0, 255); check(255, 255);
    check(127, 128); check(128, 127); check(77, 77);
    for (int i = 0; i < 2000; i++)
      check(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
