// tb_max2: checks the two-input maximum and its winner bit (0 = a, 1 = b,
// ties to a) on corner cases and random pairs.
module tb_max2;
  logic       clk = 1'b0;
  logic [7:0] a, b, y;
  logic       w;
  int         checks = 0, failures = 0;

  max2 dut (.a, .b, .y, .w);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int av, int bv);
    int  want;
    bit  wantw;
    a = 8'(av); b = 8'(bv);
    @(posedge clk);
    wantw = (bv > av);
    want  = wantw ? bv : av;
    checks++;
    if (int'(y) != want || w != wantw) begin
      failures++;
      $display("max2(%0d,%0d) = %0d/%0b, want %0d/%0b", av, bv, y, w, want, wantw);
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
