// tb_min8: checks the eight-input minimum. Each vector is checked against a
// loop minimum; the minimum is also planted at every position in turn so each
// branch of the tree is exercised.
module tb_min8;
  logic            clk = 1'b0;
  logic [7:0][7:0] u;
  logic [7:0]      y;
  int              checks = 0, failures = 0;

  min8 dut (.u, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int want = 255;
    @(posedge clk);
    for (int i = 0; i < 8; i++) if (int'(u[i]) < want) want = int'(u[i]);
    checks++;
    if (int'(y) != want) begin
      failures++;
      $display("min8(%h) = %0d, want %0d", u, y, want);
    end
  endtask

  initial begin
    for (int pos = 0; pos < 8; pos++) begin
      for (int i = 0; i < 8; i++) u[i] = 8'(200 + i);
      u[pos] = 8'(10 + pos);
      check();
    end
    u = '1; check();
    u = '0; check();
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 8; i++) u[i] = 8'($urandom_range(0, 255));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
