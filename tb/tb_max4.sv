// tb_max4: checks the four-input maximum and its winner bits. The winning
// input index is recovered from the winner bits and compared with the first
// index that holds the maximum (ties to the lower index).
module tb_max4;
  logic            clk = 1'b0;
  logic [3:0][7:0] g;
  logic [7:0]      y;
  logic [2:0]      wn;
  int              checks = 0, failures = 0;

  max4 dut (.g, .y, .wn);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int want = -1, widx = 0, got_idx;
    @(posedge clk);
    for (int i = 0; i < 4; i++) if (int'(g[i]) > want) begin want = int'(g[i]); widx = i; end
    got_idx = wn[2] ? (2 + int'(wn[1])) : int'(wn[0]);
    checks++;
    if (int'(y) != want || got_idx != widx) begin
      failures++;
      $display("max4(%h) = %0d wn=%b, want %0d from %0d", g, y, wn, want, widx);
    end
  endtask

  initial begin
    for (int pos = 0; pos < 4; pos++) begin
      g = {8'd5, 8'd6, 8'd7, 8'd8};
      g[pos] = 8'd250;
      check();
    end
    g = '0; check();
    g = {8'd90, 8'd90, 8'd90, 8'd90}; check();
    g = {8'd90, 8'd90, 8'd10, 8'd10}; check();
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 4; i++) g[i] = 8'($urandom_range(0, 255));
      if (n % 4 == 0) g[$urandom_range(0, 3)] = g[$urandom_range(0, 3)];
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
