// tb_selector: checks the final decision for random and directed sets of four
// discriminant values: the winning class is the first with the largest value,
// replaced by the rejection class when that value is under 127.5.
module tb_selector;
  import fuzzy_pkg::*;
  logic            clk = 1'b0;
  logic [3:0][7:0] g;
  class_t          cls;
  logic [7:0]      maxv;
  logic            rejected;
  int              checks = 0, failures = 0;

  selector dut (.g, .cls, .maxv, .rejected);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int want = -1, widx = 0, want_cls;
    @(posedge clk);
    for (int i = 0; i < 4; i++) if (int'(g[i]) > want) begin want = int'(g[i]); widx = i; end
    want_cls = (2 * want < 255) ? 4 : widx;
    checks++;
    if (int'(maxv) != want || int'(cls) != want_cls || rejected != (want_cls == 4)) begin
      failures++;
      $display("selector(%h) = %0d/%0d, want %0d/%0d", g, cls, maxv, want_cls, want);
    end
  endtask

  initial begin
    for (int pos = 0; pos < 4; pos++) begin
      g = {8'd100, 8'd110, 8'd120, 8'd126};
      g[pos] = 8'd128;
      check();
      g[pos] = 8'd127;
      check();
    end
    g = {8'd200, 8'd200, 8'd200, 8'd200}; check();
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 4; i++) g[i] = 8'($urandom_range(0, 255));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
