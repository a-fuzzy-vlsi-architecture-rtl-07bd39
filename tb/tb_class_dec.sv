// tb_class_dec: checks the winner-bit decoder for all eight winner-bit
// patterns against a table of which class each pattern names.
module tb_class_dec;
  logic       clk = 1'b0;
  logic [2:0] wn;
  logic [1:0] idx;
  int         checks = 0, failures = 0;
  // wn = {root, pair 2/3, pair 0/1}; expected class index per pattern
  int         want_tab [8] = '{0, 1, 0, 1, 2, 2, 3, 3};

  class_dec dut (.wn, .idx);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 8; p++) begin
      wn = 3'(p);
      @(posedge clk);
      checks++;
      if (int'(idx) != want_tab[p]) begin
        failures++;
        $display("class_dec(%b) = %0d, want %0d", wn, idx, want_tab[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
