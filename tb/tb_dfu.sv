// tb_dfu: loads random trapezoids for one class, applies many pixels and
// checks the registered discriminant value g (minimum of the eight degrees)
// against the reference model, including its two-cycle latency from the
// last pixel byte.
module tb_dfu;
  import fuzzy_ref_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       wr_en = 1'b0, wr_param = 1'b0;
  logic [4:0] wr_addr = '0;
  logic [7:0] wr_data = '0;
  logic [7:0] g;
  int         checks = 0, failures = 0;
  trap_ref_t  tr [8];
  int         px [8];

  dfu dut (.clk, .rst_n, .wr_en, .wr_param, .wr_addr, .wr_data, .g);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(bit prm, int adr, int dat);
    wr_en = 1'b1; wr_param = prm; wr_addr = 5'(adr); wr_data = 8'(dat);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  function automatic int ref_g();
    int m = 255;
    for (int j = 0; j < 8; j++) begin
      int u = trap_ref(px[j], tr[j]);
      if (u < m) m = u;
    end
    return m;
  endfunction

  initial begin
    int prev, want;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < 20; s++) begin
      for (int j = 0; j < 8; j++) begin
        tr[j] = rand_trap(int'($urandom_range(20, 235)));
        wr(1, 4 * j + 0, tr[j].a);
        wr(1, 4 * j + 1, tr[j].b);
        wr(1, 4 * j + 2, tr[j].c);
        wr(1, 4 * j + 3, tr[j].d);
      end
      @(negedge clk); @(negedge clk);
      for (int n = 0; n < 50; n++) begin
        prev = int'(g);
        for (int j = 0; j < 8; j++) begin
          px[j] = (n % 3 == 0) ? int'($urandom_range(0, 255))
                               : tr[j].b + int'($urandom_range(0, 32'(tr[j].c - tr[j].b)));
          if (n % 3 == 2 && j == n % 8)
            px[j] = tr[j].a + int'($urandom_range(0, 32'(tr[j].d - tr[j].a)));
          wr(0, j, px[j]);
        end
        want = ref_g();
        // one edge after the last byte g still shows the old minimum when
        // only the last band changed its degree; check the final value after
        // the second edge
        @(negedge clk);
        @(negedge clk);
        checks++;
        if (int'(g) != want) begin
          failures++;
          if (failures < 10) $display("g=%0d want %0d (prev %0d)", g, want, prev);
        end
      end
    end
    // latency: from a pixel with g = 0 to one with g = 255, g must change
    // exactly at the second edge after the last byte
    for (int j = 0; j < 8; j++) begin
      tr[j] = '{10, 20, 200, 210};
      wr(1, 4 * j + 0, 10); wr(1, 4 * j + 1, 20); wr(1, 4 * j + 2, 200); wr(1, 4 * j + 3, 210);
    end
    for (int j = 0; j < 8; j++) wr(0, j, 0);
    @(negedge clk); @(negedge clk);
    for (int j = 0; j < 7; j++) wr(0, j, 100);
    wr(0, 7, 100);   // taken at edge t
    checks++;
    if (g != 8'd0) begin failures++; $display("g changed before the pixel was complete"); end
    @(negedge clk);  // edge t+1: degrees
    checks++;
    if (g != 8'd0) begin failures++; $display("g changed one edge after the last byte"); end
    @(negedge clk);  // edge t+2: minimum
    checks++;
    if (g != 8'd255) begin failures++; $display("g=%0d two edges after the last byte, want 255", g); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
