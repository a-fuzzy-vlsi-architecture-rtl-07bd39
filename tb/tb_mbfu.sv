// tb_mbfu: loads random trapezoids for the eight bands byte by byte, then
// many pixels, and checks each of the eight registered degrees against the
// reference model. Checks the one-cycle latency from the last pixel byte to
// mu, that pixel writes leave the corners alone, and the reset state.
module tb_mbfu;
  import fuzzy_ref_pkg::*;
  logic            clk = 1'b0, rst_n = 1'b0;
  logic            wr_en = 1'b0, wr_param = 1'b0;
  logic [4:0]      wr_addr = '0;
  logic [7:0]      wr_data = '0;
  logic [7:0][7:0] mu;
  int              checks = 0, failures = 0;
  trap_ref_t       tr [8];
  int              px [8];

  mbfu dut (.clk, .rst_n, .wr_en, .wr_param, .wr_addr, .wr_data, .mu);

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

  task automatic load_params();
    for (int j = 0; j < 8; j++) begin
      tr[j] = rand_trap(int'($urandom_range(20, 235)));
      wr(1, 4 * j + 0, tr[j].a);
      wr(1, 4 * j + 1, tr[j].b);
      wr(1, 4 * j + 2, tr[j].c);
      wr(1, 4 * j + 3, tr[j].d);
    end
  endtask

  task automatic check_mu(string tag);
    for (int j = 0; j < 8; j++) begin
      int want = trap_ref(px[j], tr[j]);
      checks++;
      if (int'(mu[j]) != want) begin
        failures++;
        if (failures < 10) $display("%s band %0d x=%0d: mu=%0d want %0d", tag, j, px[j], mu[j], want);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (mu != '0) begin failures++; $display("mu not cleared by reset"); end
    rst_n = 1'b1;
    @(negedge clk);
    // after reset all corners are zero: only x = 0 (the reset pixel) is in the set
    for (int j = 0; j < 8; j++) begin tr[j] = '{0, 0, 0, 0}; px[j] = 0; end
    check_mu("reset");
    for (int s = 0; s < 20; s++) begin
      load_params();
      for (int n = 0; n < 50; n++) begin
        for (int j = 0; j < 8; j++) begin
          px[j] = (n % 2 == 0) ? int'($urandom_range(0, 255))
                               : tr[j].a + int'($urandom_range(0, 32'(tr[j].d - tr[j].a)));
          wr(0, j, px[j]);
        end
        // last byte was taken at the edge just before this negedge; the
        // degrees appear one edge later
        @(negedge clk);
        check_mu("pixel");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
