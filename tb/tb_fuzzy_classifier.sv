// tb_fuzzy_classifier: end-to-end test of the classifier at its default size
// (eight bands, four classes, 8-bit data).
//
// The host side programs random trapezoids for every class and band through
// the byte write port, then classifies a synthetic 32 x 32 pixel image, one
// pixel at a time: eight pixel writes, then wait for the interrupt. Pixels are
// drawn near one class's trapezoids, between classes, or at random, so every
// class wins, pixels are rejected and classes tie. Each result (class code,
// winning degree, rejection flag) is compared with the reference model.
// Directed steps check: the interrupt three edges after the last pixel byte
// and busy meanwhile; writes ignored while busy; interrupt acknowledge; the
// interrupt cleared by the next start; reprogramming a single corner. Each of
// these mechanisms is counted and a mechanism that never happens is a
// failure.
module tb_fuzzy_classifier;
  import fuzzy_pkg::*;
  import fuzzy_ref_pkg::*;

  localparam int IMG_N = 32;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       we = 1'b0;
  logic [7:0] addr = '0, data_in = '0;
  logic       busy, result_rejected, int_o;
  class_t     result_class;
  logic [7:0] result_degree;

  int         checks = 0, failures = 0;
  trap_ref_t  tr [4][8];
  int         px [8];
  int         cyc = 0;
  int         n_win [5] = '{0, 0, 0, 0, 0};
  int         n_tie = 0, n_drop = 0, n_ack = 0, n_restart = 0, n_reprog = 0, n_lat = 0;

  fuzzy_classifier dut (
    .clk, .rst_n, .we, .addr, .data_in,
    .busy, .result_class, .result_degree, .result_rejected, .int_o
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the interrupt is only raised together with a result
  a_int_has_result: assert property (@(posedge clk) disable iff (!rst_n)
                                     $rose(int_o) |-> $past(busy));

  task automatic wr(int adr, int dat);
    we = 1'b1; addr = 8'(adr); data_in = 8'(dat);
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic program_all();
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 8; j++) begin
        tr[k][j] = rand_trap(int'($urandom_range(30, 225)));
        wr(32 * k + 4 * j + 0, tr[k][j].a);
        wr(32 * k + 4 * j + 1, tr[k][j].b);
        wr(32 * k + 4 * j + 2, tr[k][j].c);
        wr(32 * k + 4 * j + 3, tr[k][j].d);
      end
  endtask

  function automatic int expect_cls(output int maxv, output bit tie);
    int g [4];
    int c;
    for (int k = 0; k < 4; k++) begin
      g[k] = 255;
      for (int j = 0; j < 8; j++) begin
        int u = trap_ref(px[j], tr[k][j]);
        if (u < g[k]) g[k] = u;
      end
    end
    c = decide(g, maxv);
    tie = 1'b0;
    for (int k = 0; k < 4; k++)
      if (k != c && c != 4 && g[k] == maxv) tie = 1'b1;
    return c;
  endfunction

  // Sends the pixel in px[], waits for the interrupt and checks the result
  // and the latency. Optionally tries a write while busy.
  task automatic classify(bit poke_busy);
    int  want, wmax, t0;
    bit  tie;
    for (int j = 0; j < 7; j++) wr(int'(ADDR_PIX_BASE) + j, px[j]);
    we = 1'b1; addr = ADDR_PIX_BASE + 8'd7; data_in = 8'(px[7]);
    @(posedge clk);
    t0 = cyc + 1;            // value of cyc after the start edge
    @(negedge clk);
    we = 1'b0;
    want = expect_cls(wmax, tie);
    checks++;
    if (!busy) begin failures++; $display("busy not raised after start"); end
    if (poke_busy) begin
      // overwrite band 0 and class 0's corners while busy: must be ignored
      we = 1'b1; addr = ADDR_PIX_BASE; data_in = 8'(px[0] ^ 8'hFF);
      @(negedge clk);
      addr = 8'h00; data_in = 8'(tr[0][0].a ^ 8'h55);
      @(negedge clk);
      we = 1'b0;
      n_drop++;
    end
    while (!int_o) @(negedge clk);
    checks++;
    if (cyc - t0 != 3) begin
      failures++;
      $display("result %0d edges after the start edge, want 3", cyc - t0);
    end else n_lat++;
    checks++;
    if (int'(result_class) != want || int'(result_degree) != wmax ||
        result_rejected != (want == 4) || busy) begin
      failures++;
      if (failures < 10)
        $display("pixel %p: class %0d deg %0d rej %0b, want %0d deg %0d",
                 px, result_class, result_degree, result_rejected, want, wmax);
    end
    n_win[want]++;
    if (tie) n_tie++;
  endtask

  task automatic pixel_near(int k);
    for (int j = 0; j < 8; j++)
      px[j] = tr[k][j].b + int'($urandom_range(0, 32'(tr[k][j].c - tr[k][j].b)));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (int_o || busy) begin failures++; $display("int or busy set after reset"); end

    program_all();

    // Synthetic image: row-major scan of IMG_N x IMG_N pixels
    for (int p = 0; p < IMG_N * IMG_N; p++) begin
      automatic int kind = p % 6;
      if (kind < 4) pixel_near(kind);
      else if (kind == 4) for (int j = 0; j < 8; j++) px[j] = int'($urandom_range(0, 255));
      else begin
        // mixture of two classes band by band: usually a low maximum
        automatic int k1 = int'($urandom_range(0, 3));
        automatic int k2 = (k1 + 1) % 4;
        for (int j = 0; j < 8; j++)
          px[j] = (j % 2 == 0) ? tr[k1][j].a : tr[k2][j].d;
      end
      classify(p % 17 == 0);
      if (p % 5 == 0) begin
        wr(int'(ADDR_INT_ACK), 0);
        checks++;
        if (int_o) begin failures++; $display("int not cleared by acknowledge"); end
        else n_ack++;
      end else begin
        // next start clears the interrupt without an acknowledge
        n_restart++;
      end
      if (p % 97 == 0) program_all();
    end

    // Directed tie: class 0 and class 2 share their trapezoids exactly
    for (int j = 0; j < 8; j++) begin
      tr[2][j] = tr[0][j];
      wr(64 + 4 * j + 0, tr[2][j].a); wr(64 + 4 * j + 1, tr[2][j].b);
      wr(64 + 4 * j + 2, tr[2][j].c); wr(64 + 4 * j + 3, tr[2][j].d);
    end
    pixel_near(0);
    classify(1'b0);
    checks++;
    if (result_class != CLS_1) begin failures++; $display("tie not resolved to the lower class"); end

    // Reprogram one corner of class 3 band 5 so that a pixel moves out of it
    pixel_near(3);
    classify(1'b0);
    tr[3][5] = '{0, 0, 0, 0};
    wr(96 + 20 + 0, 0); wr(96 + 20 + 1, 0); wr(96 + 20 + 2, 0); wr(96 + 20 + 3, 0);
    if (px[5] != 0) n_reprog++;
    classify(1'b0);
    checks++;
    if (result_class == CLS_4) begin failures++; $display("reprogrammed corner had no effect"); end

    // Every mechanism must have occurred
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_win[k] == 0) begin failures++; $display("class code %0d never produced", k); end
    end
    checks++; if (n_tie == 0)     begin failures++; $display("no tie"); end
    checks++; if (n_drop == 0)    begin failures++; $display("no busy write"); end
    checks++; if (n_ack == 0)     begin failures++; $display("no acknowledge"); end
    checks++; if (n_restart == 0) begin failures++; $display("no restart"); end
    checks++; if (n_reprog == 0)  begin failures++; $display("no reprogramming"); end
    $display("wins %0d %0d %0d %0d rejected %0d ties %0d busy-writes %0d acks %0d restarts %0d latency-ok %0d",
             n_win[0], n_win[1], n_win[2], n_win[3], n_win[4], n_tie, n_drop, n_ack, n_restart, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
