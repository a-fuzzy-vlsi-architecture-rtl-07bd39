// fuzzy_classifier: fuzzy rule-based classifier for eight-band pixels with
// four classes of interest and one rejection class.
//
// Each class k has one dfu: eight trapezoidal sub rules (one per band) whose
// degrees are combined by a minimum, giving g_k. The selector takes the
// maximum g over the four classes, decodes which class gave it and rejects the
// pixel when that maximum is below half scale.
//
// Host interface (a plain write port, as a bus bridge would present it):
//   we/addr/data_in  one byte per write, address map in fuzzy_pkg:
//                    0x00-0x7F corner registers {class, band, corner},
//                    0x80-0x87 pixel bytes, 0x88 interrupt acknowledge.
//   Pixel bytes are broadcast to all four DFUs. Writing the byte of the last
//   band (0x87) starts a classification.
//   busy             high while a classification runs; writes are ignored then.
//   result_*         class code (fuzzy_pkg::class_t), winning degree and the
//                    rejection flag of the last classification; they hold
//                    until the next one ends.
//   int_o            raised when a result is ready, held until a write to
//                    0x88 or the start of the next classification.
// Timing: the start write is taken at edge t; the degrees register at t+1,
// the discriminant values at t+2 and the result with int_o at t+3, so one
// pixel costs its eight byte writes plus three cycles.
// The unit structure (DFUs, Selector, Addr/Data_in configuration, result port
// and Int) follows the original architecture; the address map, the auto-start on the last
// pixel byte, busy and the interrupt acknowledge are this design's own.
module fuzzy_classifier
  import fuzzy_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [7:0]   addr,
  input  logic [W-1:0] data_in,
  output logic         busy,
  output class_t       result_class,
  output logic [W-1:0] result_degree,
  output logic         result_rejected,
  output logic         int_o
);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t                     state;
  logic [1:0]                 cnt;
  logic                       wr_ok, wr_prm, wr_pix, start, ack;
  logic [NCLASSES-1:0]        dfu_we;
  logic [4:0]                 dfu_addr;
  logic [NCLASSES-1:0][W-1:0] g;
  class_t                     sel_cls;
  logic [W-1:0]               sel_max;
  logic                       sel_rej;
  logic                       done;

  // Address decode
  always_comb begin
    wr_ok  = we && (state == S_IDLE);
    wr_prm = wr_ok && !addr[7];
    wr_pix = wr_ok && (addr[7:3] == ADDR_PIX_BASE[7:3]);
    start  = wr_pix && (addr[2:0] == 3'(NBANDS - 1));
    ack    = wr_ok && (addr == ADDR_INT_ACK);
    for (int k = 0; k < NCLASSES; k++)
      dfu_we[k] = wr_pix || (wr_prm && (addr[6:5] == 2'(k)));
    dfu_addr = wr_prm ? addr[4:0] : {2'b00, addr[2:0]};
  end

  for (genvar k = 0; k < NCLASSES; k++) begin : g_dfu
    dfu #(.W(W)) u_dfu (
      .clk, .rst_n,
      .wr_en    (dfu_we[k]),
      .wr_param (wr_prm),
      .wr_addr  (dfu_addr),
      .wr_data  (data_in),
      .g        (g[k])
    );
  end

  selector #(.W(W)) u_sel (.g(g), .cls(sel_cls), .maxv(sel_max), .rejected(sel_rej));

  // Controller: counts the pipeline stages after the start write
  assign done = (state == S_RUN) && (cnt == 2'(PIPE_STAGES));
  assign busy = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          cnt <= cnt + 2'd1;
          if (done) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_class    <= CLS_REJ;
      result_degree   <= '0;
      result_rejected <= 1'b0;
      int_o           <= 1'b0;
    end else begin
      if (done) begin
        result_class    <= sel_cls;
        result_degree   <= sel_max;
        result_rejected <= sel_rej;
        int_o           <= 1'b1;
      end else if (ack || start) begin
        int_o <= 1'b0;
      end
    end
  end

endmodule
