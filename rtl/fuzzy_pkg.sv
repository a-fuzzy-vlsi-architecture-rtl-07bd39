// fuzzy_pkg: constants and types shared by the fuzzy pixel classifier.
//
// The classifier works on 8-bit data throughout: band values, trapezoid
// parameters and membership degrees are bytes, and a membership degree of 1.0
// is represented by 255. The design classifies eight-band pixels among four
// classes of interest plus one rejection class; these sizes are the defaults of
// the module parameters. The host address map (8-bit Addr) is this design's own
// choice:
//   0x00-0x7F  trapezoid parameter: Addr[6:5] class, Addr[4:2] band,
//              Addr[1:0] which corner (0=a, 1=b, 2=c, 3=d)
//   0x80-0x87  pixel byte of band Addr[2:0]; writing band 7 starts a
//              classification
//   0x88       any write clears the interrupt
package fuzzy_pkg;

  localparam int DATA_W   = 8;   // data width of bands, parameters, degrees
  localparam int NBANDS   = 8;   // spectral bands per pixel
  localparam int NCLASSES = 4;   // classes of interest (the rejection class is extra)
  localparam int NPARAMS  = 4;   // trapezoid corners a, b, c, d

  // Corner selector inside a band's parameter group
  typedef enum logic [1:0] {
    P_A = 2'd0,
    P_B = 2'd1,
    P_C = 2'd2,
    P_D = 2'd3
  } corner_t;

  // Final class code: 0..3 are the classes of interest, 4 the rejection class
  typedef enum logic [2:0] {
    CLS_1   = 3'd0,
    CLS_2   = 3'd1,
    CLS_3   = 3'd2,
    CLS_4   = 3'd3,
    CLS_REJ = 3'd4
  } class_t;

  // Host address map
  localparam logic [7:0] ADDR_PIX_BASE = 8'h80;
  localparam logic [7:0] ADDR_INT_ACK  = 8'h88;

  // Pipeline stages between the start write and the captured result:
  // membership registers (MBFU) and discriminant registers (DFU).
  localparam int PIPE_STAGES = 2;

endpackage
