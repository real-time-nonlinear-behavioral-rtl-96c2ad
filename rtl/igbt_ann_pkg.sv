// Shared sizes, number format and types of the IGBT ANN datapath.
//
// The network maps 5 device quantities (start/end voltage, start/end current,
// gate signal) to 80 outputs through one hidden layer of 32 ReLU neurons. The
// 5 inputs are padded to 8 so the hidden-layer weight matrix is 32 x 8; the
// vector datapath works on 8 lanes at a time. These sizes follow the
// reference design. Numbers are signed two's-complement fixed point with
// FRAC fractional bits in a DATA_W-bit word; the reference design used single
// precision floating point, the fixed-point format is this design's choice.
package igbt_ann_pkg;

  localparam int unsigned N_IN     = 5;   // raw ANN inputs
  localparam int unsigned N_IN_PAD = 8;   // inputs after zero padding
  localparam int unsigned N_HID    = 32;  // hidden-layer neurons
  localparam int unsigned N_OUT    = 80;  // output-layer neurons
  localparam int unsigned LANES    = 8;   // vector lanes of the MAC datapath

  localparam int unsigned DATA_W   = 32;  // word width
  localparam int unsigned FRAC     = 16;  // fractional bits

  // Which coefficient memory a load-port write goes to (the four parameter
  // inputs of the ANN graph: hidden weights/bias, output weights/bias).
  typedef enum logic [1:0] {
    LD_W1 = 2'd0,
    LD_B1 = 2'd1,
    LD_W2 = 2'd2,
    LD_B2 = 2'd3
  } ld_sel_e;

endpackage
