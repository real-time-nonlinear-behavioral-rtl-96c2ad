// IGBT transient ANN: Y = W2 * ReLU(W1 * X + b1) + b2.
//
// The network replaces the iterative Newton solution of the IGBT behavioural
// model during a switching transient: from the normalised start and end
// voltage and current and the gate signal it produces the 80 outputs of the
// trained model in one pass. The structure follows the reference design's
// three-kernel graph: a multiply-accumulate layer (32 x 8 weights, 32
// biases), a ReLU, and a second multiply-accumulate layer (80 x 32 weights,
// 80 biases), with a buffer between each. Here the layers are two col_mac
// units and the ReLU is relu_vec, whose output register is the buffer in
// front of the second layer. The sizes follow the reference design; fixed
// point and the load-port format are this design's choices.
//
// Interface: the four coefficient sets (ld_sel = LD_W1, LD_B1, LD_W2, LD_B2)
// are written one element per clock through the load port (ld_row, ld_col;
// ld_col is ignored for biases). With busy low, start takes x_in (8 values:
// the 5 normalised inputs and 3 zeros) and begins a pass.
//
// Timing: the hidden layer takes N_HID/LANES*N_IN_PAD MAC clocks (32), the
// ReLU one clock and the output layer N_OUT/LANES*N_HID MAC clocks (320).
// done rises 33 + 1 + 321 = 355 clock edges after the edge that samples
// start (each col_mac adds one clock for taking its start); y holds the outputs until the next pass completes.
module igbt_ann
  import igbt_ann_pkg::*;
#(
  parameter int unsigned NI = N_IN_PAD,
  parameter int unsigned NH = N_HID,
  parameter int unsigned NO = N_OUT,
  parameter int unsigned L  = LANES,
  parameter int unsigned W  = DATA_W,
  parameter int unsigned F  = FRAC
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // coefficient load port
  input  logic                   ld_we,
  input  ld_sel_e                ld_sel,
  input  logic [$clog2(NO)-1:0]  ld_row,
  input  logic [$clog2(NH)-1:0]  ld_col,
  input  logic signed [W-1:0]    ld_data,
  // inference
  input  logic                   start,
  input  logic signed [W-1:0]    x_in [NI],
  output logic                   busy,
  output logic                   done,
  output logic signed [W-1:0]    y    [NO]
);

  logic                mac1_done, relu_valid;
  logic signed [W-1:0] h_pre [NH];
  logic signed [W-1:0] h_act [NH];

  col_mac #(.ROWS(NH), .COLS(NI), .LANES(L), .W(W), .F(F)) u_mac1 (
    .clk, .rst_n,
    .w_we  (ld_we && ld_sel == LD_W1),
    .w_row (ld_row[$clog2(NH)-1:0]),
    .w_col (ld_col[$clog2(NI)-1:0]),
    .w_data(ld_data),
    .b_we  (ld_we && ld_sel == LD_B1),
    .b_row (ld_row[$clog2(NH)-1:0]),
    .b_data(ld_data),
    .start (start && !busy),
    .x_in  (x_in),
    .busy  (),
    .done  (mac1_done),
    .y     (h_pre)
  );

  relu_vec #(.N(NH), .W(W)) u_relu (
    .clk, .rst_n,
    .in_valid (mac1_done),
    .in_vec   (h_pre),
    .out_valid(relu_valid),
    .out_vec  (h_act)
  );

  col_mac #(.ROWS(NO), .COLS(NH), .LANES(L), .W(W), .F(F)) u_mac2 (
    .clk, .rst_n,
    .w_we  (ld_we && ld_sel == LD_W2),
    .w_row (ld_row),
    .w_col (ld_col),
    .w_data(ld_data),
    .b_we  (ld_we && ld_sel == LD_B2),
    .b_row (ld_row),
    .b_data(ld_data),
    .start (relu_valid),
    .x_in  (h_act),
    .busy  (),
    .done  (done),
    .y     (y)
  );

  // a pass is in flight from start until the output layer is done
  logic pending;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 pending <= 1'b0;
    else if (start && !busy)    pending <= 1'b1;
    else if (done)              pending <= 1'b0;
  end
  assign busy = pending;

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !ld_we)
    else $error("igbt_ann: coefficient write during a pass");

  initial assert (NO >= NH) else $error("igbt_ann: the load-port row width assumes NO >= NH");

endmodule
