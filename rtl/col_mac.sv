// Column-wise vector multiply-accumulate: Y = W * X + b.
//
// This is the layer kernel of the IGBT ANN (the hidden layer is 32 x 8, the
// output layer 80 x 32). The ROWS outputs are computed LANES at a time. For
// one block of LANES rows the lane accumulators start from the bias vector
// and, one column per clock, add column k of W (LANES weights) times the
// broadcast scalar X[k]; after the last column the block is rounded back to
// DATA_W bits and written to Y. Preloading the bias and iterating a single
// multiply-accumulate over the columns follows the reference design; the
// fixed-point arithmetic, the banking and the handshake are this design's.
//
// Storage: W sits in LANES banks, bank l holding the rows r with r % LANES == l
// at address (r / LANES) * COLS + col, so one address reads a whole column
// slice of a row block. b is banked the same way. Both are written one element
// at a time through the load ports and keep their contents between runs.
//
// Interface and timing: with busy low, a start pulse captures x_in and begins
// a run. The run takes (ROWS / LANES) * COLS MAC clocks; done rises
// (ROWS / LANES) * COLS + 1 clock edges after the edge that samples start, and y then holds the result until the next
// run finishes. Writes to W or b during a run are not allowed.
//
// Arithmetic: products are exact (2*DATA_W bits, 2*FRAC fractional bits) and
// are summed exactly; the bias is aligned to 2*FRAC fractional bits. The sum is
// rounded to nearest (ties up) to FRAC fractional bits and saturated to DATA_W.
module col_mac #(
  parameter int unsigned ROWS  = 32,
  parameter int unsigned COLS  = 8,
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 32,
  parameter int unsigned F     = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // weight load port: element (w_row, w_col)
  input  logic                         w_we,
  input  logic [$clog2(ROWS)-1:0]      w_row,
  input  logic [$clog2(COLS)-1:0]      w_col,
  input  logic signed [W-1:0]          w_data,
  // bias load port
  input  logic                         b_we,
  input  logic [$clog2(ROWS)-1:0]      b_row,
  input  logic signed [W-1:0]          b_data,
  // run control
  input  logic                         start,
  input  logic signed [W-1:0]          x_in [COLS],
  output logic                         busy,
  output logic                         done,
  output logic signed [W-1:0]          y    [ROWS]
);

  localparam int unsigned RB    = ROWS / LANES;        // row blocks
  localparam int unsigned DEPTH = RB * COLS;           // words per weight bank
  localparam int unsigned ACC_W = 2 * W + $clog2(COLS) + 2;
  localparam int unsigned RBW   = (RB > 1) ? $clog2(RB) : 1;
  localparam int unsigned CW    = (COLS > 1) ? $clog2(COLS) : 1;

  logic signed [W-1:0]     wmem [LANES][DEPTH];
  logic signed [W-1:0]     bmem [LANES][RB];
  logic signed [W-1:0]     xbuf [COLS];
  logic signed [ACC_W-1:0] acc  [LANES];

  logic [RBW-1:0] rb;
  logic [CW-1:0]  col;

  // coefficient writes
  always_ff @(posedge clk) begin
    if (w_we)
      wmem[int'(w_row) % LANES][(int'(w_row) / LANES) * COLS + int'(w_col)] <= w_data;
    if (b_we)
      bmem[int'(b_row) % LANES][int'(b_row) / LANES] <= b_data;
  end

  // one column step of all lanes
  logic signed [ACC_W-1:0] sum [LANES];
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [ACC_W-1:0] base;
      logic signed [2*W-1:0]   prod;
      prod = wmem[l][int'(rb) * COLS + int'(col)] * xbuf[col];
      if (col == '0)
        base = ACC_W'(bmem[l][rb]) <<< F;
      else
        base = acc[l];
      sum[l] = base + ACC_W'(prod);
    end
  end

  // round to F fractional bits and saturate to W bits
  localparam logic signed [ACC_W-1:0] WMAX = ACC_W'({1'b0, {(W-1){1'b1}}});
  localparam logic signed [ACC_W-1:0] WMIN = -WMAX - 1;

  function automatic logic signed [W-1:0] to_word(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] r;
    r = (a + (ACC_W'(1) <<< (F - 1))) >>> F;
    if (r > WMAX)
      return {1'b0, {(W-1){1'b1}}};
    else if (r < WMIN)
      return {1'b1, {(W-1){1'b0}}};
    else
      return r[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rb   <= '0;
      col  <= '0;
      for (int l = 0; l < LANES; l++) acc[l] <= '0;
      for (int c = 0; c < COLS; c++)  xbuf[c] <= '0;
      for (int r = 0; r < ROWS; r++)  y[r] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          xbuf <= x_in;
          rb   <= '0;
          col  <= '0;
          busy <= 1'b1;
        end
      end else begin
        for (int l = 0; l < LANES; l++) acc[l] <= sum[l];
        if (col == CW'(COLS - 1)) begin
          for (int l = 0; l < LANES; l++) y[rb * LANES + l] <= to_word(sum[l]);
          col <= '0;
          if (rb == RBW'(RB - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            rb <= rb + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  // the lanes must tile the rows exactly
  initial assert (ROWS % LANES == 0)
    else $error("col_mac: ROWS (%0d) must be a multiple of LANES (%0d)", ROWS, LANES);

  // no coefficient writes while a run reads them
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(w_we || b_we))
    else $error("col_mac: coefficient write during a run");

endmodule
