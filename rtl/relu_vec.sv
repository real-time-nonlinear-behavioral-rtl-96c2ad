// Element-wise rectified linear unit over a vector: out[i] = max(in[i], 0).
//
// It is the activation between the hidden and the output layer of the IGBT
// ANN (32 elements). ReLU as the activation follows the reference design; the
// registered single-cycle form is this design's choice. The result register
// also serves as the buffer between the two layers.
//
// Interface and timing: when in_valid is high, all N elements are taken in
// one clock; out and out_valid appear on the next clock edge. out holds its
// value until the next in_valid. Numbers are signed W-bit fixed point (the
// binary point does not matter for max(x, 0)). The sign bit of every output
// is constant 0, since no result is negative.
module relu_vec #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_vec  [N],
  output logic                out_valid,
  output logic signed [W-1:0] out_vec [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) out_vec[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < N; i++)
          out_vec[i] <= in_vec[i][W-1] ? '0 : in_vec[i];
    end
  end

endmodule
