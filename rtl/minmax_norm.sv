// Min-max normalisation of the ANN inputs, with zero padding.
//
// The IGBT ANN takes five device quantities: the voltage and current at the
// start and at the end of a switching transient, and the gate signal. Each is
// mapped to (-1, 1) by x_n = (x - x_min) * 2 / (x_max - x_min) - 1 and the
// five results are padded with zeros to the N_OUT = 8 inputs of the hidden
// layer. Min-max scaling to (-1, 1) and padding 5 inputs to 8 follow the
// reference design. So that no divider is needed, each channel stores x_min
// and the ready-made factor scale = 2 / (x_max - x_min), written once through
// the configuration port; this split is this design's choice.
//
// Interface and timing: cfg_we writes channel cfg_idx. With in_valid high the
// five raw values are taken; x_norm and out_valid follow one clock later.
// Fixed point: signed W bits with F fractional bits everywhere; the product is
// rounded to nearest and saturated to W bits. The padding outputs
// x_norm[N_IN..N_OUT-1] are constant 0 by design.
module minmax_norm #(
  parameter int unsigned N_IN  = 5,
  parameter int unsigned N_OUT = 8,
  parameter int unsigned W     = 32,
  parameter int unsigned F     = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [$clog2(N_IN)-1:0]   cfg_idx,
  input  logic signed [W-1:0]       cfg_min,
  input  logic signed [W-1:0]       cfg_scale,
  input  logic                      in_valid,
  input  logic signed [W-1:0]       x_raw  [N_IN],
  output logic                      out_valid,
  output logic signed [W-1:0]       x_norm [N_OUT]
);

  localparam int unsigned PW = 2 * W + 2;
  localparam logic signed [PW-1:0] WMAX = PW'({1'b0, {(W-1){1'b1}}});
  localparam logic signed [PW-1:0] WMIN = -WMAX - 1;
  localparam logic signed [PW-1:0] ONE  = PW'(1) <<< F;

  logic signed [W-1:0] xmin  [N_IN];
  logic signed [W-1:0] scale [N_IN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) begin
        xmin[i]  <= '0;
        scale[i] <= '0;
      end
    end else if (cfg_we) begin
      xmin[cfg_idx]  <= cfg_min;
      scale[cfg_idx] <= cfg_scale;
    end
  end

  function automatic logic signed [W-1:0] norm1(input logic signed [W-1:0] x,
                                                input logic signed [W-1:0] mn,
                                                input logic signed [W-1:0] sc);
    logic signed [PW-1:0] d, p, r;
    d = PW'(x) - PW'(mn);
    p = d * PW'(sc);
    r = ((p + (PW'(1) <<< (F - 1))) >>> F) - ONE;
    if (r > WMAX)      return {1'b0, {(W-1){1'b1}}};
    else if (r < WMIN) return {1'b1, {(W-1){1'b0}}};
    else               return r[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N_OUT; i++) x_norm[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < N_OUT; i++)
          x_norm[i] <= (i < N_IN) ? norm1(x_raw[i], xmin[i], scale[i]) : '0;
    end
  end

  initial assert (N_OUT >= N_IN) else $error("minmax_norm: N_OUT must be >= N_IN");

endmodule
