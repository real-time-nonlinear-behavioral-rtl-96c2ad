// Three-phase carrier-based PWM for a 2-level voltage-source converter.
//
// A symmetric triangular carrier c runs from -1 to +1 and back with a period
// of 2 * HALF_PERIOD clocks. Phase x's upper switch is on while its voltage
// reference is at least c * v_dc / 2; the lower switch is the complement.
// Comparing the reference with the carrier scaled by half the DC voltage,
// instead of dividing the reference by it, avoids a divider. The PWM block
// comes from the reference design's control diagram; the carrier shape, its
// period and the absence of dead time are this design's choices, as the
// carrier frequency is not given there.
//
// Interface and timing: v_ref and v_dc are sampled on every clock; gate_hi
// and gate_lo change on the clock edge after a comparison changes. carrier
// is brought out for observation. Signed W-bit fixed point with F fractional
// bits; v_ref and v_dc in volts.
module pwm_3ph #(
  parameter int unsigned W           = 32,
  parameter int unsigned F           = 16,
  parameter int unsigned HALF_PERIOD = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] v_ref [3],
  input  logic signed [W-1:0] v_dc,
  output logic [2:0]          gate_hi,
  output logic [2:0]          gate_lo,
  output logic signed [W-1:0] carrier
);

  localparam int unsigned XW = 2 * W + 2;
  // carrier increment per clock: 2 / HALF_PERIOD in Q(F)
  localparam logic signed [W-1:0] INC = W'((64'd2 << F) / HALF_PERIOD);
  localparam logic signed [W-1:0] ONE = W'(64'd1 << F);

  logic [$clog2(HALF_PERIOD+1)-1:0] cnt;
  logic                             up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      up  <= 1'b1;
    end else if (up) begin
      if (cnt == ($clog2(HALF_PERIOD+1))'(HALF_PERIOD - 1)) up <= 1'b0;
      cnt <= cnt + 1'b1;
    end else begin
      if (cnt == ($clog2(HALF_PERIOD+1))'(1)) up <= 1'b1;
      cnt <= cnt - 1'b1;
    end
  end

  // c = -1 + cnt * 2 / HALF_PERIOD
  assign carrier = -ONE + W'(cnt) * INC;

  logic signed [XW-1:0] thr;
  always_comb thr = (XW'(carrier) * XW'(v_dc)) >>> (F + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_hi <= '0;
      gate_lo <= '0;
    end else begin
      for (int x = 0; x < 3; x++) begin
        gate_hi[x] <= XW'(v_ref[x]) >= thr;
        gate_lo[x] <= !(XW'(v_ref[x]) >= thr);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (gate_hi & gate_lo) == 3'b000)
    else $error("pwm_3ph: both switches of a leg on");

endmodule
