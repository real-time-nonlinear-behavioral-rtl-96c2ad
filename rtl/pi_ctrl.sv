// Discrete PI controller with a clamped integrator, one update per time step.
//
// y = kp * e + s,  s <= clamp(s + ki_dt * e, -lim, lim),  y clamped to +-lim.
//
// The converter control uses three of these: the DC-voltage loop and the d
// and q current loops. The PI function follows the reference design; the
// forward-Euler integrator (ki_dt is the integral gain times the time step)
// and the clamp of both integrator and output to +-lim (anti-windup) are
// this design's choices.
//
// Interface and timing: on a clock with en high the error e is taken and y
// is updated on that edge, so y is valid one clock after en; between updates
// y holds. The integrator state uses the new sample (s + ki_dt*e) in y.
// Signed W-bit fixed point with F fractional bits; products rounded to
// nearest. Reset clears the integrator and y.
module pi_ctrl #(
  parameter int unsigned W = 32,
  parameter int unsigned F = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] e,
  input  logic signed [W-1:0] kp,
  input  logic signed [W-1:0] ki_dt,
  input  logic signed [W-1:0] lim,
  output logic signed [W-1:0] y
);

  localparam int unsigned XW = 2 * W + 2;

  logic signed [W-1:0] integ;

  function automatic logic signed [XW-1:0] mulq(input logic signed [W-1:0] a,
                                                input logic signed [W-1:0] b);
    logic signed [XW-1:0] p;
    p = XW'(a) * XW'(b);
    return (p + (XW'(1) <<< (F - 1))) >>> F;
  endfunction

  function automatic logic signed [W-1:0] clamp(input logic signed [XW-1:0] v,
                                                input logic signed [W-1:0] l);
    if (v > XW'(l))       return l;
    else if (v < -XW'(l)) return -l;
    else                  return v[W-1:0];
  endfunction

  logic signed [W-1:0] integ_next;
  always_comb integ_next = clamp(XW'(integ) + mulq(ki_dt, e), lim);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      y     <= '0;
    end else if (en) begin
      integ <= integ_next;
      y     <= clamp(mulq(kp, e) + XW'(integ_next), lim);
    end
  end

endmodule
