// dq-frame control of the grid-side 2-level voltage-source converter.
//
// The outer loop holds the DC-link voltage: a PI controller on
// (v_dc_ref - v_dc) gives the d-axis current reference. Two inner PI loops
// drive i_d and i_q to their references, and the converter voltage
// references add the measured grid voltage and the cross-coupling terms:
//
//   v_d_ref = PI_d(i_d_ref - i_d) + v_d - wL * i_q
//   v_q_ref = PI_q(i_q_ref - i_q) + v_q + wL * i_d
//
// They are turned back into phase voltages and fed to a carrier PWM. This
// loop structure and the signs at its summing points follow the reference
// design's control diagram. The transforms are amplitude-invariant
// (alpha = (2a - b - c) / 3, beta = (b - c) / sqrt(3), d = alpha cos + beta
// sin, q = -alpha sin + beta cos), which is this design's choice. The grid
// angle enters as sin_t / cos_t, because the angle source (a PLL) is not
// part of the reference design's description.
//
// Interface and timing: gains, limits and wL are static inputs. A step pulse
// takes all measurements; the pipeline (abc->alpha/beta, ->dq, current PIs,
// voltage sums, dq->alpha/beta, ->abc) completes and v_abc_ref with
// ref_valid appear 6 clock edges later, so steps must be at least 6 clocks
// apart. gate_hi / gate_lo come from the PWM, which runs continuously on the
// latest references. Signed W-bit fixed point with F fractional bits (volts,
// amperes, ohms).
module vsc_control #(
  parameter int unsigned W           = 32,
  parameter int unsigned F           = 16,
  parameter int unsigned HALF_PERIOD = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  // controller settings
  input  logic signed [W-1:0] kp_v,
  input  logic signed [W-1:0] ki_v_dt,
  input  logic signed [W-1:0] lim_v,
  input  logic signed [W-1:0] kp_i,
  input  logic signed [W-1:0] ki_i_dt,
  input  logic signed [W-1:0] lim_i,
  input  logic signed [W-1:0] w_l,
  // measurements and references of one time step
  input  logic                step,
  input  logic signed [W-1:0] v_dc,
  input  logic signed [W-1:0] v_dc_ref,
  input  logic signed [W-1:0] i_q_ref,
  input  logic signed [W-1:0] i_abc [3],
  input  logic signed [W-1:0] v_abc [3],
  input  logic signed [W-1:0] sin_t,
  input  logic signed [W-1:0] cos_t,
  // results
  output logic                ref_valid,
  output logic signed [W-1:0] i_dq  [2],
  output logic signed [W-1:0] v_dq_ref [2],
  output logic signed [W-1:0] v_abc_ref [3],
  output logic [2:0]          gate_hi,
  output logic [2:0]          gate_lo
);

  localparam int unsigned XW = 2 * W + 2;
  localparam logic signed [W-1:0] THIRD    = W'(((64'd1 << (F + 20)) / 3 + (64'd1 << 19)) >> 20);
  localparam logic signed [W-1:0] INV_SQ3  = W'(((64'd1 << (F + 20)) * 1000000 / 1732051 + (64'd1 << 19)) >> 20);
  localparam logic signed [W-1:0] HALF_SQ3 = W'(((64'd1 << (F + 20)) * 866025 / 1000000 + (64'd1 << 19)) >> 20);

  function automatic logic signed [W-1:0] mq(input logic signed [W-1:0] a,
                                             input logic signed [W-1:0] b);
    logic signed [XW-1:0] p;
    p = XW'(a) * XW'(b);
    return W'((p + (XW'(1) <<< (F - 1))) >>> F);
  endfunction

  logic [5:1] s;     // pipeline valid bits
  logic signed [W-1:0] ia, ib, va, vb;          // alpha/beta
  logic signed [W-1:0] sn, cs;                  // angle, held through the pipeline
  logic signed [W-1:0] id, iq, vd, vq;          // dq
  logic signed [W-1:0] iq_ref_r;
  logic signed [W-1:0] wl_id, wl_iq;
  logic signed [W-1:0] vd_r, vq_r;
  logic signed [W-1:0] al, be;
  logic signed [W-1:0] id_ref, pi_d, pi_q;

  pi_ctrl #(.W(W), .F(F)) u_pi_v (
    .clk, .rst_n, .en(step), .e(v_dc_ref - v_dc),
    .kp(kp_v), .ki_dt(ki_v_dt), .lim(lim_v), .y(id_ref));

  pi_ctrl #(.W(W), .F(F)) u_pi_d (
    .clk, .rst_n, .en(s[2]), .e(id_ref - id),
    .kp(kp_i), .ki_dt(ki_i_dt), .lim(lim_i), .y(pi_d));

  pi_ctrl #(.W(W), .F(F)) u_pi_q (
    .clk, .rst_n, .en(s[2]), .e(iq_ref_r - iq),
    .kp(kp_i), .ki_dt(ki_i_dt), .lim(lim_i), .y(pi_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0;
      {ia, ib, va, vb, sn, cs, id, iq, vd, vq, iq_ref_r} <= '0;
      {wl_id, wl_iq, vd_r, vq_r, al, be} <= '0;
      ref_valid <= 1'b0;
      for (int x = 0; x < 3; x++) v_abc_ref[x] <= '0;
      for (int x = 0; x < 2; x++) begin
        i_dq[x] <= '0;
        v_dq_ref[x] <= '0;
      end
    end else begin
      s <= {s[4:1], step};
      ref_valid <= s[5];
      // 1: Clarke transform; DC-voltage PI runs in parallel
      if (step) begin
        ia <= mq(2 * i_abc[0] - i_abc[1] - i_abc[2], THIRD);
        ib <= mq(i_abc[1] - i_abc[2], INV_SQ3);
        va <= mq(2 * v_abc[0] - v_abc[1] - v_abc[2], THIRD);
        vb <= mq(v_abc[1] - v_abc[2], INV_SQ3);
        sn <= sin_t;
        cs <= cos_t;
        iq_ref_r <= i_q_ref;
      end
      // 2: Park transform
      if (s[1]) begin
        id <= mq(ia, cs) + mq(ib, sn);
        iq <= mq(ib, cs) - mq(ia, sn);
        vd <= mq(va, cs) + mq(vb, sn);
        vq <= mq(vb, cs) - mq(va, sn);
      end
      // 3: current PIs run; decoupling terms
      if (s[2]) begin
        wl_iq <= mq(w_l, iq);
        wl_id <= mq(w_l, id);
        i_dq[0] <= id;
        i_dq[1] <= iq;
      end
      // 4: converter voltage references in dq
      if (s[3]) begin
        vd_r <= pi_d + vd - wl_iq;
        vq_r <= pi_q + vq + wl_id;
      end
      // 5: inverse Park
      if (s[4]) begin
        al <= mq(vd_r, cs) - mq(vq_r, sn);
        be <= mq(vd_r, sn) + mq(vq_r, cs);
        v_dq_ref[0] <= vd_r;
        v_dq_ref[1] <= vq_r;
      end
      // 6: inverse Clarke
      if (s[5]) begin
        v_abc_ref[0] <= al;
        v_abc_ref[1] <= mq(be, HALF_SQ3) - (al >>> 1);
        v_abc_ref[2] <= -mq(be, HALF_SQ3) - (al >>> 1);
      end
    end
  end

  pwm_3ph #(.W(W), .F(F), .HALF_PERIOD(HALF_PERIOD)) u_pwm (
    .clk, .rst_n, .v_ref(v_abc_ref), .v_dc(v_dc), .gate_hi, .gate_lo, .carrier());

  assert property (@(posedge clk) disable iff (!rst_n) (|s) |-> !step)
    else $error("vsc_control: steps less than 6 clocks apart");

endmodule
