// Self-checking testbench of vsc_control. Each time step applies a balanced
// three-phase current and voltage set built from chosen d/q values at a
// random grid angle, plus a DC voltage and references. Checked against a
// double-precision model of the same control law:
//  - i_dq equals the d/q values the phase set was built from,
//  - v_dq_ref = PI_d(i_d_ref - i_d) + v_d - wL i_q and
//    v_q_ref = PI_q(i_q_ref - i_q) + v_q + wL i_d, with the PI states of the
//    model (DC-voltage PI giving i_d_ref),
//  - v_abc_ref is the inverse transform of v_dq_ref,
//  - the result appears 6 clocks after the step pulse.
// Tolerances cover the 16-bit fractional rounding of the samples, of
// sin/cos and of the transform constants (0.05 A, 0.1 V, 0.02 V).
// A run with the DC voltage far from its reference drives the PIs into
// their limits; the gates must both switch during the run.
module tb_vsc_control;
  localparam int W = 32, F = 16;
  localparam real S = 65536.0;
  localparam real PI2 = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic signed [W-1:0] kp_v, ki_v_dt, lim_v, kp_i, ki_i_dt, lim_i, w_l;
  logic step, ref_valid;
  logic signed [W-1:0] v_dc, v_dc_ref, i_q_ref, sin_t, cos_t;
  logic signed [W-1:0] i_abc [3], v_abc [3], i_dq [2], v_dq_ref [2], v_abc_ref [3];
  logic [2:0] gate_hi, gate_lo;

  vsc_control #(.W(W), .F(F), .HALF_PERIOD(16)) dut (
    .clk, .rst_n, .kp_v, .ki_v_dt, .lim_v, .kp_i, .ki_i_dt, .lim_i, .w_l,
    .step, .v_dc, .v_dc_ref, .i_q_ref, .i_abc, .v_abc, .sin_t, .cos_t,
    .ref_valid, .i_dq, .v_dq_ref, .v_abc_ref, .gate_hi, .gate_lo);

  real sv, sd, sq;   // PI integrator models
  int hi_seen [3], lo_seen [3];

  function automatic logic signed [W-1:0] q(input real x);
    return W'(longint'(x * S));
  endfunction
  function automatic real r(input logic signed [W-1:0] x);
    return real'(x) / S;
  endfunction
  function automatic real clampr(input real v, input real l);
    return (v > l) ? l : (v < -l) ? -l : v;
  endfunction

  task automatic near(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic do_step(input real th, input real idv, input real iqv, input real vdv, input real vqv,
                         input real vdc, input real vdcref, input real iqref);
    real ph [3]; real idref, e, yd, yq, vdr, vqr, al, be;
    int lat;
    ph[0] = th; ph[1] = th - PI2 / 3.0; ph[2] = th + PI2 / 3.0;
    for (int x = 0; x < 3; x++) begin
      i_abc[x] = q(idv * $cos(ph[x]) - iqv * $sin(ph[x]));
      v_abc[x] = q(vdv * $cos(ph[x]) - vqv * $sin(ph[x]));
    end
    sin_t = q($sin(th)); cos_t = q($cos(th));
    v_dc = q(vdc); v_dc_ref = q(vdcref); i_q_ref = q(iqref);
    @(negedge clk); step = 1;
    @(negedge clk); step = 0;
    lat = 1;
    while (!ref_valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 6) begin failures++; $display("FAIL latency %0d", lat); end
    // model
    e = vdcref - vdc;
    sv = clampr(sv + r(ki_v_dt) * e, r(lim_v));
    idref = clampr(r(kp_v) * e + sv, r(lim_v));
    e = idref - idv;
    sd = clampr(sd + r(ki_i_dt) * e, r(lim_i));
    yd = clampr(r(kp_i) * e + sd, r(lim_i));
    e = iqref - iqv;
    sq = clampr(sq + r(ki_i_dt) * e, r(lim_i));
    yq = clampr(r(kp_i) * e + sq, r(lim_i));
    vdr = yd + vdv - r(w_l) * iqv;
    vqr = yq + vqv + r(w_l) * idv;
    near("i_d", r(i_dq[0]), idv, 0.05);
    near("i_q", r(i_dq[1]), iqv, 0.05);
    near("v_d_ref", r(v_dq_ref[0]), vdr, 0.1);
    near("v_q_ref", r(v_dq_ref[1]), vqr, 0.1);
    al = r(v_dq_ref[0]) * $cos(th) - r(v_dq_ref[1]) * $sin(th);
    be = r(v_dq_ref[0]) * $sin(th) + r(v_dq_ref[1]) * $cos(th);
    near("v_a_ref", r(v_abc_ref[0]), al, 0.02);
    near("v_b_ref", r(v_abc_ref[1]), -0.5 * al + 0.8660254 * be, 0.02);
    near("v_c_ref", r(v_abc_ref[2]), -0.5 * al - 0.8660254 * be, 0.02);
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      for (int x = 0; x < 3; x++) begin hi_seen[x] += gate_hi[x]; lo_seen[x] += gate_lo[x]; end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = 0;
    for (int x = 0; x < 3; x++) begin i_abc[x] = '0; v_abc[x] = '0; end
    {v_dc, v_dc_ref, i_q_ref, sin_t, cos_t} = '0;
    kp_v = q(0.5); ki_v_dt = q(0.01); lim_v = q(1500.0);
    kp_i = q(0.3); ki_i_dt = q(0.02); lim_i = q(300.0);
    w_l = q(0.1131);        // 60 Hz, 0.3 mH
    hi_seen = '{0, 0, 0}; lo_seen = '{0, 0, 0};
    sv = 0; sd = 0; sq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // normal operation near the reference
    for (int n = 0; n < 150; n++)
      do_step(PI2 * real'($urandom_range(9999)) / 10000.0,
              500.0 + real'($urandom_range(200)), real'($urandom_range(100)) - 50.0,
              400.0, 0.0, 1000.0 + real'($urandom_range(40)) - 20.0, 1000.0, 0.0);
    // large DC error: loops run into their limits
    for (int n = 0; n < 60; n++)
      do_step(PI2 * real'(n) / 60.0, 100.0, 20.0, 400.0, 5.0, 700.0, 1000.0, 50.0);
    for (int x = 0; x < 3; x++) begin
      checks++;
      if (hi_seen[x] == 0 || lo_seen[x] == 0) begin failures++; $display("FAIL gate %0d never switched", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
