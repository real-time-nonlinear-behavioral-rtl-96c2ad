// Self-checking testbench of foster_thermal with the two cooling systems of
// the 1600 V / 300 A IGBT module (four R-C stages each).
//  1. Constant power, dt = 5 us, 4000 steps: T_j is compared each step with
//     a double-precision model of the same trapezoidal network (0.001 K) and,
//     at the end, with the closed-form step response
//     T_e + P * sum R_i (1 - exp(-t / tau_i)) (0.01 K).
//  2. dt = 1 ms for 3 s (1 s for cooling system 1 is well past 10 tau):
//     T_j must settle at T_e + P * sum R_i.
//  3. A switching power pattern (v_ce * i_c changing every step) against
//     the double-precision model.
// Also checked: the latency of 3 clocks from step to t_j_valid, and p_loss.
module tb_foster_thermal;
  localparam int N = 4, W = 64, F = 32;
  localparam real SCALE = 4294967296.0;
  localparam real KSCALE = 4611686018427387904.0;  // 2^62
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, step, t_j_valid;
  logic [$clog2(N)-1:0] cfg_idx;
  logic signed [W-1:0] cfg_k, cfg_g2, t_e, v_ce, i_c, t_j, p_loss;

  foster_thermal #(.N_STAGE(N), .W(W), .F(F)) dut (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_k, .cfg_g2, .t_e, .step, .v_ce, .i_c,
    .t_j_valid, .t_j, .p_loss);

  // cooling systems: R in K/W, tau in s
  real r1 [N] = '{2.1e-3, 9.2e-3, 42.6e-3, 6.3e-3};
  real tau1 [N] = '{0.0008, 0.013, 0.05, 0.063};
  real r2 [N] = '{1.33e-3, 7.05e-3, 5.23e-3, 2.8e-3};
  real tau2 [N] = '{0.00147, 0.034, 0.168, 1.11};

  real rr [N], tt [N], kk [N], gg [N], ih [N];

  function automatic longint q(input real x);
    return longint'(x * SCALE);
  endfunction
  function automatic real rq(input logic signed [W-1:0] x);
    return real'(x) / SCALE;
  endfunction

  task automatic check_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  task automatic setup(input real r [N], input real tau [N], input real dt);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      real c;
      rr[i] = r[i]; tt[i] = tau[i];
      c = tau[i] / r[i];
      gg[i] = 2.0 * c / dt;
      kk[i] = 1.0 / (gg[i] + 1.0 / r[i]);
      ih[i] = 0.0;
      @(negedge clk);
      cfg_we = 1; cfg_idx = i[$clog2(N)-1:0];
      cfg_k = longint'(kk[i] * KSCALE); cfg_g2 = q(2.0 * gg[i]);
      // the model uses the coefficients as the hardware holds them
      kk[i] = real'(cfg_k) / KSCALE;
      gg[i] = rq(cfg_g2) / 2.0;
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  // one step of the hardware and of the double-precision model; returns the model's T_j
  task automatic do_step(input real v, input real i, input real te, output real tj_model);
    real p; int lat;
    v_ce = q(v); i_c = q(i); t_e = q(te);
    p = rq(v_ce) * rq(i_c);
    tj_model = te;
    for (int s = 0; s < N; s++) begin
      real u = kk[s] * (p + ih[s]);
      tj_model += u;
      ih[s] = 2.0 * gg[s] * u - ih[s];
    end
    @(negedge clk); step = 1;
    @(negedge clk); step = 0;
    lat = 1;
    while (!t_j_valid) begin @(negedge clk); lat++; end
    if (lat != 3) begin checks++; failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tjm, p, expect_t;
    cfg_we = 0; step = 0; cfg_idx = '0; cfg_k = '0; cfg_g2 = '0;
    t_e = '0; v_ce = '0; i_c = '0;
    repeat (2) @(negedge clk);

    // 1: cooling system 2, 5 us, P = 2 V * 200 A = 400 W, T_e = 25
    setup(r2, tau2, 5e-6);
    for (int n = 1; n <= 4000; n++) begin
      do_step(2.0, 200.0, 25.0, tjm);
      if (n % 50 == 0) check_near($sformatf("cs2 step %0d", n), rq(t_j), tjm, 1e-3);
    end
    checks++;
    if (longint'(p_loss) != q(400.0)) begin failures++; $display("FAIL p_loss"); end
    expect_t = 25.0;
    for (int s = 0; s < N; s++) expect_t += 400.0 * r2[s] * (1.0 - $exp(-0.02 / tau2[s]));
    check_near("cs2 closed form at 20 ms", rq(t_j), expect_t, 0.01);

    // 2: cooling system 1, dt = 1 ms, settles at T_e + P * sum R
    setup(r1, tau1, 1e-3);
    for (int n = 1; n <= 1000; n++) do_step(2.5, 200.0, 40.0, tjm);
    p = 500.0;
    expect_t = 40.0;
    for (int s = 0; s < N; s++) expect_t += p * r1[s];
    check_near("cs1 steady state", rq(t_j), expect_t, 0.01);
    check_near("cs1 model", rq(t_j), tjm, 1e-3);

    // 3: switching pattern, cooling system 1, 5 us
    setup(r1, tau1, 5e-6);
    for (int n = 1; n <= 3000; n++) begin
      real v, i;
      v = (n % 40 < 20) ? 1.8 + 0.001 * (n % 20) : 900.0;
      i = (n % 40 < 20) ? 300.0 : 0.02 * (n % 7);
      do_step(v, i, 25.0, tjm);
      if (n % 25 == 0) check_near($sformatf("pattern step %0d", n), rq(t_j), tjm, 1e-3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
