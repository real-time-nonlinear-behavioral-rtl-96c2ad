// End-to-end testbench of igbt_emu_top at its default sizes (8-32-80 ANN,
// four thermal stages, three-phase control). It
//  1. configures the input normalisation and loads random ANN coefficients,
//  2. runs switching events through normalisation and the ANN and compares
//     all 80 outputs with an integer model (normalise, layer 1, ReLU,
//     layer 2, each rounded to nearest and saturated), checks the latency
//     (1 clock of normalisation + 355), and sends one event while the ANN is
//     busy, which must be dropped without disturbing the running pass,
//  3. steps the thermal network with cooling system 1 at dt = 5 us on a
//     switching v_ce / i_c pattern against a double-precision model,
//  4. steps the converter control with a large DC-voltage error, which must
//     drive the d-current PI to its limit (seen in v_d_ref), with the PWM
//     switching.
// Each mechanism is counted; one that never happened is a failure.
module tb_igbt_emu_top;
  import igbt_ann_pkg::*;
  localparam int W = DATA_W, F = FRAC, TW = 64, TF = 32;
  localparam real S = 65536.0, TS = 4294967296.0, KS = 4611686018427387904.0;
  localparam real PI2 = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_pass = 0, n_relu_clip = 0, n_drop = 0, n_th_step = 0, n_pi_limit = 0, n_pwm_sw = 0;

  logic norm_cfg_we, ann_ld_we, ann_in_valid, ann_busy, ann_drop, ann_done;
  logic [$clog2(N_IN)-1:0] norm_cfg_idx;
  logic signed [W-1:0] norm_cfg_min, norm_cfg_scale, ann_ld_data;
  ld_sel_e ann_ld_sel;
  logic [$clog2(N_OUT)-1:0] ann_ld_row;
  logic [$clog2(N_HID)-1:0] ann_ld_col;
  logic signed [W-1:0] ann_x_raw [N_IN];
  logic signed [W-1:0] ann_y [N_OUT];
  logic th_cfg_we, th_step, th_t_j_valid;
  logic [1:0] th_cfg_idx;
  logic signed [TW-1:0] th_cfg_k, th_cfg_g2, th_t_e, th_v_ce, th_i_c, th_t_j, th_p_loss;
  logic signed [W-1:0] vc_kp_v, vc_ki_v_dt, vc_lim_v, vc_kp_i, vc_ki_i_dt, vc_lim_i, vc_w_l;
  logic vc_step, vc_ref_valid;
  logic signed [W-1:0] vc_v_dc, vc_v_dc_ref, vc_i_q_ref, vc_sin_t, vc_cos_t;
  logic signed [W-1:0] vc_i_abc [3], vc_v_abc [3], vc_i_dq [2], vc_v_dq_ref [2], vc_v_abc_ref [3];
  logic [2:0] vc_gate_hi, vc_gate_lo, last_gate;

  igbt_emu_top dut (.*);

  // ---------------- helpers ----------------
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask
  task automatic near(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask
  function automatic longint rnd(input longint range_q);
    return longint'($urandom_range(32'(2 * range_q))) - range_q;
  endfunction
  function automatic longint to_word(input longint s);
    longint r = (s + (64'sd1 <<< (F - 1))) >>> F;
    if (r > 64'sd2147483647) r = 64'sd2147483647;
    if (r < -64'sd2147483648) r = -64'sd2147483648;
    return r;
  endfunction

  // ---------------- ANN model state ----------------
  longint mn [N_IN], sc [N_IN];
  longint w1 [N_HID][N_IN_PAD]; longint b1 [N_HID];
  longint w2 [N_OUT][N_HID];    longint b2 [N_OUT];
  longint y_exp [N_OUT];

  task automatic put(input ld_sel_e sel, input int r, input int c, input longint v);
    @(negedge clk);
    ann_ld_we = 1; ann_ld_sel = sel; ann_ld_row = r[$clog2(N_OUT)-1:0];
    ann_ld_col = c[$clog2(N_HID)-1:0]; ann_ld_data = W'(v);
    @(negedge clk);
    ann_ld_we = 0;
  endtask

  task automatic model_event(input longint raw [N_IN]);
    longint xn [N_IN_PAD]; longint h [N_HID];
    for (int i = 0; i < N_IN_PAD; i++)
      xn[i] = (i < N_IN) ? to_word(((raw[i] - mn[i]) * sc[i]) - (longint'(1) << (2 * F))) : 0;
    for (int r = 0; r < N_HID; r++) begin
      longint s;
      s = b1[r] <<< F;
      for (int c = 0; c < N_IN_PAD; c++) s += w1[r][c] * xn[c];
      h[r] = to_word(s);
      if (h[r] < 0) begin h[r] = 0; n_relu_clip++; end
    end
    for (int r = 0; r < N_OUT; r++) begin
      longint s;
      s = b2[r] <<< F;
      for (int c = 0; c < N_HID; c++) s += w2[r][c] * h[c];
      y_exp[r] = to_word(s);
    end
  endtask

  task automatic ann_event(input bit with_intruder);
    longint raw [N_IN]; int cyc;
    raw[0] = longint'($urandom_range(1000 << F));
    raw[1] = longint'($urandom_range(1000 << F));
    raw[2] = rnd(250 << F) + (250 << F);
    raw[3] = rnd(250 << F) + (250 << F);
    raw[4] = rnd(15 << F);
    for (int i = 0; i < N_IN; i++) ann_x_raw[i] = W'(raw[i]);
    model_event(raw);
    @(negedge clk); ann_in_valid = 1;
    @(negedge clk); ann_in_valid = 0;
    cyc = 1;
    while (!ann_done) begin
      @(negedge clk); cyc++;
      if (with_intruder && cyc == 100) begin
        for (int i = 0; i < N_IN; i++) ann_x_raw[i] = $urandom;
        ann_in_valid = 1;
        @(negedge clk); ann_in_valid = 0; cyc++;
        @(negedge clk); cyc++;
        if (ann_drop) n_drop++;
        check("drop flagged", longint'(ann_drop), 1);
      end
    end
    check("ANN latency", cyc, 1 + 355);
    for (int r = 0; r < N_OUT; r++) check($sformatf("ann_y[%0d]", r), longint'(ann_y[r]), y_exp[r]);
    n_pass++;
    @(negedge clk);
    check("no second pass", longint'(ann_busy), 0);
  endtask

  // ---------------- thermal model ----------------
  real r1 [4] = '{2.1e-3, 9.2e-3, 42.6e-3, 6.3e-3};
  real tau1 [4] = '{0.0008, 0.013, 0.05, 0.063};
  real kk [4], gg [4], ih [4];

  // ---------------- control ----------------
  function automatic logic signed [W-1:0] q(input real x);
    return W'(longint'(x * S));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && vc_gate_hi != last_gate) n_pwm_sw++;
    last_gate <= vc_gate_hi;
  end

  initial begin
    real dt;
    {norm_cfg_we, ann_ld_we, ann_in_valid, th_cfg_we, th_step, vc_step} = '0;
    norm_cfg_idx = '0; norm_cfg_min = '0; norm_cfg_scale = '0;
    ann_ld_sel = LD_W1; ann_ld_row = '0; ann_ld_col = '0; ann_ld_data = '0;
    for (int i = 0; i < N_IN; i++) ann_x_raw[i] = '0;
    th_cfg_idx = '0; th_cfg_k = '0; th_cfg_g2 = '0; th_t_e = '0; th_v_ce = '0; th_i_c = '0;
    vc_kp_v = q(0.5); vc_ki_v_dt = q(0.01); vc_lim_v = q(500.0);
    vc_kp_i = q(0.3); vc_ki_i_dt = q(0.02); vc_lim_i = q(300.0); vc_w_l = q(0.1131);
    {vc_v_dc, vc_v_dc_ref, vc_i_q_ref, vc_sin_t, vc_cos_t} = '0;
    for (int x = 0; x < 3; x++) begin vc_i_abc[x] = '0; vc_v_abc[x] = '0; end
    last_gate = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1: normalisation ranges (powers of two, exact scales) and coefficients
    mn[0] = 0; mn[1] = 0; mn[2] = -(256 << F); mn[3] = -(256 << F); mn[4] = -(16 << F);
    sc[0] = (2 << F) / 1024; sc[1] = sc[0]; sc[2] = sc[0]; sc[3] = sc[0]; sc[4] = (2 << F) / 32;
    for (int i = 0; i < N_IN; i++) begin
      @(negedge clk);
      norm_cfg_we = 1; norm_cfg_idx = i[$clog2(N_IN)-1:0]; norm_cfg_min = W'(mn[i]); norm_cfg_scale = W'(sc[i]);
    end
    @(negedge clk); norm_cfg_we = 0;
    for (int r = 0; r < N_HID; r++) begin
      for (int c = 0; c < N_IN_PAD; c++) begin w1[r][c] = rnd(2 << F); put(LD_W1, r, c, w1[r][c]); end
      b1[r] = rnd(1 << F); put(LD_B1, r, 0, b1[r]);
    end
    for (int r = 0; r < N_OUT; r++) begin
      for (int c = 0; c < N_HID; c++) begin w2[r][c] = rnd(1 << F); put(LD_W2, r, c, w2[r][c]); end
      b2[r] = rnd(1 << F); put(LD_B2, r, 0, b2[r]);
    end

    // 2: switching events
    for (int e = 0; e < 5; e++) ann_event(e == 2);

    // 3: thermal network, cooling system 1, 5 us
    dt = 5e-6;
    for (int i = 0; i < 4; i++) begin
      real c;
      c = tau1[i] / r1[i];
      gg[i] = 2.0 * c / dt;
      kk[i] = 1.0 / (gg[i] + 1.0 / r1[i]);
      ih[i] = 0.0;
      @(negedge clk);
      th_cfg_we = 1; th_cfg_idx = i[1:0];
      th_cfg_k = longint'(kk[i] * KS); th_cfg_g2 = longint'(2.0 * gg[i] * TS);
      kk[i] = real'(th_cfg_k) / KS; gg[i] = real'(th_cfg_g2) / TS / 2.0;
    end
    @(negedge clk); th_cfg_we = 0;
    th_t_e = longint'(25.0 * TS);
    for (int n = 0; n < 1000; n++) begin
      real v, i, p, tj;
      v = (n % 40 < 20) ? 1.9 : 800.0;
      i = (n % 40 < 20) ? 280.0 : 0.01;
      th_v_ce = longint'(v * TS); th_i_c = longint'(i * TS);
      p = (real'(th_v_ce) / TS) * (real'(th_i_c) / TS);
      tj = 25.0;
      for (int s = 0; s < 4; s++) begin
        real u;
        u = kk[s] * (p + ih[s]);
        tj += u;
        ih[s] = 2.0 * gg[s] * u - ih[s];
      end
      @(negedge clk); th_step = 1;
      @(negedge clk); th_step = 0;
      @(negedge clk);
      @(negedge clk);
      check("t_j_valid after 3 clocks", longint'(th_t_j_valid), 1);
      if (n % 10 == 9) near($sformatf("T_j step %0d", n), real'(th_t_j) / TS, tj, 1e-3);
      n_th_step++;
    end

    // 4: converter control, DC voltage far below its reference
    for (int n = 0; n < 100; n++) begin
      real th;
      th = PI2 * real'(n) / 100.0;
      for (int x = 0; x < 3; x++) begin
        real ph;
        ph = th - real'(x) * PI2 / 3.0;
        vc_i_abc[x] = q(200.0 * $cos(ph) - 10.0 * $sin(ph));
        vc_v_abc[x] = q(400.0 * $cos(ph));
      end
      vc_sin_t = q($sin(th)); vc_cos_t = q($cos(th));
      vc_v_dc = q(600.0); vc_v_dc_ref = q(1000.0); vc_i_q_ref = q(0.0);
      @(negedge clk); vc_step = 1;
      @(negedge clk); vc_step = 0;
      repeat (5) @(negedge clk);
      check("ref_valid after 6 clocks", longint'(vc_ref_valid), 1);
      near("i_d", real'(vc_i_dq[0]) / S, 200.0, 0.05);
      near("i_q", real'(vc_i_dq[1]) / S, 10.0, 0.05);
      // d-current PI at its limit: v_d_ref = lim_i + v_d - wL * i_q
      begin
        real d;
        d = real'(vc_v_dq_ref[0]) / S - (300.0 + 400.0 - 0.1131 * 10.0);
        if (d < 0.05 && d > -0.05) n_pi_limit++;
      end
      repeat (60) @(negedge clk);
    end

    $display("mechanisms: ann passes %0d, relu clips %0d, drops %0d, thermal steps %0d, PI at limit %0d, PWM edges %0d",
             n_pass, n_relu_clip, n_drop, n_th_step, n_pi_limit, n_pwm_sw);
    if (n_pass == 0)      begin failures++; $display("FAIL no ANN pass"); end
    if (n_relu_clip == 0) begin failures++; $display("FAIL ReLU never clipped"); end
    if (n_drop == 0)      begin failures++; $display("FAIL no dropped event"); end
    if (n_th_step == 0)   begin failures++; $display("FAIL no thermal step"); end
    if (n_pi_limit == 0)  begin failures++; $display("FAIL PI never at its limit"); end
    if (n_pwm_sw == 0)    begin failures++; $display("FAIL PWM never switched"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
