// Long-run workload for foster_thermal: junction temperature of the
// 1600 V / 300 A module at 200 A and at 333 A conduction current with both
// cooling systems, at the 5 us time step of the system emulation, for
// 0.25 s (50,000 steps each). The device conducts with v_ce = 2.2 V. Every
// 500 steps T_j is compared with a double-precision model of the same
// trapezoidal network (0.002 K), and at the end with the closed-form step
// response T_e + P * sum R_i (1 - exp(-t / tau_i)) (0.02 K). This checks
// that the fixed-point history currents do not drift over many steps.
module tb_thermal_workload;
  localparam int N = 4, W = 64, F = 32;
  localparam real TS = 4294967296.0, KS = 4611686018427387904.0;
  localparam real DT = 5e-6;
  localparam int STEPS = 50000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, step, t_j_valid;
  logic [1:0] cfg_idx;
  logic signed [W-1:0] cfg_k, cfg_g2, t_e, v_ce, i_c, t_j, p_loss;

  foster_thermal dut (.clk, .rst_n, .cfg_we, .cfg_idx, .cfg_k, .cfg_g2, .t_e, .step,
                      .v_ce, .i_c, .t_j_valid, .t_j, .p_loss);

  real rs [2][N] = '{'{2.1e-3, 9.2e-3, 42.6e-3, 6.3e-3}, '{1.33e-3, 7.05e-3, 5.23e-3, 2.8e-3}};
  real ts [2][N] = '{'{0.0008, 0.013, 0.05, 0.063}, '{0.00147, 0.034, 0.168, 1.11}};
  real cur [2] = '{200.0, 333.0};
  real kk [N], gg [N], ih [N];

  task automatic near(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; step = 0; cfg_idx = '0; cfg_k = '0; cfg_g2 = '0;
    t_e = longint'(25.0 * TS); v_ce = '0; i_c = '0;
    for (int cs = 0; cs < 2; cs++) begin
      for (int ci = 0; ci < 2; ci++) begin
        real p, tj, closed;
        rst_n = 0;
        repeat (2) @(negedge clk);
        rst_n = 1;
        for (int i = 0; i < N; i++) begin
          gg[i] = 2.0 * (ts[cs][i] / rs[cs][i]) / DT;
          kk[i] = 1.0 / (gg[i] + 1.0 / rs[cs][i]);
          ih[i] = 0.0;
          @(negedge clk);
          cfg_we = 1; cfg_idx = i[1:0];
          cfg_k = longint'(kk[i] * KS); cfg_g2 = longint'(2.0 * gg[i] * TS);
          kk[i] = real'(cfg_k) / KS; gg[i] = real'(cfg_g2) / TS / 2.0;
        end
        @(negedge clk); cfg_we = 0;
        v_ce = longint'(2.2 * TS); i_c = longint'(cur[ci] * TS);
        p = (real'(v_ce) / TS) * (real'(i_c) / TS);
        for (int n = 1; n <= STEPS; n++) begin
          tj = 25.0;
          for (int s = 0; s < N; s++) begin
            real u;
            u = kk[s] * (p + ih[s]);
            tj += u;
            ih[s] = 2.0 * gg[s] * u - ih[s];
          end
          @(negedge clk); step = 1;
          @(negedge clk); step = 0;
          @(negedge clk);
          @(negedge clk);
          if (n % 500 == 0)
            near($sformatf("cs%0d %0.0f A step %0d", cs + 1, cur[ci], n), real'(t_j) / TS, tj, 2e-3);
        end
        closed = 25.0;
        for (int s = 0; s < N; s++) closed += p * rs[cs][s] * (1.0 - $exp(-real'(STEPS) * DT / ts[cs][s]));
        near($sformatf("cs%0d %0.0f A closed form", cs + 1, cur[ci]), real'(t_j) / TS, closed, 0.02);
        $display("cooling system %0d, %0.0f A: T_j after %0.2f s = %0.3f (closed form %0.3f)",
                 cs + 1, cur[ci], real'(STEPS) * DT, real'(t_j) / TS, closed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
