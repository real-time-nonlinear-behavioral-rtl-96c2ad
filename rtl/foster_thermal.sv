// Electro-thermal network of the IGBT: junction temperature from power loss.
//
// The device's transient thermal impedance is a chain of N_STAGE parallel
// R-C pairs (four in the reference design) between the junction and the
// ambient temperature T_e, driven by a current source equal to the power loss.
// Each capacitor is replaced by its trapezoidal companion model, a conductance
// G_i = 2 C_i / dt in parallel with a history current I_i, so every time step
// is solved in closed form, stage by stage:
//
//   P      = v_ce * i_c                         (power loss)
//   u_i    = (P + I_i) / (G_i + 1/R_i)          (temperature rise of stage i)
//   T_j    = T_e + sum_i u_i
//   I_i   <= 2 G_i u_i - I_i                    (history for the next step)
//
// The network and the T_j formula follow the reference design. The division
// is not done in hardware: each stage stores K_i = 1 / (G_i + 1/R_i) and
// 2 G_i, computed once from R_i, tau_i (C_i = tau_i / R_i) and dt. The
// trapezoidal conductance 2 C_i / dt is this design's reading of the
// companion model; P = v_ce * i_c is this design's choice for the power loss.
//
// Interface and timing: cfg_we writes (cfg_k, cfg_g2) of stage cfg_idx. A
// step pulse takes v_ce and i_c for one time step; t_j and t_j_valid appear
// 3 clock edges later (power, stage solve, sum and history update). Steps
// must be at least 3 clocks apart. Reset clears all history currents, which
// is a network at rest at T_e. Numbers are signed W-bit fixed point with F
// fractional bits (default Q32.32: temperatures in K or degC, power in W),
// except K_i, which has FK fractional bits (default Q2.62). K_i is tiny
// (about 2e-6 K/W for a 1 s time constant at dt = 5 us) and the network's
// poles, 2 G_i K_i - 1, lie within a few 1e-6 of 1, so K_i needs far more
// precision than the other numbers. Every product is rounded to nearest,
// without saturation.
module foster_thermal #(
  parameter int unsigned N_STAGE = 4,
  parameter int unsigned W       = 64,
  parameter int unsigned F       = 32,
  parameter int unsigned FK      = W - 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // stage coefficients
  input  logic                          cfg_we,
  input  logic [$clog2(N_STAGE)-1:0]    cfg_idx,
  input  logic signed [W-1:0]           cfg_k,
  input  logic signed [W-1:0]           cfg_g2,
  // time step
  input  logic signed [W-1:0]           t_e,
  input  logic                          step,
  input  logic signed [W-1:0]           v_ce,
  input  logic signed [W-1:0]           i_c,
  output logic                          t_j_valid,
  output logic signed [W-1:0]           t_j,
  output logic signed [W-1:0]           p_loss
);

  logic signed [W-1:0] k_c  [N_STAGE];
  logic signed [W-1:0] g2_c [N_STAGE];
  logic signed [W-1:0] ihist[N_STAGE];
  logic signed [W-1:0] u    [N_STAGE];
  logic                s1, s2;

  // product of a and b, where b has FB fractional bits, rounded to nearest
  function automatic logic signed [W-1:0] fmul(input logic signed [W-1:0] a,
                                               input logic signed [W-1:0] b,
                                               input int unsigned FB);
    logic signed [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    p = p + ((2*W)'(1) <<< (FB - 1));
    return W'(p >>> FB);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_STAGE; i++) begin
        k_c[i]  <= '0;
        g2_c[i] <= '0;
      end
    end else if (cfg_we) begin
      k_c[cfg_idx]  <= cfg_k;
      g2_c[cfg_idx] <= cfg_g2;
    end
  end

  logic signed [W-1:0] usum;
  always_comb begin
    usum = t_e;
    for (int i = 0; i < N_STAGE; i++) usum = usum + u[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      t_j_valid <= 1'b0;
      t_j    <= '0;
      p_loss <= '0;
      for (int i = 0; i < N_STAGE; i++) begin
        ihist[i] <= '0;
        u[i]     <= '0;
      end
    end else begin
      s1 <= step;
      s2 <= s1;
      t_j_valid <= s2;
      // 1: power loss of this step
      if (step) p_loss <= fmul(v_ce, i_c, F);
      // 2: temperature rise of each stage
      if (s1)
        for (int i = 0; i < N_STAGE; i++) u[i] <= fmul(p_loss + ihist[i], k_c[i], FK);
      // 3: junction temperature and history currents for the next step
      if (s2) begin
        t_j <= usum;
        for (int i = 0; i < N_STAGE; i++) ihist[i] <= fmul(u[i], g2_c[i], F) - ihist[i];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (s1 || s2) |-> !step)
    else $error("foster_thermal: steps less than 3 clocks apart");

endmodule
