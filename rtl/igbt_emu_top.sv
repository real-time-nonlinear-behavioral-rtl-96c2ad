// Real-time IGBT emulation datapath: ANN device model, electro-thermal
// network and converter control.
//
// Three independent engines share the chip and one clock:
//  - the IGBT transient model: the five raw device quantities of a switching
//    event (start/end voltage and current, gate signal) are min-max
//    normalised (minmax_norm) and passed through the 8-32-80 ANN (igbt_ann),
//    which gives the 80 outputs of the trained model in 355 clocks;
//  - the electro-thermal model: per time step, the device's v_ce and i_c
//    give the power loss, and the four-stage R-C network (foster_thermal)
//    gives the junction temperature 3 clocks later;
//  - the grid-side converter control (vsc_control): DC-voltage and dq current
//    PI loops with PWM, 6 clocks per time step.
// How the three are tied together in a converter emulation (the network
// solver that turns ANN outputs into v_ce/i_c per step, and the converter
// models that consume the gate signals) is not part of this RTL, so every
// engine's inputs and outputs are ports of the top.
//
// Interface and timing: ann_in_valid takes ann_x_raw; normalisation takes one
// clock and starts the ANN if it is idle (ann_busy low); an event arriving
// while ann_busy is high is not taken (ann_drop pulses). ann_done pulses when
// ann_y holds the new outputs. The thermal and control ports behave as in
// foster_thermal and vsc_control. All parameters default to the sizes of
// the reference design; the fixed-point formats are this design's choice.
module igbt_emu_top
  import igbt_ann_pkg::*;
#(
  parameter int unsigned TH_STAGES   = 4,
  parameter int unsigned TH_W        = 64,
  parameter int unsigned TH_F        = 32,
  parameter int unsigned HALF_PERIOD = 256
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // ---- ANN: normalisation settings and coefficient load
  input  logic                           norm_cfg_we,
  input  logic [$clog2(N_IN)-1:0]        norm_cfg_idx,
  input  logic signed [DATA_W-1:0]       norm_cfg_min,
  input  logic signed [DATA_W-1:0]       norm_cfg_scale,
  input  logic                           ann_ld_we,
  input  ld_sel_e                        ann_ld_sel,
  input  logic [$clog2(N_OUT)-1:0]       ann_ld_row,
  input  logic [$clog2(N_HID)-1:0]       ann_ld_col,
  input  logic signed [DATA_W-1:0]       ann_ld_data,
  // ---- ANN: inference
  input  logic                           ann_in_valid,
  input  logic signed [DATA_W-1:0]       ann_x_raw [N_IN],
  output logic                           ann_busy,
  output logic                           ann_drop,
  output logic                           ann_done,
  output logic signed [DATA_W-1:0]       ann_y [N_OUT],
  // ---- electro-thermal network
  input  logic                           th_cfg_we,
  input  logic [$clog2(TH_STAGES)-1:0]   th_cfg_idx,
  input  logic signed [TH_W-1:0]         th_cfg_k,
  input  logic signed [TH_W-1:0]         th_cfg_g2,
  input  logic signed [TH_W-1:0]         th_t_e,
  input  logic                           th_step,
  input  logic signed [TH_W-1:0]         th_v_ce,
  input  logic signed [TH_W-1:0]         th_i_c,
  output logic                           th_t_j_valid,
  output logic signed [TH_W-1:0]         th_t_j,
  output logic signed [TH_W-1:0]         th_p_loss,
  // ---- converter control
  input  logic signed [DATA_W-1:0]       vc_kp_v,
  input  logic signed [DATA_W-1:0]       vc_ki_v_dt,
  input  logic signed [DATA_W-1:0]       vc_lim_v,
  input  logic signed [DATA_W-1:0]       vc_kp_i,
  input  logic signed [DATA_W-1:0]       vc_ki_i_dt,
  input  logic signed [DATA_W-1:0]       vc_lim_i,
  input  logic signed [DATA_W-1:0]       vc_w_l,
  input  logic                           vc_step,
  input  logic signed [DATA_W-1:0]       vc_v_dc,
  input  logic signed [DATA_W-1:0]       vc_v_dc_ref,
  input  logic signed [DATA_W-1:0]       vc_i_q_ref,
  input  logic signed [DATA_W-1:0]       vc_i_abc [3],
  input  logic signed [DATA_W-1:0]       vc_v_abc [3],
  input  logic signed [DATA_W-1:0]       vc_sin_t,
  input  logic signed [DATA_W-1:0]       vc_cos_t,
  output logic                           vc_ref_valid,
  output logic signed [DATA_W-1:0]       vc_i_dq [2],
  output logic signed [DATA_W-1:0]       vc_v_dq_ref [2],
  output logic signed [DATA_W-1:0]       vc_v_abc_ref [3],
  output logic [2:0]                     vc_gate_hi,
  output logic [2:0]                     vc_gate_lo
);

  // ---------------- IGBT transient ANN ----------------
  logic                       norm_valid;
  logic signed [DATA_W-1:0]   x_norm [N_IN_PAD];

  minmax_norm #(.N_IN(N_IN), .N_OUT(N_IN_PAD), .W(DATA_W), .F(FRAC)) u_norm (
    .clk, .rst_n,
    .cfg_we(norm_cfg_we), .cfg_idx(norm_cfg_idx), .cfg_min(norm_cfg_min), .cfg_scale(norm_cfg_scale),
    .in_valid(ann_in_valid), .x_raw(ann_x_raw),
    .out_valid(norm_valid), .x_norm(x_norm));

  igbt_ann u_ann (
    .clk, .rst_n,
    .ld_we(ann_ld_we), .ld_sel(ann_ld_sel), .ld_row(ann_ld_row), .ld_col(ann_ld_col),
    .ld_data(ann_ld_data),
    .start(norm_valid), .x_in(x_norm),
    .busy(ann_busy), .done(ann_done), .y(ann_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ann_drop <= 1'b0;
    else        ann_drop <= norm_valid && ann_busy;
  end

  // ---------------- electro-thermal network ----------------
  foster_thermal #(.N_STAGE(TH_STAGES), .W(TH_W), .F(TH_F)) u_thermal (
    .clk, .rst_n,
    .cfg_we(th_cfg_we), .cfg_idx(th_cfg_idx), .cfg_k(th_cfg_k), .cfg_g2(th_cfg_g2),
    .t_e(th_t_e), .step(th_step), .v_ce(th_v_ce), .i_c(th_i_c),
    .t_j_valid(th_t_j_valid), .t_j(th_t_j), .p_loss(th_p_loss));

  // ---------------- converter control ----------------
  vsc_control #(.W(DATA_W), .F(FRAC), .HALF_PERIOD(HALF_PERIOD)) u_ctrl (
    .clk, .rst_n,
    .kp_v(vc_kp_v), .ki_v_dt(vc_ki_v_dt), .lim_v(vc_lim_v),
    .kp_i(vc_kp_i), .ki_i_dt(vc_ki_i_dt), .lim_i(vc_lim_i), .w_l(vc_w_l),
    .step(vc_step), .v_dc(vc_v_dc), .v_dc_ref(vc_v_dc_ref), .i_q_ref(vc_i_q_ref),
    .i_abc(vc_i_abc), .v_abc(vc_v_abc), .sin_t(vc_sin_t), .cos_t(vc_cos_t),
    .ref_valid(vc_ref_valid), .i_dq(vc_i_dq), .v_dq_ref(vc_v_dq_ref), .v_abc_ref(vc_v_abc_ref),
    .gate_hi(vc_gate_hi), .gate_lo(vc_gate_lo));

endmodule
