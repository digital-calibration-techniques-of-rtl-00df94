// Digital calibration logic for 1.5 bit/stage pipelined and algorithmic ADCs:
// the calibration techniques side by side, each with its own ports.
//
//  P  12-stage pipeline, 4 calibrated MSB stages. Comparator outputs B1/B0 of
//     every stage are encoded (with the code forcing of calibration), aligned
//     in time and corrected by the weighted sum Dout = sum D_k*W_k. The
//     coefficients come from one of three calibrations, chosen by `p_tech`:
//       0  foreground stage cycling with fixed-point iteration (fpi_cal_ctrl);
//       1  background, one stage at a time replaced by an extra stage and
//          calibrated as an algorithmic converter with Newton-Raphson
//          (subst_cal_ctrl);
//       2  background, two stages at a time replaced by two extra stages and
//          calibrated as a cyclic converter by fixed-point iteration
//          (pair_cal_ctrl).
//     The weights are recomputed (weight_gen) whenever the selected
//     coefficients change. The last stage's 2-bit flash thermometer code is
//     encoded and brought out.
//  R  10-stage pipeline, 3 calibrated stages, calibrated from a slow input
//     ramp one stage after the other (seq_cal_ctrl), with its own weights and
//     output adder.
//  D  12-stage pipeline whose weights are read directly off a calibrated
//     reference converter on a ramp (direct_weight_extract).
//  J  10-stage pipeline calibrated by gain-error swapping and jump heights
//     (jump_detector per calibrated stage, segment_corrector on the raw code).
//  A  12-bit algorithmic converter calibrated by fixed-point iteration
//     (fpi_algo_cal).
//  G  1 bit/stage algorithmic converter: jump-correction codes S1..S3 from
//     one forced conversion (algo_s_extract).
//
// The analog parts (MX2 stages, comparators, sample-and-holds, ramp
// integrator, switches) are outside; their control and data signals are the
// ports. Timing: every output adder has one clock of latency after the code
// alignment; the raw code of J one clock after `j_valid`.
// Each section follows the design's calibration scheme. Putting them side
// by side, sharing one output path among the three coefficient sources of P
// (selected by p_tech), and keeping the flash code out of P's weighted sum
// are this implementation's own choices.
module adc_cal_top
  import adc_cal_pkg::*;
#(
  parameter int P_N_ST = 12,
  parameter int P_NCAL = 4,
  parameter int P_NOUT = 12,
  parameter int R_N_ST = 10,
  parameter int R_NCAL = 3,
  parameter int D_N_ST = 12,
  parameter int J_N_ST = 10,
  parameter int J_NCAL = 3,
  parameter int A_BITS = 12,
  parameter int G_BITS = 9,
  parameter int G_NCAL = 3
) (
  input  logic clk,
  input  logic rst_n,

  // ---- P: pipeline with the three coefficient sources -------------------------
  input  logic [P_N_ST-1:0] p_b1,          // comparator vs +Vref/4 of each stage
  input  logic [P_N_ST-1:0] p_b0,          // comparator vs -Vref/4
  input  logic [2:0]        p_flash_t,     // thermometer code of the 2-bit flash
  input  logic              p_en,          // one conversion step
  input  logic [1:0]        p_tech,        // coefficient source, see above
  input  logic              p_fpi_start,
  input  logic              p_t1_start,
  input  logic              p_t2_start,
  input  logic              p_t1_code_valid, // calibration loop of technique 1
  input  logic              p_t1_b1,
  input  logic              p_t1_b0,
  input  logic              p_t2_code_valid, // calibration loop of technique 2
  input  logic              p_t2_b1,
  input  logic              p_t2_b0,
  output logic [1:0]        p_flash_d,
  output logic              p_cal,           // fpi: CAL
  output logic [P_NCAL-1:0] p_cal_n,         // fpi: CAL1..CAL4
  output logic              p_frc,           // fpi: FRC
  output logic [1:0]        p_in_sel [P_NCAL],
  output logic [2:0]        p_be_src,
  output logic              p_fpi_valid,
  output logic              p_t1_calex,
  output logic [P_NCAL-1:0] p_t1_cal_e,
  output logic [P_NCAL-1:0] p_t1_cal,
  output logic              p_t1_vcal,
  output logic              p_t1_frc_en,     // forced code of the loop stage (to its DAC)
  output logic              p_t1_frc_val,
  output logic              p_t1_ex_clk_fast,
  output logic              p_t1_ex_clk_swap,
  output logic [P_NCAL-1:0] p_t1_slow_clk,
  output logic              p_t1_valid,
  output logic              p_t2_cal_ex,
  output logic [P_NCAL/2-1:0] p_t2_cal_pair,
  output logic [P_NCAL-1:0] p_t2_swap,
  output logic [1:0]        p_t2_s_in_calib,
  output logic              p_t2_acq,
  output logic              p_t2_frc_en,
  output logic              p_t2_frc_val,
  output logic              p_t2_frc_stage,
  output logic              p_t2_valid,
  output logic              p_weights_busy,
  output logic              p_dout_valid,
  output logic signed [P_NOUT-1:0] p_dout,

  // ---- R: ramp, stage by stage -----------------------------------------------
  input  logic              r_start,
  input  logic              r_valid,
  input  code_t             r_codes [R_N_ST],
  output logic              r_busy,
  output logic              r_coef_valid,
  output logic              r_dout_valid,
  output logic signed [R_N_ST-1:0] r_dout,

  // ---- D: direct weight extraction -------------------------------------------
  input  logic              d_start,
  input  logic              d_valid,
  input  code_t             d_codes [D_N_ST],
  input  fxp_t              d_algo,          // reference converter reading
  output logic [4:0]        d_found,
  output logic              d_done,
  output logic              d_dout_valid,
  output logic signed [D_N_ST-1:0] d_dout,

  // ---- J: jump-based calibration ---------------------------------------------
  input  logic              j_arm,
  input  logic              j_valid,
  input  logic              j_up_down,
  input  code_t             j_codes [J_N_ST],
  output logic [J_NCAL-1:0] j_swap,
  output logic [J_NCAL-1:0] j_swap_done,
  output logic [J_NCAL-1:0] j_s_done,
  output logic signed [J_N_ST:0] j_raw,
  output logic              j_out_valid,
  output logic signed [J_N_ST+4:0] j_out,

  // ---- A: algorithmic converter ----------------------------------------------
  input  logic              a_start,
  input  logic              a_code_valid,
  input  code_t             a_code,
  output logic              a_acq,           // conversions are being collected
  output logic              a_vcal,
  output logic              a_frc_en,
  output logic              a_frc_val,
  output fxp_t              a_alpha,
  output fxp_t              a_beta,
  output logic              a_coef_valid,

  // ---- G: 1 bit/stage algorithmic converter, jump-correction codes -----------
  input  logic              g_start,
  input  logic              g_bit_valid,
  input  logic              g_bit,
  output logic              g_input_zero,
  output logic              g_force_msb,
  output logic              g_busy,
  output logic signed [G_BITS+1:0] g_s [G_NCAL],
  output logic              g_s_done
);

  // ============================ P =============================================
  code_t p_codes [P_N_ST], p_al [P_N_ST];
  logic  p_al_valid;

  // The calibrated stages' codes can be forced during stage cycling.
  logic [P_N_ST-1:0] p_force;
  always_comb begin
    p_force = '0;
    for (int k = 0; k < P_NCAL; k++) p_force[k] = p_cal && p_cal_n[k];
  end
  for (genvar k = 0; k < P_N_ST; k++) begin : g_p_enc
    stage_encoder u_enc (
      .b1(p_b1[k]), .b0(p_b0[k]), .force_en(p_force[k]), .force_p1(p_frc),
      .code(p_codes[k])
    );
  end

  flash2_encoder u_flash (.t(p_flash_t), .d(p_flash_d));

  code_align #(.N_ST(P_N_ST)) u_p_align (
    .clk(clk), .rst_n(rst_n), .en(p_en), .codes_in(p_codes),
    .codes_out(p_al), .valid_out(p_al_valid)
  );

  fxp_t p_fpi_alpha [P_NCAL], p_fpi_beta [P_NCAL];
  logic [3:0] p_fpi_iter;
  fpi_cal_ctrl #(.N_ST(P_N_ST), .NCAL(P_NCAL)) u_fpi (
    .clk(clk), .rst_n(rst_n), .start(p_fpi_start), .codes_in(p_al),
    .cal(p_cal), .cal_n(p_cal_n), .frc(p_frc), .in_sel(p_in_sel), .be_src(p_be_src),
    .alpha(p_fpi_alpha), .beta(p_fpi_beta), .coef_valid(p_fpi_valid), .iter_count(p_fpi_iter)
  );

  // Technique 1: the loop stage's code, forced by the controller.
  code_t p_t1_code;
  stage_encoder u_t1_enc (
    .b1(p_t1_b1), .b0(p_t1_b0), .force_en(p_t1_frc_en), .force_p1(p_t1_frc_val),
    .code(p_t1_code)
  );
  fxp_t p_t1_aex, p_t1_bex, p_t1_a [P_NCAL], p_t1_b [P_NCAL];
  fxp_t p_t1_ause [P_NCAL], p_t1_buse [P_NCAL];
  logic p_t1_busy;
  subst_cal_ctrl #(.NCAL(P_NCAL)) u_t1 (
    .clk(clk), .rst_n(rst_n), .start(p_t1_start), .code_valid(p_t1_code_valid),
    .code_in(p_t1_code), .calex(p_t1_calex), .cal_e(p_t1_cal_e), .cal(p_t1_cal),
    .vcal_sel(p_t1_vcal), .frc_en(p_t1_frc_en), .frc_val(p_t1_frc_val),
    .ex_clk_fast(p_t1_ex_clk_fast), .ex_clk_swap(p_t1_ex_clk_swap), .slow_clk(p_t1_slow_clk),
    .alpha_ex(p_t1_aex), .beta_ex(p_t1_bex), .alpha(p_t1_a), .beta(p_t1_b),
    .alpha_use(p_t1_ause), .beta_use(p_t1_buse), .busy(p_t1_busy), .coef_valid(p_t1_valid)
  );

  // Technique 2: the pair loop's code.
  code_t p_t2_code;
  stage_encoder u_t2_enc (
    .b1(p_t2_b1), .b0(p_t2_b0), .force_en(p_t2_frc_en), .force_p1(p_t2_frc_val),
    .code(p_t2_code)
  );
  fxp_t p_t2_aex [2], p_t2_bex [2], p_t2_a [P_NCAL], p_t2_b [P_NCAL];
  fxp_t p_t2_ause [P_NCAL], p_t2_buse [P_NCAL];
  logic p_t2_busy;
  pair_cal_ctrl #(.NCAL(P_NCAL)) u_t2 (
    .clk(clk), .rst_n(rst_n), .start(p_t2_start), .code_valid(p_t2_code_valid),
    .code_in(p_t2_code), .cal_ex(p_t2_cal_ex), .cal_pair(p_t2_cal_pair), .swap(p_t2_swap),
    .s_in_calib(p_t2_s_in_calib), .acq(p_t2_acq), .frc_en(p_t2_frc_en), .frc_val(p_t2_frc_val),
    .frc_stage(p_t2_frc_stage), .alpha_ex(p_t2_aex), .beta_ex(p_t2_bex),
    .alpha(p_t2_a), .beta(p_t2_b), .alpha_use(p_t2_ause), .beta_use(p_t2_buse),
    .busy(p_t2_busy), .coef_valid(p_t2_valid)
  );

  // Coefficient source and weight regeneration on every change.
  fxp_t p_asel [P_NCAL], p_bsel [P_NCAL], p_aused [P_NCAL], p_bused [P_NCAL];
  always_comb begin
    for (int k = 0; k < P_NCAL; k++) begin
      case (p_tech)
        2'd1:    begin p_asel[k] = p_t1_ause[k];   p_bsel[k] = p_t1_buse[k];   end
        2'd2:    begin p_asel[k] = p_t2_ause[k];   p_bsel[k] = p_t2_buse[k];   end
        default: begin p_asel[k] = p_fpi_alpha[k]; p_bsel[k] = p_fpi_beta[k];  end
      endcase
    end
  end

  logic p_changed, p_wg_start, p_wg_done, p_pending;
  always_comb begin
    p_changed = 1'b0;
    for (int k = 0; k < P_NCAL; k++)
      if (p_asel[k] != p_aused[k] || p_bsel[k] != p_bused[k]) p_changed = 1'b1;
  end
  assign p_wg_start = p_changed && !p_weights_busy && !p_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_pending <= 1'b0;
      for (int k = 0; k < P_NCAL; k++) begin
        p_aused[k] <= FXP_TWO;
        p_bused[k] <= FXP_ONE;
      end
    end else begin
      if (p_wg_start) begin
        p_pending <= 1'b1;
        for (int k = 0; k < P_NCAL; k++) begin
          p_aused[k] <= p_asel[k];
          p_bused[k] <= p_bsel[k];
        end
      end else if (p_wg_done) p_pending <= 1'b0;
    end
  end

  fxp_t p_w [P_N_ST];
  weight_gen #(.N_ST(P_N_ST), .NCAL(P_NCAL)) u_p_wg (
    .clk(clk), .rst_n(rst_n), .start(p_wg_start), .alpha(p_aused), .beta(p_bused),
    .busy(p_weights_busy), .done(p_wg_done), .w(p_w)
  );

  fxp_t p_dout_fx;
  weighted_sum_corrector #(.N_ST(P_N_ST), .NOUT(P_NOUT)) u_p_out (
    .clk(clk), .rst_n(rst_n), .valid_in(p_en && p_al_valid), .codes(p_al), .w(p_w),
    .valid_out(p_dout_valid), .dout(p_dout_fx), .dout_code(p_dout)
  );

  // ============================ R =============================================
  fxp_t r_alpha [R_NCAL], r_beta [R_NCAL], r_w [R_N_ST], r_dout_fx;
  logic [$clog2(R_NCAL+1)-1:0] r_stage;
  logic r_wg_busy, r_wg_done, r_cv_q;
  seq_cal_ctrl #(.N_ST(R_N_ST), .NCAL(R_NCAL)) u_r_cal (
    .clk(clk), .rst_n(rst_n), .start(r_start), .valid_in(r_valid), .codes_in(r_codes),
    .busy(r_busy), .cal_stage(r_stage), .alpha(r_alpha), .beta(r_beta), .coef_valid(r_coef_valid)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_cv_q <= 1'b0;
    else        r_cv_q <= r_coef_valid;
  end
  weight_gen #(.N_ST(R_N_ST), .NCAL(R_NCAL)) u_r_wg (
    .clk(clk), .rst_n(rst_n), .start(r_coef_valid && !r_cv_q), .alpha(r_alpha), .beta(r_beta),
    .busy(r_wg_busy), .done(r_wg_done), .w(r_w)
  );
  weighted_sum_corrector #(.N_ST(R_N_ST), .NOUT(R_N_ST)) u_r_out (
    .clk(clk), .rst_n(rst_n), .valid_in(r_valid && !r_busy), .codes(r_codes), .w(r_w),
    .valid_out(r_dout_valid), .dout(r_dout_fx), .dout_code(r_dout)
  );

  // ============================ D =============================================
  fxp_t d_w [D_N_ST], d_dout_fx;
  direct_weight_extract #(.N_ST(D_N_ST)) u_d_cal (
    .clk(clk), .rst_n(rst_n), .start(d_start), .valid_in(d_valid), .codes_in(d_codes),
    .d_algo(d_algo), .found(d_found), .done(d_done), .w(d_w)
  );
  weighted_sum_corrector #(.N_ST(D_N_ST), .NOUT(D_N_ST)) u_d_out (
    .clk(clk), .rst_n(rst_n), .valid_in(d_valid), .codes(d_codes), .w(d_w),
    .valid_out(d_dout_valid), .dout(d_dout_fx), .dout_code(d_dout)
  );

  // ============================ J =============================================
  logic  j_raw_valid;
  code_t j_codes_q [J_N_ST];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int k = 0; k < J_N_ST; k++) j_codes_q[k] <= CODE_Z;
    else if (j_valid) for (int k = 0; k < J_N_ST; k++) j_codes_q[k] <= j_codes[k];
  end
  raw_code_adder #(.N_ST(J_N_ST)) u_j_raw (
    .clk(clk), .rst_n(rst_n), .valid_in(j_valid), .codes(j_codes),
    .valid_out(j_raw_valid), .raw(j_raw)
  );
  logic signed [J_N_ST:0] j_s [J_NCAL];
  code_t j_dcal [J_NCAL];
  for (genvar n = 0; n < J_NCAL; n++) begin : g_j_det
    assign j_dcal[n] = j_codes_q[n];
    jump_detector #(.RW(J_N_ST + 1)) u_det (
      .clk(clk), .rst_n(rst_n), .arm(j_arm), .valid_in(j_raw_valid), .up_down(j_up_down),
      .msb(j_codes_q[n][1]), .d(j_raw), .swap(j_swap[n]), .swap_done(j_swap_done[n]),
      .s(j_s[n]), .s_done(j_s_done[n])
    );
  end
  segment_corrector #(.RW(J_N_ST + 1), .NCAL(J_NCAL)) u_j_corr (
    .clk(clk), .rst_n(rst_n), .valid_in(j_raw_valid), .raw(j_raw), .dcal(j_dcal),
    .s(j_s), .valid_out(j_out_valid), .out(j_out)
  );

  // ============================ A =============================================
  logic a_busy, a_frc_stage;
  fxp_t a_al [1], a_be [1];
  logic [3:0] a_iter;
  fpi_algo_cal #(.N_BITS(A_BITS), .NSTG(1)) u_a_cal (
    .clk(clk), .rst_n(rst_n), .start(a_start), .code_valid(a_code_valid), .code_in(a_code),
    .busy(a_busy), .acq(a_acq), .vcal_sel(a_vcal), .frc_en(a_frc_en), .frc_val(a_frc_val),
    .frc_stage(a_frc_stage), .alpha(a_al), .beta(a_be), .coef_valid(a_coef_valid),
    .iter_count(a_iter)
  );
  assign a_alpha = a_al[0];
  assign a_beta  = a_be[0];

  // ============================ G =============================================
  algo_s_extract #(.N_BITS(G_BITS), .NCAL(G_NCAL)) u_g_cal (
    .clk(clk), .rst_n(rst_n), .start(g_start), .bit_valid(g_bit_valid), .bit_in(g_bit),
    .input_zero(g_input_zero), .force_msb(g_force_msb), .busy(g_busy), .s(g_s), .s_done(g_s_done)
  );
endmodule
