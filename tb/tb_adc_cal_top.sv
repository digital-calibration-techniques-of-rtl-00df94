// End-to-end testbench of adc_cal_top at its default size. Behavioural
// models stand in for the analog parts of every section and run in parallel:
//
//  P  A 12-stage pipeline (capacitor mismatch and finite gain in the four MSB
//     stages) whose comparator bits reach the top with the pipeline's delay
//     (stage k shows the sample taken k clocks earlier). Stage cycling answers
//     CAL/CALn/FRC; the loops of techniques 1 and 2 answer their controllers
//     (one extra stage, two extra stages). The calibrated output error is
//     measured with the binary start weights, after stage cycling, after
//     switching to technique 1 and after switching to technique 2.
//  R  10-stage pipeline, 3 mismatched stages, slow ramp; output error before
//     and after.
//  D  12-stage pipeline with the 5/3.75/2.5/1.25 % gain errors, fine ramp and
//     an exact reference reading; output error before and after.
//  J  10-stage pipeline, stage gains 2.06, 1.94, 2.04: rising ramp (swap
//     decisions), falling ramp (jump heights), then the corrected output
//     must be free of the jumps seen in the raw code.
//  A  One MX2 stage looped as an algorithmic converter.
//  G  A 1 bit/stage algorithmic converter with gain 1.9, forced conversion;
//     S1..S3 against the model's bit string.
//
// Each mechanism is counted; the test fails if one never happened. Random
// input values come from $urandom.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_adc_cal_top;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int PN = 12, PC = 4, RN = 10, RC = 3, DN = 12, JN = 10, JC = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---- DUT ports --------------------------------------------------------------
  logic [PN-1:0] p_b1 = '0, p_b0 = '0;
  logic [2:0] p_flash_t = '0;
  logic p_en = 0;
  logic [1:0] p_tech = '0;
  logic p_fpi_start = 0, p_t1_start = 0, p_t2_start = 0;
  logic p_t1_code_valid = 0, p_t1_b1 = 0, p_t1_b0 = 1;
  logic p_t2_code_valid = 0, p_t2_b1 = 0, p_t2_b0 = 1;
  logic [1:0] p_flash_d;
  logic p_cal, p_frc, p_fpi_valid;
  logic [PC-1:0] p_cal_n;
  logic [1:0] p_in_sel [PC];
  logic [2:0] p_be_src;
  logic p_t1_calex, p_t1_vcal, p_t1_frc_en, p_t1_frc_val, p_t1_ex_clk_fast, p_t1_ex_clk_swap, p_t1_valid;
  logic [PC-1:0] p_t1_cal_e, p_t1_cal, p_t1_slow_clk;
  logic p_t2_cal_ex, p_t2_acq, p_t2_frc_en, p_t2_frc_val, p_t2_frc_stage, p_t2_valid;
  logic [PC/2-1:0] p_t2_cal_pair;
  logic [PC-1:0] p_t2_swap;
  logic [1:0] p_t2_s_in_calib;
  logic p_weights_busy, p_dout_valid;
  logic signed [11:0] p_dout;

  logic r_start = 0, r_valid = 0;
  code_t r_codes [RN];
  logic r_busy, r_coef_valid, r_dout_valid;
  logic signed [RN-1:0] r_dout;

  logic d_start = 0, d_valid = 0;
  code_t d_codes [DN];
  fxp_t d_algo = '0;
  logic [4:0] d_found;
  logic d_done, d_dout_valid;
  logic signed [DN-1:0] d_dout;

  logic j_arm = 0, j_valid = 0, j_up_down = 1;
  code_t j_codes [JN];
  logic [JC-1:0] j_swap, j_swap_done, j_s_done;
  logic signed [JN:0] j_raw;
  logic j_out_valid;
  logic signed [JN+4:0] j_out;

  logic a_start = 0, a_code_valid = 0;
  code_t a_code = CODE_Z;
  logic a_acq, a_vcal, a_frc_en, a_frc_val, a_coef_valid;
  fxp_t a_alpha, a_beta;

  logic g_start = 0, g_bit_valid = 0, g_bit = 0;
  logic g_input_zero, g_force_msb, g_busy, g_s_done;
  logic signed [10:0] g_s [3];

  adc_cal_top dut (.*);

  // ---- bookkeeping -------------------------------------------------------------
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_acq = 0, n_forced = 0, n_wregen = 0, n_flash = 0;
  int n_t1_calex = 0, n_t1_cal = 0, n_t1_cal_e = 0, n_t1_swapclk = 0, n_t1_slow = 0;
  int n_t2_calex = 0, n_t2_swap = 0, n_t2_pair = 0, n_t2_sin = 0;
  int n_p_out = 0, n_r_out = 0, n_d_out = 0, n_j_out = 0;
  bit p_done = 0, r_done = 0, d_done_t = 0, j_done = 0, a_done = 0, g_done = 0;

  function automatic logic b1_of(int d); return d == 1;  endfunction
  function automatic logic b0_of(int d); return d != -1; endfunction

  // =============================== P ===========================================
  rvec_t pta, ptb;
  real   p_vin = 0.0;
  ivec_t p_hist [PN];

  initial begin
    real mm [4] = '{-0.10, -0.05, 0.10, 0.05};
    pta = ideal_alpha();
    ptb = ideal_beta();
    for (int i = 0; i < PC; i++) begin
      pta[i] = mx2_alpha(1.0, 1.0 + mm[i], 0.1, 398.0);
      ptb[i] = mx2_beta (1.0, 1.0 + mm[i], 0.1, 398.0);
    end
    for (int s = 0; s < PN; s++) for (int k = 0; k < 16; k++) p_hist[s][k] = 0;
  end

  // Pipeline: a new sample every clock; stage k's comparators belong to the
  // sample taken k clocks ago.
  always @(posedge clk) begin
    ivec_t d, order;
    int n;
    n = -1;
    for (int i = 0; i < PC; i++) if (p_cal && p_cal_n[i]) n = i;
    if (n >= 0) begin
      for (int m = 0; m < PC; m++) order[m] = (n + m) % PC;
      for (int k = PC; k < PN; k++) order[k] = k;
      d = run_chain(0.25, order, PN, pta, ptb, p_frc ? 1 : 0);
    end else d = convert(p_vin, PN, pta, ptb);
    for (int s = PN - 1; s > 0; s--) p_hist[s] = p_hist[s-1];
    p_hist[0] = d;
    for (int k = 0; k < PN; k++) begin
      p_b1[k] <= b1_of(p_hist[k][k]);
      p_b0[k] <= b0_of(p_hist[k][k]);
    end
  end

  // Flash encoder: random thermometer codes, bubbles included.
  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (p_flash_d != 2'($countones(p_flash_t))) begin
      failures++;
      $display("FAIL: flash %b -> %0d", p_flash_t, p_flash_d);
    end else n_flash++;
    p_flash_t <= 3'($urandom);
  end

  // Technique 1 loop: extra stage (index 0) or pipeline stage n (index n).
  real t1a [5], t1b [5];
  real t1_lv = 0.0;
  int  t1_div = 0;
  initial begin
    #1;
    t1a[0] = mx2_alpha(1.0, 1.03, 0.05, 22000.0);
    t1b[0] = mx2_beta (1.0, 1.03, 0.05, 22000.0);
    for (int k = 0; k < PC; k++) begin t1a[k+1] = pta[k]; t1b[k+1] = ptb[k]; end
  end
  always @(posedge clk) begin
    p_t1_code_valid <= 1'b0;
    t1_div = (t1_div + 1) % 3;
    if (rst_n && (p_t1_calex || p_t1_cal != 0) && t1_div == 0 && !p_t1_code_valid) begin
      int st, d, dr;
      real vin;
      st = 0;
      for (int k = 0; k < PC; k++) if (p_t1_cal[k]) st = k + 1;
      vin = p_t1_vcal ? 0.25 : t1_lv;
      dr = decide(vin);
      d = p_t1_frc_en ? (p_t1_frc_val ? 1 : 0) : dr;
      t1_lv = t1a[st] * vin - t1b[st] * real'(d);
      p_t1_b1 <= b1_of(dr);
      p_t1_b0 <= b0_of(dr);
      p_t1_code_valid <= 1'b1;
    end
  end

  // Technique 2 loop: extra stages 0, 1; pipeline stages 1..4 at 2..5.
  real t2a [6], t2b [6];
  real t2_lv = 0.0;
  int  t2_cyc = 0;
  initial begin
    real me [2] = '{0.04, -0.06};
    #1;
    for (int e = 0; e < 2; e++) begin
      t2a[e] = mx2_alpha(1.0, 1.0 + me[e], 0.05, 22000.0);
      t2b[e] = mx2_beta (1.0, 1.0 + me[e], 0.05, 22000.0);
    end
    for (int k = 0; k < PC; k++) begin t2a[k+2] = pta[k]; t2b[k+2] = ptb[k]; end
  end
  always @(posedge clk) begin
    p_t2_code_valid <= 1'b0;
    if (rst_n && p_t2_acq && (p_t2_cal_ex || p_t2_cal_pair != 0) && !p_t2_code_valid) begin
      int base, st, d, dr;
      real vin;
      base = 0;
      for (int p = 0; p < PC / 2; p++) if (p_t2_cal_pair[p]) base = 2 + 2 * p;
      if (p_t2_s_in_calib != 0) begin
        t2_cyc = 0;
        vin = 0.25;
      end else vin = t2_lv;
      st = base + ((int'(p_t2_frc_stage) + t2_cyc) % 2);
      dr = decide(vin);
      d = p_t2_frc_en ? (p_t2_frc_val ? 1 : 0) : dr;
      t2_lv = t2a[st] * vin - t2b[st] * real'(d);
      t2_cyc++;
      p_t2_b1 <= b1_of(dr);
      p_t2_b0 <= b0_of(dr);
      p_t2_code_valid <= 1'b1;
    end
  end

  // P mechanism monitor.
  logic [PC-1:0] caln_q = '0, t1_cal_q = '0, t1_cal_e_q = '0, t2_swap_q = '0;
  logic [PC/2-1:0] t2_pair_q = '0;
  logic frc_q = 0, wb_q = 0, t1_calex_q = 0, t1_swapclk_q = 0, t2_calex_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (p_cal && p_cal_n != 0 && (p_cal_n != caln_q || p_frc != frc_q)) n_acq++;
    if (p_cal && p_frc) n_forced++;
    if (p_weights_busy && !wb_q) n_wregen++;
    if (p_t1_calex && !t1_calex_q) n_t1_calex++;
    for (int k = 0; k < PC; k++) begin
      if (p_t1_cal[k] && !t1_cal_q[k]) n_t1_cal++;
      if (p_t1_cal_e[k] && !t1_cal_e_q[k]) n_t1_cal_e++;
      if (p_t2_swap[k] && !t2_swap_q[k]) n_t2_swap++;
    end
    if (p_t1_ex_clk_swap && !t1_swapclk_q) n_t1_swapclk++;
    if (p_t1_slow_clk != 0) n_t1_slow++;
    if (p_t2_cal_ex && !t2_calex_q) n_t2_calex++;
    for (int p = 0; p < PC / 2; p++) if (p_t2_cal_pair[p] && !t2_pair_q[p]) n_t2_pair++;
    if (p_t2_s_in_calib != 0) n_t2_sin++;
    if (p_dout_valid) n_p_out++;
    if (r_dout_valid) n_r_out++;
    if (d_dout_valid) n_d_out++;
    if (j_out_valid)  n_j_out++;
    caln_q <= p_cal_n; frc_q <= p_frc; wb_q <= p_weights_busy;
    t1_cal_q <= p_t1_cal; t1_cal_e_q <= p_t1_cal_e; t1_calex_q <= p_t1_calex;
    t1_swapclk_q <= p_t1_ex_clk_swap; t2_swap_q <= p_t2_swap; t2_pair_q <= p_t2_cal_pair;
    t2_calex_q <= p_t2_cal_ex;
  end

  // Largest output error over random inputs, in LSB of the 12-bit code.
  task automatic p_measure(output real err);
    err = 0.0;
    for (int i = 0; i < 40; i++) begin
      real v, e;
      v = (real'($urandom_range(0, 19000)) - 9500.0) / 10000.0;
      p_vin = v;
      repeat (PN + 4) @(posedge clk);
      e = absr(real'(p_dout) - v * 2048.0);
      if (e > err) err = e;
    end
  endtask

  task automatic p_wait_weights();
    repeat (4) @(posedge clk);
    while (p_weights_busy) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  initial begin : p_thread
    real e0, e_fpi, e_t1, e_t2;
    wait (rst_n);
    p_en <= 1;
    repeat (PN + 4) @(posedge clk);
    p_measure(e0);
    p_fpi_start <= 1; p_t1_start <= 1; p_t2_start <= 1;
    @(posedge clk);
    p_fpi_start <= 0; p_t1_start <= 0; p_t2_start <= 0;
    @(posedge clk);
    wait (p_fpi_valid);
    p_wait_weights();
    p_measure(e_fpi);
    for (int k = 0; k < PC; k++)
      $display("P stage %0d: fpi alpha %f (true %f) beta %f (true %f)", k + 1,
               fx2r(longint'(dut.p_fpi_alpha[k]), FRAC), pta[k],
               fx2r(longint'(dut.p_fpi_beta[k]), FRAC), ptb[k]);
    wait (p_t1_valid);
    p_tech <= 2'd1;
    p_wait_weights();
    p_measure(e_t1);
    wait (p_t2_valid);
    p_tech <= 2'd2;
    p_wait_weights();
    p_measure(e_t2);
    $display("P max error (LSB): binary weights %0.2f, stage cycling %0.2f, technique 1 %0.2f, technique 2 %0.2f",
             e0, e_fpi, e_t1, e_t2);
    check(e0 > 20.0, "uncalibrated pipeline shows the mismatch");
    check(e_fpi < 6.0, "stage cycling calibrates the output");
    check(e_t1 < 6.0, "technique 1 calibrates the output");
    check(e_t2 < 6.0, "technique 2 calibrates the output");
    p_done = 1;
  end

  // =============================== R ===========================================
  rvec_t rta, rtb;
  initial begin : r_thread
    real mm [3] = '{0.10, -0.08, 0.06};
    real v, e0, e1;
    ivec_t d;
    rta = ideal_alpha();
    rtb = ideal_beta();
    for (int i = 0; i < RC; i++) begin
      rta[i] = mx2_alpha(1.0, 1.0 + mm[i], 0.05, 22000.0);
      rtb[i] = mx2_beta (1.0, 1.0 + mm[i], 0.05, 22000.0);
    end
    for (int k = 0; k < RN; k++) r_codes[k] = CODE_Z;
    wait (rst_n);
    @(posedge clk);
    r_measure(e0);
    r_start <= 1;
    @(posedge clk);
    r_start <= 0;
    v = 0.0;
    while (v < 0.27 && !r_coef_valid) begin
      d = convert(v, RN, rta, rtb);
      for (int k = 0; k < RN; k++) r_codes[k] <= enc(d[k]);
      r_valid <= 1;
      @(posedge clk);
      r_valid <= 0;
      repeat (3) @(posedge clk);
      v = v + 1.0 / 16384.0;
    end
    repeat (400) @(posedge clk);
    check(r_coef_valid, "R: ramp calibration finished");
    r_measure(e1);
    $display("R max error (LSB): before %0.2f, after %0.2f", e0, e1);
    check(e1 < 4.0 && e1 < e0 / 2.0, "R: ramp calibration improves the output");
    r_done = 1;
  end

  task automatic r_measure(output real err);
    err = 0.0;
    for (int i = 0; i < 40; i++) begin
      real v, e;
      ivec_t d;
      v = (real'($urandom_range(0, 19000)) - 9500.0) / 10000.0;
      d = convert(v, RN, rta, rtb);
      for (int k = 0; k < RN; k++) r_codes[k] <= enc(d[k]);
      r_valid <= 1;
      @(posedge clk);
      r_valid <= 0;
      @(posedge clk);
      #1;
      e = absr(real'(r_dout) - v * 512.0);
      if (e > err) err = e;
    end
  endtask

  // =============================== D ===========================================
  rvec_t dta, dtb;
  initial begin : d_thread
    real mm [4] = '{0.05, 0.0375, 0.025, 0.0125};
    real v, e0, e1;
    ivec_t d;
    dta = ideal_alpha();
    dtb = ideal_beta();
    for (int i = 0; i < 4; i++) begin
      dta[i] = 2.0 + mm[i];
      dtb[i] = 1.0 + mm[i];
    end
    for (int k = 0; k < DN; k++) d_codes[k] = CODE_Z;
    wait (rst_n);
    @(posedge clk);
    d_measure(e0);
    d_start <= 1;
    @(posedge clk);
    d_start <= 0;
    v = 0.0;
    while (v < 0.31) begin
      d = convert(v, DN, dta, dtb);
      for (int k = 0; k < DN; k++) d_codes[k] <= enc(d[k]);
      d_algo  <= fxp_t'($rtoi(v * 65536.0));
      d_valid <= 1;
      @(posedge clk);
      v = v + 1.0 / 131072.0;
    end
    d_valid <= 0;
    repeat (3) @(posedge clk);
    check(d_found == 5'b11111 && d_done, "D: all five patterns found");
    d_measure(e1);
    $display("D max error (LSB): before %0.2f, after %0.2f", e0, e1);
    check(e1 < 3.0 && e1 < e0 / 2.0, "D: extracted weights improve the output");
    d_done_t = 1;
  end

  task automatic d_measure(output real err);
    err = 0.0;
    for (int i = 0; i < 40; i++) begin
      real v, e;
      ivec_t d;
      v = (real'($urandom_range(0, 19000)) - 9500.0) / 10000.0;
      d = convert(v, DN, dta, dtb);
      for (int k = 0; k < DN; k++) d_codes[k] <= enc(d[k]);
      d_valid <= 1;
      @(posedge clk);
      d_valid <= 0;
      @(posedge clk);
      #1;
      e = absr(real'(d_dout) - v * 2048.0);
      if (e > err) err = e;
    end
  endtask

  // =============================== J ===========================================
  rvec_t jta, jtb;
  int j_prev_raw, j_prev_out, j_max_draw, j_max_dout;
  bit j_first;

  task automatic j_sample(real v, bit track);
    ivec_t c;
    c = convert(v, JN, jta, jtb);
    for (int k = 0; k < JN; k++) j_codes[k] <= enc(c[k]);
    j_valid <= 1;
    @(posedge clk);
    j_valid <= 0;
    @(posedge clk);
    @(posedge clk);
    #1;
    if (track) begin
      if (!j_first) begin
        int dr, dq;
        dr = int'(j_raw) - j_prev_raw;
        dq = int'(j_out) - j_prev_out;
        if (dr < 0) dr = -dr;
        if (dq < 0) dq = -dq;
        if (dr > j_max_draw) j_max_draw = dr;
        if (dq > j_max_dout) j_max_dout = dq;
      end
      j_first = 0;
      j_prev_raw = int'(j_raw);
      j_prev_out = int'(j_out);
    end
  endtask

  initial begin : j_thread
    real gb [3] = '{1.06, 0.94, 1.04};
    real step, v;
    step = 1.0 / 1024.0 / 5.0;
    jta = ideal_alpha();
    jtb = ideal_beta();
    for (int i = 0; i < JC; i++) begin jtb[i] = gb[i]; jta[i] = 1.0 + gb[i]; end
    for (int k = 0; k < JN; k++) j_codes[k] = CODE_Z;
    wait (rst_n);
    @(posedge clk);
    j_arm <= 1;
    @(posedge clk);
    j_arm <= 0;
    j_up_down <= 1;
    for (v = 0.0; v <= 0.3; v += step) j_sample(v, 0);
    check(j_swap_done == '1, "J: swap decisions on the rising ramp");
    check(j_swap == 3'b101, $sformatf("J: stages with gain above 2 swap (swap=%b)", j_swap));
    for (int i = 0; i < JC; i++)
      if (j_swap[i]) begin jtb[i] = 1.0 / jtb[i]; jta[i] = 1.0 + jtb[i]; end
    j_up_down <= 0;
    for (v = 0.3; v >= 0.0; v -= step) j_sample(v, 0);
    check(j_s_done == '1, "J: jump heights latched on the falling ramp");
    j_first = 1;
    j_max_draw = 0;
    j_max_dout = 0;
    for (v = 0.3; v >= -0.3; v -= step) j_sample(v, 1);
    $display("J largest step over the ramp: raw %0d, corrected %0d", j_max_draw, j_max_dout);
    check(j_max_draw > 4, "J: the raw code has jumps");
    check(j_max_dout <= 2, "J: the corrected code has none");
    j_done = 1;
  end

  // =============================== A ===========================================
  real aa, ab, a_lv = 0.0;
  always @(posedge clk) begin
    a_code_valid <= 1'b0;
    if (rst_n && a_acq && !a_code_valid) begin
      real vin;
      int d;
      vin = a_vcal ? 0.25 : a_lv;
      d = a_frc_en ? (a_frc_val ? 1 : 0) : decide(vin);
      a_lv = aa * vin - ab * real'(d);
      a_code <= enc(d);
      a_code_valid <= 1'b1;
    end
  end

  initial begin : a_thread
    aa = mx2_alpha(1.0, 1.0625, 0.05, 22000.0);   // 6.25 % capacitor mismatch
    ab = mx2_beta (1.0, 1.0625, 0.05, 22000.0);
    wait (rst_n);
    @(posedge clk);
    a_start <= 1;
    @(posedge clk);
    a_start <= 0;
    @(posedge clk);
    wait (a_coef_valid);
    $display("A alpha %f (true %f) beta %f (true %f)", fx2r(longint'(a_alpha), FRAC), aa,
             fx2r(longint'(a_beta), FRAC), ab);
    check(absr(fx2r(longint'(a_alpha), FRAC) - aa) < 0.01, "A: alpha");
    check(absr(fx2r(longint'(a_beta), FRAC) - ab) < 0.01, "A: beta");
    a_done = 1;
  end

  // =============================== G ===========================================
  initial begin : g_thread
    real x, g;
    int b, r1, rj;
    g = 1.9;
    x = 0.0;
    r1 = 0;
    wait (rst_n);
    @(posedge clk);
    g_start <= 1;
    @(posedge clk);
    g_start <= 0;
    @(posedge clk);
    for (int i = 0; i < 9; i++) begin
      b = g_force_msb ? 1 : ((x >= 0.0) ? 1 : 0);
      x = g * x - real'(2 * b - 1) * (g - 1.0);
      r1 = r1 * 2 + b;
      g_bit <= 1'(b);
      g_bit_valid <= 1;
      @(posedge clk);
      g_bit_valid <= 0;
      @(posedge clk);
    end
    @(posedge clk);
    check(g_s_done, "G: codes ready");
    for (int j = 1; j <= 3; j++) begin
      rj = r1 >> (j - 1);
      check(int'(g_s[j-1]) == 2 * rj - (1 << (10 - j)) + 1, $sformatf("G: S%0d = %0d", j, g_s[j-1]));
    end
    $display("G S1..S3 = %0d %0d %0d", g_s[0], g_s[1], g_s[2]);
    g_done = 1;
  end

  // =============================== end ==========================================
  initial begin : main
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (p_done && r_done && d_done_t && j_done && a_done && g_done);
    repeat (4) @(posedge clk);
    $display("mechanisms: acq %0d forced %0d wregen %0d flash %0d | t1 calex %0d cal_e %0d cal %0d swapclk %0d slow %0d | t2 calex %0d swap %0d pair %0d s_in_calib %0d | outputs P %0d R %0d D %0d J %0d",
             n_acq, n_forced, n_wregen, n_flash, n_t1_calex, n_t1_cal_e, n_t1_cal, n_t1_swapclk,
             n_t1_slow, n_t2_calex, n_t2_swap, n_t2_pair, n_t2_sin, n_p_out, n_r_out, n_d_out, n_j_out);
    check(n_acq >= 8, "stage cycling acquisitions");
    check(n_forced > 0, "code forcing");
    check(n_wregen >= 3, "weight regeneration on each coefficient change");
    check(n_flash > 0, "flash encoding");
    check(n_t1_calex == 1, "technique 1: extra stage calibrated");
    check(n_t1_cal_e == PC && n_t1_cal == PC, "technique 1: every stage substituted");
    check(n_t1_swapclk >= 1, "technique 1: phase exchange for even stages");
    check(n_t1_slow > 0, "technique 1: stage on the slow clock");
    check(n_t2_calex == 1, "technique 2: extra pair calibrated");
    check(n_t2_swap == PC && n_t2_pair == PC / 2, "technique 2: every pair substituted");
    check(n_t2_sin > 0, "technique 2: calibration input selected");
    check(n_p_out > 0 && n_r_out > 0 && n_d_out > 0 && n_j_out > 0, "corrected outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
