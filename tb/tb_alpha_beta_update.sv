// Testbench of alpha_beta_update: random coefficient sets and random code
// lists (D=0 and D=+1 conversions through up to three estimated stages and a
// backend sum); the two residue estimates, alpha = 4*Dres0 and
// beta = Dres0 - Dres1 are compared with the same recursion in real
// arithmetic, r <- (beta_s*D + r)/alpha_s from the last list entry back.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_alpha_beta_update;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;
  localparam int L_MAX = 3, NC = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  always #5 clk = ~clk;
  logic [1:0] n_terms;
  code_t codes0 [L_MAX], codes1 [L_MAX];
  logic [2:0] sel [L_MAX];
  fxp_t init0, init1, alpha_u, beta_u, dres0, dres1;
  fxp_t alpha [NC], beta [NC];
  int checks = 0, failures = 0;

  alpha_beta_update #(.L_MAX(L_MAX), .NC(NC)) dut (
    .clk, .rst_n, .start, .n_terms, .codes0, .codes1, .sel, .init0, .init1,
    .alpha, .beta, .busy, .done, .alpha_u, .beta_u, .dres0, .dres1
  );

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real est(int n, code_t c [L_MAX], real init);
    real r;
    r = init;
    for (int k = n - 1; k >= 0; k--)
      r = (fx2r(longint'(beta[sel[k]]), FRAC) * real'(code_val(c[k])) + r)
          / fx2r(longint'(alpha[sel[k]]), FRAC);
    return r;
  endfunction

  initial begin
    real e0, e1;
    for (int n = 0; n < NC; n++) begin
      alpha[n] = FXP_TWO;
      beta[n] = FXP_ONE;
    end
    for (int k = 0; k < L_MAX; k++) begin
      codes0[k] = CODE_Z; codes1[k] = CODE_Z; sel[k] = '0;
    end
    init0 = '0; init1 = '0; n_terms = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int n = 0; n < NC; n++) begin
        alpha[n] = fxp_t'(118000 + $urandom_range(26000));
        beta[n]  = fxp_t'(59000 + $urandom_range(13000));
      end
      n_terms = 2'(t % 4);
      for (int k = 0; k < L_MAX; k++) begin
        codes0[k] = val_code(2'($urandom_range(2)) - 2'sd1);
        codes1[k] = val_code(2'($urandom_range(2)) - 2'sd1);
        sel[k] = 3'($urandom_range(NC - 1));
      end
      init0 = fxp_t'($urandom_range(32768)) - 16384;
      init1 = fxp_t'($urandom_range(32768)) - 16384;
      e0 = est(int'(n_terms), codes0, fx2r(longint'(init0), FRAC));
      e1 = est(int'(n_terms), codes1, fx2r(longint'(init1), FRAC));
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk);
      while (!done) @(posedge clk);
      #1;
      checks += 4;
      if (absr(fx2r(longint'(dres0), FRAC) - e0) > 1e-4) begin failures++; $display("FAIL: dres0 %f vs %f", fx2r(longint'(dres0), FRAC), e0); end
      if (absr(fx2r(longint'(dres1), FRAC) - e1) > 1e-4) begin failures++; $display("FAIL: dres1"); end
      if (absr(fx2r(longint'(alpha_u), FRAC) - 4.0 * e0) > 4e-4) begin failures++; $display("FAIL: alpha_u"); end
      if (absr(fx2r(longint'(beta_u), FRAC) - (e0 - e1)) > 2e-4) begin failures++; $display("FAIL: beta_u"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
