// Testbench of weight_gen: random alpha in 1.8..2.2 and beta in 0.9..1.1 for
// four calibrated stages; the twelve weights are compared with
// beta_k/(alpha_1..alpha_k) and 2^-(k-4)/(alpha_1..alpha_4) computed in real
// arithmetic, and the run time with the divider latency.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_weight_gen;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;
  localparam int N_ST = 12, NCAL = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  always #5 clk = ~clk;
  fxp_t alpha [NCAL], beta [NCAL], w [N_ST];
  int checks = 0, failures = 0;

  weight_gen #(.N_ST(N_ST), .NCAL(NCAL)) dut (.clk, .rst_n, .start, .alpha, .beta, .busy, .done, .w);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ra [NCAL], rb [NCAL], p, tw;
    int cyc;
    for (int n = 0; n < NCAL; n++) begin
      alpha[n] = FXP_TWO;
      beta[n] = FXP_ONE;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (w[0] != FXP_HALF || w[11] != (FXP_HALF >>> 11)) begin failures++; $display("FAIL: reset weights"); end
    for (int t = 0; t < 8; t++) begin
      for (int n = 0; n < NCAL; n++) begin
        alpha[n] = fxp_t'(118000 + $urandom_range(26000));  // 1.80 .. 2.20
        beta[n]  = fxp_t'(59000 + $urandom_range(13000));   // 0.90 .. 1.10
        ra[n] = fx2r(longint'(alpha[n]), FRAC);
        rb[n] = fx2r(longint'(beta[n]), FRAC);
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 1;
      while (!done) begin
        @(posedge clk);
        cyc++;
      end
      #1;
      checks++;
      if (cyc > NCAL * (CW + FRAC + 4) + 4) begin failures++; $display("FAIL: %0d cycles", cyc); end
      p = 1.0;
      for (int k = 0; k < N_ST; k++) begin
        real e;
        if (k < NCAL) begin
          p = p * ra[k];
          tw = rb[k] / p;
        end else tw = 1.0 / (p * real'(1 << (k - NCAL + 1)));
        e = fx2r(longint'(w[k]), FRAC);
        checks++;
        if (absr(e - tw) > 1.0e-4) begin
          failures++;
          $display("FAIL: run %0d W%0d = %f expected %f", t, k + 1, e, tw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
