// Testbench of algo_s_extract: a behavioural 1 bit/stage algorithmic ADC
// (one MX2 stage with gain g and reference gain g-1, looped) answers the
// block's input_zero/force_msb requests, one bit every other clock. For an
// ideal stage and for random gains 1.85..1.99 the S_j of the block must equal
// the value worked out here from the model's bit string in integer arithmetic
// (2*R_j - 2^w + 1 with w the width of R_j); the force/valid timing is
// checked too. Gains and the number of runs are this testbench's choice; the
// 9-bit resolution is the design's algorithmic example.
`timescale 1ns/1ps
module tb_algo_s_extract;
  localparam int N_BITS = 9, NCAL = 3;

  logic clk = 0, rst_n = 0, start = 0, bit_valid = 0, bit_in = 0;
  always #5 clk = ~clk;
  logic input_zero, force_msb, busy, s_done;
  logic signed [N_BITS+1:0] s [NCAL];

  algo_s_extract #(.N_BITS(N_BITS), .NCAL(NCAL)) dut (
    .clk, .rst_n, .start, .bit_valid, .bit_in, .input_zero, .force_msb, .busy, .s, .s_done
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One calibration run with stage gain g; returns the model's R1.
  task automatic run(real g, output int r1);
    real x;
    int b, nbits, ferr;
    r1 = 0;
    x = 0.0;
    nbits = 0;
    ferr = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (nbits < N_BITS) begin
      if (!input_zero) ferr++;
      if (force_msb != (nbits == 0)) ferr++;
      if (nbits == 0) begin
        b = 1;
        bit_in <= 1'($urandom);     // the forced bit's comparator value is ignored
      end else begin
        b = (x >= 0.0) ? 1 : 0;
        bit_in <= 1'(b);
      end
      x = g * x - real'(2 * b - 1) * (g - 1.0);
      r1 = r1 * 2 + b;
      bit_valid <= 1;
      @(posedge clk);
      bit_valid <= 0;
      @(posedge clk);
      nbits++;
    end
    check(ferr == 0, "input_zero/force_msb during the conversion");
    check(!input_zero && !force_msb, "controls released after the last bit");
    @(posedge clk);
    check(s_done, "s_done one clock after the last bit");
  endtask

  initial begin
    int r1, w, rj;
    real g;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!s_done && !busy, "idle after reset");
    for (int t = 0; t < 10; t++) begin
      g = (t == 0) ? 2.0 : 1.85 + 0.14 * real'($urandom_range(0, 1000)) / 1000.0;
      run(g, r1);
      for (int j = 1; j <= NCAL; j++) begin
        w  = N_BITS - j + 1;
        rj = r1 >> (j - 1);
        check(int'(s[j-1]) == 2 * rj - (1 << w) + 1,
              $sformatf("g=%f S%0d=%0d expected %0d (R1=%b)", g, j, s[j-1], 2 * rj - (1 << w) + 1, r1));
      end
      if (t == 0) check(s[0] == 1 && s[1] == 1 && s[2] == 1, "ideal gain: one-code steps");
      else check(s[0] > 1, "gain below 2: S1 above one code");
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
