// Testbench of segment_corrector: every code combination of the three
// calibrated stages that the correction table lists is applied with random raw
// codes and jump heights; the expected correction is read from a copy of the
// table (counts of S1, S2, S3 per segment), not from the closed form.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_segment_corrector;
  import adc_cal_pkg::*;

  localparam int RW = 11, NCAL = 3;
  logic clk = 0, rst_n = 0, valid_in = 0;
  always #5 clk = ~clk;
  logic signed [RW-1:0] raw;
  code_t dcal [NCAL];
  logic signed [RW-1:0] s [NCAL];
  logic valid_out;
  logic signed [RW+3:0] out;

  segment_corrector #(.RW(RW), .NCAL(NCAL)) dut (.clk, .rst_n, .valid_in, .raw, .dcal, .s, .valid_out, .out);

  int checks = 0, failures = 0;

  // Segment table: codes D1 D2 D3 (2-bit each) and the added multiples of S1,S2,S3.
  typedef struct { logic [1:0] c1, c2, c3; int k1, k2, k3; } seg_t;
  seg_t tab [23] = '{
    '{2'b00,2'b00,2'b00, 1,3,7}, '{2'b00,2'b00,2'b01, 1,3,6}, '{2'b00,2'b00,2'b10, 1,3,5},
    '{2'b00,2'b01,2'b00, 1,2,5}, '{2'b00,2'b01,2'b01, 1,2,4}, '{2'b00,2'b01,2'b10, 1,2,3},
    '{2'b00,2'b10,2'b00, 1,1,3}, '{2'b00,2'b10,2'b01, 1,1,2}, '{2'b01,2'b00,2'b01, 0,1,2},
    '{2'b01,2'b00,2'b10, 0,1,1}, '{2'b01,2'b01,2'b00, 0,0,1}, '{2'b01,2'b01,2'b01, 0,0,0},
    '{2'b01,2'b01,2'b10, 0,0,-1}, '{2'b01,2'b10,2'b00, 0,-1,-1}, '{2'b01,2'b10,2'b01, 0,-1,-2},
    '{2'b10,2'b00,2'b01, -1,-1,-2}, '{2'b10,2'b00,2'b10, -1,-1,-3}, '{2'b10,2'b01,2'b00, -1,-2,-3},
    '{2'b10,2'b01,2'b01, -1,-2,-4}, '{2'b10,2'b01,2'b10, -1,-2,-5}, '{2'b10,2'b10,2'b00, -1,-3,-5},
    '{2'b10,2'b10,2'b01, -1,-3,-6}, '{2'b10,2'b10,2'b10, -1,-3,-7}};

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raw = '0; s = '{default: '0}; dcal = '{default: 2'b01};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < 23; i++) begin
        int r, s1, s2, s3, expv;
        r  = int'($urandom_range(1600)) - 800;
        s1 = int'($urandom_range(60)) - 10;
        s2 = int'($urandom_range(40)) - 10;
        s3 = int'($urandom_range(20)) - 5;
        raw <= RW'(r);
        s[0] <= RW'(s1); s[1] <= RW'(s2); s[2] <= RW'(s3);
        dcal[0] <= tab[i].c1; dcal[1] <= tab[i].c2; dcal[2] <= tab[i].c3;
        valid_in <= 1;
        @(posedge clk);
        valid_in <= 0;
        @(negedge clk);
        expv = r + tab[i].k1 * s1 + tab[i].k2 * s2 + tab[i].k3 * s3;
        checks++;
        if (!valid_out || int'(out) != expv) begin
          failures++;
          $display("FAIL: segment %0d raw %0d got %0d expected %0d", i + 1, r, int'(out), expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
