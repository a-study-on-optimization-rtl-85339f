// Self-checking test of rb_encoder for M = 2 and M = 3. The expected code is
// worked out arithmetically: v = floor(y / 2^12), code = clamp(floor(v/2) +
// 2^(M-1), 0, 2^M - 1), which is the level-by-level residual binarization with
// factors 2^(M-1) ... 1. Values near zero, near every level boundary and far
// outside the range (saturation both ways) are covered.
//
// The expected behaviour follows the design's arithmetic and dataflow; sizes,
// stimuli and the watchdog limit are this bench's own choice. It prints
// TB_RESULT checks=N failures=F and finishes.
module tb_rb_encoder;
  int checks = 0, failures = 0;
  int sat_hi = 0, sat_lo = 0;
  logic signed [39:0] y;
  logic [1:0] c2;
  logic [2:0] c3;
  rb_encoder #(.M(2), .Y_W(40), .FRAC(12)) u_m2 (.y_i(y), .code_o(c2));
  rb_encoder #(.M(3), .Y_W(40), .FRAC(12)) u_m3 (.y_i(y), .code_o(c3));

  function automatic int expect_code(longint yy, int m);
    longint v = yy >>> 12;
    longint c = (v >>> 1) + (64'sd1 <<< (m - 1));
    if (c < 0) c = 0;
    if (c > (64'sd1 <<< m) - 1) c = (64'sd1 <<< m) - 1;
    return int'(c);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint yy;
    for (int t = 0; t < 6000; t++) begin
      if (t < 2000)      yy = longint'($signed($urandom_range(0, 20 * 4096))) - 10 * 4096;
      else if (t < 4000) yy = longint'($signed({$urandom, $urandom})) >>> 24;
      else               yy = longint'(int'($urandom_range(0, 24)) - 12) * 4096 + longint'($urandom_range(0, 2)) - 1;
      y = 40'(yy);
      #1;
      checks += 2;
      if (int'(c2) != expect_code(yy, 2)) begin
        failures++;
        $display("M=2 y=%0d code=%0d expected %0d", yy, c2, expect_code(yy, 2));
      end
      if (int'(c3) != expect_code(yy, 3)) begin
        failures++;
        $display("M=3 y=%0d code=%0d expected %0d", yy, c3, expect_code(yy, 3));
      end
      if ((yy >>> 12) >= 8)  sat_hi++;
      if ((yy >>> 12) < -8)  sat_lo++;
    end
    checks++;
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("saturation not exercised: hi=%0d lo=%0d", sat_hi, sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
