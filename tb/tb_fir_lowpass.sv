// tb_fir_lowpass -- checks the anti-imaging filter.
//  1. Its coefficients against an independent computation of the same
//     recipe (at most 1 LSB apart), their symmetry and unity DC gain.
//  2. The frequency response of those coefficients against the
//     specification: <= 0.1 dB ripple up to 5 MHz, >= 140 dB attenuation
//     from 20 MHz, sample rate 92.16 MHz.
//  3. The RTL output, bit for bit, against a direct convolution with
//     rounding and saturation, for an impulse, a full-scale step and random
//     data, and the 3-register latency.
module tb_fir_lowpass;
  import tb_ref_pkg::*;
  localparam int IN_W = 16, OUT_W = 16, N = 65;
  logic clk = 0, rst = 1;
  logic signed [IN_W-1:0] x = '0;
  logic signed [OUT_W-1:0] y;
  int checks = 0, failures = 0;

  fir_lowpass #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  longint h [N], r [N];
  longint xs [$];

  initial begin
    updown_pkg::fir_coef_array_t hc;
    real pi, pb_max, pb_min, sb_max, f, re, im, mag;
    longint sum, s;

    hc = updown_pkg::fir_coefs();
    foreach (h[k]) h[k] = longint'(hc[k]);
    ref_fir_coef(r);
    sum = 0;
    for (int k = 0; k < N; k++) begin
      check($sformatf("coef %0d: %0d vs %0d", k, h[k], r[k]), h[k] - r[k] <= 1 && r[k] - h[k] <= 1);
      check($sformatf("symmetry %0d", k), h[k] == h[N-1-k]);
      sum += h[k];
    end
    check($sformatf("DC gain %0d", sum), sum - 1073741824 <= N && 1073741824 - sum <= N);

    pi = 2.0 * $asin(1.0);
    pb_max = 0.0; pb_min = 1e9; sb_max = 0.0;
    for (int j = 0; j <= 4000; j++) begin
      f = 46.08e6 * j / 4000.0;
      if (f > 5.0e6 && f < 20.0e6) continue;
      re = 0.0; im = 0.0;
      for (int k = 0; k < N; k++) begin
        re += h[k] * $cos(2.0 * pi * f / 92.16e6 * k);
        im -= h[k] * $sin(2.0 * pi * f / 92.16e6 * k);
      end
      mag = $sqrt(re * re + im * im) / 1073741824.0;
      if (f <= 5.0e6) begin
        if (mag > pb_max) pb_max = mag;
        if (mag < pb_min) pb_min = mag;
      end else if (mag > sb_max) sb_max = mag;
    end
    $display("passband ripple %f dB, stopband attenuation %f dB",
             20.0 * $log10(pb_max / pb_min), -20.0 * $log10(sb_max));
    check("passband ripple <= 0.1 dB", 20.0 * $log10(pb_max / pb_min) <= 0.1);
    check("stopband attenuation >= 140 dB", -20.0 * $log10(sb_max) >= 140.0);

    // ---- bit-exact run -------------------------------------------------------
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n > 0) @(negedge clk);
      if (n == 10)                x = 16'sd20000;             // impulse
      else if (n >= 200 && n < 400) x = -16'sd32768;          // full-scale step
      else if (n >= 400 && n < 600) x = 16'sd32767;
      else if (n >= 600)          x = 16'($urandom);
      else                        x = '0;
      xs.push_front(longint'(x));
      @(posedge clk); #1;
      // three registers: y after this edge is the output for the input of 2 edges ago
      if (xs.size() > 2) begin
        s = 0;
        for (int k = 0; k < N; k++)
          if (2 + k < xs.size()) s += h[k] * xs[2 + k];
        s = ref_sat((s + (longint'(1) <<< 29)) >>> 30, OUT_W);
        check($sformatf("n=%0d y=%0d exp=%0d", n, y, s), longint'(y) == s);
      end
      if (xs.size() > N + 4) void'(xs.pop_back());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
