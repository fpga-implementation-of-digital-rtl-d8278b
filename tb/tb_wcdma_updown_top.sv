// tb_wcdma_updown_top -- end-to-end test of the loop ADC -> down converter
// -> up converter -> DAC at the design's default parameters.
//
// The testbench plays the signal generator: it builds baseband I/Q from a
// few tones below 2.5 MHz, modulates them onto the 23.04 MHz (fs/4) IF at
// 92.16 Msps, and feeds the samples in as adc_data. It then checks
//   * bb_i/bb_q/bb_valid: I(t) and Q(t-1) exactly, one pair per 4 clocks;
//   * dac_data on every clock, bit for bit, against tb_ref_pkg's model of
//     the up converter driven with the observed baseband samples;
//   * that the regenerated IF has the power of the input IF (within 2 dB);
// and makes each mechanism of the design happen: decimation, saturation of
// the inverting stage (a -8192 sample at a kept position), interpolation,
// mixing, and saturation of the DAC word (a full-scale square wave on I,
// whose filtered overshoot exceeds full scale). Each must occur at least
// once.
module tb_wcdma_updown_top;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic signed [13:0] adc_data = '0;
  logic signed [13:0] bb_i, bb_q, dac_data;
  logic bb_valid;
  int checks = 0, failures = 0;
  int n_strobes = 0, n_inv_sat = 0, n_mixed = 0;
  longint xs [$];

  wcdma_updown_top dut (.*);

  always #5 clk = ~clk;

  localparam int T_END = 24000;

  initial begin
    repeat (T_END + 5000) @(posedge clk);
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

  initial begin
    duc_model m;
    real pi, p_in, p_out;
    longint bi, bq, x, ei, eq, ed;
    int n;
    bit ev;
    m = new();
    pi = 2.0 * $asin(1.0);
    p_in = 0.0; p_out = 0.0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < T_END; t++) begin
      if (t > 0) @(negedge clk);
      // baseband at the clock rate
      if (t >= 16000 && t < 20000) begin
        bi = ((t / 64) % 2) ? 8191 : -8191;          // full-scale square wave
        bq = 0;
      end else begin
        bi = ref_round(3000.0 * $cos(2.0 * pi * 0.9e6 * t / 92.16e6)
                     + 2000.0 * $sin(2.0 * pi * 2.1e6 * t / 92.16e6));
        bq = ref_round(2500.0 * $sin(2.0 * pi * 1.3e6 * t / 92.16e6)
                     - 1800.0 * $cos(2.0 * pi * 0.4e6 * t / 92.16e6));
      end
      n = t + 3;                                      // carrier index
      case (n % 4)
        0: x = bi;
        1: x = -bq;
        2: x = -bi;
        default: x = bq;
      endcase
      if (t >= 20000 && n % 4 == 2 && $urandom_range(10, 0) == 0) x = -8192;
      adc_data = 14'(x);
      xs.push_front(x);
      // up converter inputs as sampled at this edge
      m.step(bb_valid, longint'(bb_i), longint'(bb_q), 1'b1, 268435456);
      @(posedge clk); #1;

      ev = ((t - 1) % 4 == 0);
      ei = (t >= 2) ? -xs[2] : 0;
      eq = (t >= 3) ? -xs[3] : 0;
      if (ei > 8191) ei = 8191;
      if (eq > 8191) eq = 8191;
      check($sformatf("t=%0d bb_valid=%0b", t, bb_valid), bb_valid == ev);
      if (ev) begin
        n_strobes++;
        if (t >= 2 && xs[2] == -8192) n_inv_sat++;
        check($sformatf("t=%0d bb_i=%0d exp %0d", t, bb_i, ei), longint'(bb_i) == ei);
        check($sformatf("t=%0d bb_q=%0d exp %0d", t, bb_q, eq), longint'(bb_q) == eq);
      end
      ed = m.dac();
      check($sformatf("t=%0d dac=%0d exp %0d", t, dac_data, ed), longint'(dac_data) == ed);
      if (dac_data != 0) n_mixed++;
      if (t >= 2000 && t < 16000) begin
        p_in  += real'(x * x);
        p_out += real'(longint'(dac_data) * longint'(dac_data));
      end
      if (xs.size() > 8) void'(xs.pop_back());
    end
    $display("IF power in/out: %f dB", 10.0 * $log10(p_out / p_in));
    check("IF power preserved", 10.0 * $log10(p_out / p_in) < 2.0 && 10.0 * $log10(p_out / p_in) > -2.0);
    $display("decimated samples %0d, inverter saturations %0d, mixed outputs %0d, DAC saturations %0d",
             n_strobes, n_inv_sat, n_mixed, m.dac_sat);
    check("decimation happened", n_strobes == T_END / 4);
    check("inverter saturation happened", n_inv_sat > 0);
    check("mixing happened", n_mixed > T_END / 2);
    check("DAC saturation happened", m.dac_sat > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
