// tb_wcdma_loop -- runs a WCDMA-like signal through the converter loop at
// default parameters and checks its spectra.
//
// Stimulus: random QPSK chips at 3.84 Mcps (24 clocks per chip at
// 92.16 MHz), pulse-shaped with a root-raised-cosine filter of roll-off 0.22
// spanning +-6 chips, scaled to about a third of full scale, and modulated
// onto the 23.04 MHz (fs/4) IF as adc_data.
// Checks:
//   * every baseband sample and every DAC sample exactly (as the
//     end-to-end test does, with tb_ref_pkg's up converter model);
//   * the 23.04 Msps baseband out of the down converter keeps at least 99 %
//     of its power within +-2.5 MHz;
//   * the regenerated IF keeps its power within 23.04 +- 2.5 MHz and puts
//     at least 45 dB less in everything beyond +-5 MHz of the carrier
//     (interpolation images and quantisation noise included).
// Spectra are Hann-windowed DFTs evaluated on a grid of bins.
module tb_wcdma_loop;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic signed [13:0] adc_data = '0;
  logic signed [13:0] bb_i, bb_q, dac_data;
  logic bb_valid;
  int checks = 0, failures = 0;

  wcdma_updown_top dut (.*);

  always #5 clk = ~clk;

  localparam int SPC   = 24;          // clocks per chip
  localparam int SPAN  = 6;           // RRC half-span in chips
  localparam int NT    = 2 * SPAN * SPC + 1;
  localparam int NCHIP = 800;
  localparam int T_END = NCHIP * SPC; // 19200 clocks
  localparam int NDAC  = 8192;        // DAC samples analysed
  localparam int NBB   = 2048;        // baseband pairs analysed

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

  real rrc [NT];
  real ci [NCHIP], cq [NCHIP];
  real dac_s [NDAC];
  real bbi_s [NBB], bbq_s [NBB];

  function automatic real rrc_at(real t, real a);
    real pi = 2.0 * $asin(1.0);
    if (t == 0.0) return 1.0 - a + 4.0 * a / pi;
    if ($sqrt((4.0 * a * t) ** 2) > 0.999999 && $sqrt((4.0 * a * t) ** 2) < 1.000001)
      return a / $sqrt(2.0) * ((1.0 + 2.0 / pi) * $sin(pi / (4.0 * a)) + (1.0 - 2.0 / pi) * $cos(pi / (4.0 * a)));
    return ($sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a)))
           / (pi * t * (1.0 - (4.0 * a * t) ** 2));
  endfunction

  initial begin
    duc_model m;
    real pi, sc, vi, vq, p_in, p_out, p_ib, p_oob, w, re, im, f, fo;
    longint bi, bq, x, ei, eq, ed;
    longint xs [$];
    int n, c0, nd, nb, d;
    bit ev;

    m = new();
    pi = 2.0 * $asin(1.0);
    for (int k = 0; k < NT; k++) rrc[k] = rrc_at(real'(k - SPAN * SPC) / SPC, 0.22);
    for (int k = 0; k < NCHIP; k++) begin
      ci[k] = $urandom_range(1, 0) ? 1.0 : -1.0;
      cq[k] = $urandom_range(1, 0) ? 1.0 : -1.0;
    end
    sc = 2500.0;
    nd = 0; nb = 0;

    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < T_END; t++) begin
      if (t > 0) @(negedge clk);
      vi = 0.0; vq = 0.0;
      c0 = t / SPC;
      for (int k = c0 - SPAN; k <= c0 + SPAN; k++) begin
        d = t - k * SPC + SPAN * SPC;
        if (k >= 0 && k < NCHIP && d >= 0 && d < NT) begin
          vi += ci[k] * rrc[d];
          vq += cq[k] * rrc[d];
        end
      end
      bi = ref_round(sc * vi);
      bq = ref_round(sc * vq);
      n = t + 3;
      case (n % 4)
        0: x = bi;
        1: x = -bq;
        2: x = -bi;
        default: x = bq;
      endcase
      adc_data = 14'(ref_sat(x, 14));
      xs.push_front(longint'(adc_data));
      m.step(bb_valid, longint'(bb_i), longint'(bb_q), 1'b1, 268435456);
      @(posedge clk); #1;

      ev = ((t - 1) % 4 == 0);
      ei = (t >= 2) ? ref_sat(-xs[2], 14) : 0;
      eq = (t >= 3) ? ref_sat(-xs[3], 14) : 0;
      check($sformatf("t=%0d bb_valid", t), bb_valid == ev);
      if (ev) begin
        check($sformatf("t=%0d bb_i=%0d exp %0d", t, bb_i, ei), longint'(bb_i) == ei);
        check($sformatf("t=%0d bb_q=%0d exp %0d", t, bb_q, eq), longint'(bb_q) == eq);
        if (t >= 4000 && nb < NBB) begin
          bbi_s[nb] = real'(bb_i); bbq_s[nb] = real'(bb_q); nb++;
        end
      end
      ed = m.dac();
      check($sformatf("t=%0d dac=%0d exp %0d", t, dac_data, ed), longint'(dac_data) == ed);
      if (t >= 4000 && nd < NDAC) begin dac_s[nd] = real'(dac_data); nd++; end
      if (xs.size() > 8) void'(xs.pop_back());
    end

    // ---- baseband spectrum (complex, 23.04 Msps) ----------------------------
    p_in = 0.0; p_out = 0.0;
    for (int j = -NBB / 2; j < NBB / 2; j += 2) begin
      f = real'(j) / NBB;                       // cycles per baseband sample
      re = 0.0; im = 0.0;
      for (int k = 0; k < NBB; k++) begin
        w = 0.5 - 0.5 * $cos(2.0 * pi * k / NBB);
        // (i + jq) * exp(-j 2 pi f k)
        re += w * (bbi_s[k] * $cos(2.0 * pi * f * k) + bbq_s[k] * $sin(2.0 * pi * f * k));
        im += w * (bbq_s[k] * $cos(2.0 * pi * f * k) - bbi_s[k] * $sin(2.0 * pi * f * k));
      end
      if ($sqrt((f * 23.04) ** 2) <= 2.5) p_in += re * re + im * im;
      else                                p_out += re * re + im * im;
    end
    $display("baseband: %f %% of power within +-2.5 MHz", 100.0 * p_in / (p_in + p_out));
    check("baseband bandwidth 2.5 MHz", p_in / (p_in + p_out) >= 0.99);

    // ---- IF spectrum (real, 92.16 Msps) ---------------------------------------
    p_ib = 0.0; p_oob = 0.0;
    for (int j = 0; j <= NDAC / 2; j += 4) begin
      f = real'(j) / NDAC * 92.16;              // MHz
      re = 0.0; im = 0.0;
      for (int k = 0; k < NDAC; k++) begin
        w = 0.5 - 0.5 * $cos(2.0 * pi * k / NDAC);
        re += w * dac_s[k] * $cos(2.0 * pi * j * k / NDAC);
        im -= w * dac_s[k] * $sin(2.0 * pi * j * k / NDAC);
      end
      fo = $sqrt((f - 23.04) ** 2);
      if (fo <= 2.5)     p_ib  += re * re + im * im;
      else if (fo > 5.0) p_oob += re * re + im * im;
    end
    $display("IF: power beyond +-5 MHz of the carrier is %f dB below the in-band power",
             10.0 * $log10(p_ib / p_oob));
    check("IF out-of-band power >= 45 dB down", 10.0 * $log10(p_ib / p_oob) >= 45.0);
    $display("DAC saturations %0d", m.dac_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
