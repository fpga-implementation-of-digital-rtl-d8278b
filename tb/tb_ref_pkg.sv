// tb_ref_pkg -- reference arithmetic shared by the testbenches.
//
//  * ref_fir_coef(): the low-pass coefficients recomputed from the filter
//    recipe (Kaiser-windowed sinc, 65 taps, cutoff 12.5 MHz at 92.16 MHz,
//    beta 0.1102*(140-8.7), unity DC gain, 30 fraction bits), written
//    apart from the RTL's generator so the two can be compared.
//  * ref_sine(): round(32767*sin(2*pi*k/1024)).
//  * duc_model: a clock-by-clock model of the up converter's output,
//    following the timing equation in the duc header. It uses the RTL's
//    tables (checked separately by tb_fir_lowpass and tb_dds) so that it can
//    be bit exact.
package tb_ref_pkg;

  function automatic real ref_i0(input real x);
    real term = 1.0, total = 1.0;
    int k = 1;
    while (term > 1e-21 * total) begin
      term  = term * (x * x / 4.0) / real'(k * k);
      total = total + term;
      k++;
    end
    return total;
  endfunction

  function automatic longint ref_round(input real x);
    return (x < 0.0) ? -longint'($floor(0.5 - x)) : longint'($floor(x + 0.5));
  endfunction

  function automatic void ref_fir_coef(output longint c [65]);
    real w [65];
    real s = 0.0;
    real pi = 2.0 * $asin(1.0);
    real beta = 0.1102 * 131.3;
    real fc = 12.5 / 92.16;
    for (int n = 0; n < 65; n++) begin
      real t = n - 32.0;
      real u = t / 32.0;
      real sinc = (n == 32) ? 2.0 * fc : $sin(2.0 * pi * fc * t) / (pi * t);
      w[n] = sinc * ref_i0(beta * $sqrt(1.0 - u * u)) / ref_i0(beta);
      s += w[n];
    end
    for (int n = 0; n < 65; n++) c[n] = ref_round(w[n] * 1073741824.0 / s);
  endfunction

  function automatic longint ref_sine(input int k);
    real pi = 2.0 * $asin(1.0);
    return ref_round(32767.0 * $sin(pi * k / 512.0));
  endfunction

  function automatic longint ref_sat(input longint x, input int w);
    longint hi = (longint'(1) <<< (w - 1)) - 1;
    return (x > hi) ? hi : (x < -hi - 1) ? -hi - 1 : x;
  endfunction

  // Up converter output model. Call step() once per clock edge, from the
  // first edge out of reset, with the inputs sampled at that edge; dac()
  // then gives the expected dac_out after that edge.
  class duc_model;
    localparam int HN = 256;          // history depth (power of two)
    longint h [65];
    longint lut [1024];
    longint ui [HN], uq [HN];         // zero-stuffed, cast inputs by edge
    longint cs [HN], sn [HN];         // table values for the phase before edge e
    longint fi [HN], fq [HN];         // filter outputs F(e)
    longint acc, inc_q;
    int e;                            // index of the latest edge
    int dac_sat;                      // how often the DAC word saturated

    function new();
      updown_pkg::fir_coef_array_t hc = updown_pkg::fir_coefs();
      updown_pkg::dds_lut_t lc = updown_pkg::dds_sine();
      foreach (h[k]) h[k] = longint'(hc[k]);
      foreach (lut[k]) lut[k] = longint'(lc[k]);
      foreach (ui[k]) begin ui[k] = 0; uq[k] = 0; cs[k] = 0; sn[k] = 0; fi[k] = 0; fq[k] = 0; end
      acc = 0; inc_q = 0; e = -1; dac_sat = 0;
    endfunction

    function automatic longint at(ref longint a [HN], input int idx);
      return (idx < 0) ? 0 : a[idx % HN];
    endfunction

    function automatic longint fir(ref longint u [HN], input int t);
      longint s = 0;
      for (int k = 0; k < 65; k++) s += h[k] * at(u, t - k);
      return ref_sat((s + (longint'(1) <<< 29)) >>> 30, 16);
    endfunction

    function void step(bit valid, longint i, longint q, bit we, longint inc);
      longint inc_use = we ? inc : inc_q;
      int a;
      e++;
      ui[e % HN] = valid ? i * 4 : 0;
      uq[e % HN] = valid ? q * 4 : 0;
      a = int'((acc >> 20) & 1023);
      sn[e % HN] = lut[a];
      cs[e % HN] = lut[(a + 256) % 1024];
      acc = (acc + inc_use) & ((longint'(1) << 30) - 1);
      inc_q = inc_use;
      fi[e % HN] = fir(ui, e);
      fq[e % HN] = fir(uq, e);
    endfunction

    function longint dac();
      longint pi_, pq_, comb, r;
      pi_ = 4 * at(fi, e - 9) * 2 * at(cs, e - 6);
      pq_ = 4 * at(fq, e - 9) * 2 * at(sn, e - 6);
      comb = pi_ - pq_;
      r = (comb + (longint'(1) <<< 17)) >>> 18;
      if (r != ref_sat(r, 14)) dac_sat++;
      return ref_sat(r, 14);
    endfunction
  endclass

endpackage
