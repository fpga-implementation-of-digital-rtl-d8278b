// updown_pkg -- shared constants, types and table generators of the WCDMA
// up/down converter.
//
// The whole design runs from one sample clock of 92.16 MHz; baseband I/Q
// samples run at a quarter of it, 23.04 Msps, and the IF carrier sits at
// 23.04 MHz, i.e. fs/4. Word widths are this design's choice (the source
// gives none): 14-bit converter samples, 16-bit oscillator outputs and
// 32-bit filter coefficients.
//
// Two tables are computed here at elaboration, so no data files are needed:
//  * fir_coef(): a 65-tap Kaiser-windowed sinc low-pass, cutoff 12.5 MHz
//    (midway between the 5 MHz passband and 20 MHz stopband edges),
//    beta = 0.1102*(140-8.7) for 140 dB, normalised to unity DC gain and
//    rounded to integers with sum ~ 2**FIR_COEF_FRAC.
//  * dds_sine(): round((2**(DDS_OUT_W-1)-1) * sin(2*pi*k/2**DDS_LUT_AW)).
package updown_pkg;

  // ---- sample rates and converter widths --------------------------------
  localparam int ADC_W = 14;   // ADC sample width
  localparam int DAC_W = 14;   // DAC sample width
  localparam int BB_W  = 14;   // baseband I/Q width (same as the ADC)
  localparam int UP_FACTOR   = 4;  // DUC interpolation factor
  localparam int DOWN_FACTOR = 4;  // DDC decimation factor

  // ---- NCO / DDS ------------------------------------------------------------
  localparam int DDS_PHASE_W = 30;          // phase accumulator width
  localparam int DDS_LUT_AW  = 10;          // look-up table address bits
  localparam int DDS_OUT_W   = 16;          // sine/cosine output width
  // Increment for fs/4 = 23.04 MHz: 2**28 / 2**30 = 1/4 of the clock.
  localparam logic [DDS_PHASE_W-1:0] NCO_INC_FS4 = 30'd268435456;

  // ---- FIR ------------------------------------------------------------------
  localparam int FIR_TAPS      = 65;
  localparam int FIR_COEF_W    = 32;
  localparam int FIR_COEF_FRAC = 30;
  localparam real FIR_FS_HZ    = 92.16e6;
  localparam real FIR_FC_HZ    = 12.5e6;
  localparam real FIR_BETA     = 0.1102 * (140.0 - 8.7);

  typedef logic signed [FIR_COEF_W-1:0] fir_coef_t;
  typedef fir_coef_t fir_coef_array_t [FIR_TAPS];

  localparam real PI = 3.14159265358979323846;

  // Zeroth-order modified Bessel function of the first kind (power series).
  function automatic real bessel_i0(input real x);
    real s, t;
    s = 1.0;
    t = 1.0;
    for (int k = 1; k < 60; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s = s + t;
    end
    return s;
  endfunction

  // Round half away from zero to an integer.
  function automatic longint round_real(input real x);
    if (x >= 0.0) return longint'($floor(x + 0.5));
    else          return -longint'($floor(-x + 0.5));
  endfunction

  function automatic fir_coef_array_t fir_coefs();
    real h [FIR_TAPS];
    real sum, m, k, r, fc;
    fir_coef_array_t c;
    fc  = FIR_FC_HZ / FIR_FS_HZ;
    m   = (FIR_TAPS - 1) / 2.0;
    sum = 0.0;
    for (int n = 0; n < FIR_TAPS; n++) begin
      k = n - m;
      r = 2.0 * n / (FIR_TAPS - 1) - 1.0;
      if (k == 0.0) h[n] = 2.0 * fc;
      else          h[n] = $sin(2.0 * PI * fc * k) / (PI * k);
      h[n] = h[n] * bessel_i0(FIR_BETA * $sqrt(1.0 - r * r)) / bessel_i0(FIR_BETA);
      sum  = sum + h[n];
    end
    for (int n = 0; n < FIR_TAPS; n++)
      c[n] = fir_coef_t'(round_real(h[n] / sum * (2.0 ** FIR_COEF_FRAC)));
    return c;
  endfunction

  typedef logic signed [DDS_OUT_W-1:0] dds_sample_t;
  typedef dds_sample_t dds_lut_t [2**DDS_LUT_AW];

  function automatic dds_lut_t dds_sine();
    dds_lut_t t;
    real amp;
    amp = 2.0 ** (DDS_OUT_W - 1) - 1.0;
    for (int k = 0; k < 2**DDS_LUT_AW; k++)
      t[k] = dds_sample_t'(round_real(amp * $sin(2.0 * PI * k / (2.0 ** DDS_LUT_AW))));
    return t;
  endfunction

  // Saturate a wide signed value to W bits (W <= 63).
  function automatic longint sat(input longint x, input int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

endpackage
