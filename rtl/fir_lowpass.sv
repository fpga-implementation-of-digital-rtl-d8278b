// fir_lowpass -- anti-imaging low-pass FIR of the up converter.
//
// Filters the zero-stuffed 92.16 Msps stream. The specification it is built
// to is the source's: passband edge 5 MHz, stopband edge 20 MHz, 0.1 dB
// passband ripple and 140 dB stopband attenuation. The coefficients and tap
// count are this design's: a 65-tap Kaiser-windowed sinc (beta 14.47, cutoff
// 12.5 MHz) from updown_pkg::fir_coefs(), 32-bit with 30 fraction bits and
// unity DC gain, which meets both figures after rounding.
//
// Structure: direct form. A tapped delay line, one registered product per
// tap, then a registered sum that is rounded (half up) by 2**FRAC and
// saturated to OUT_W bits. One sample in and one out on every clock.
//
// Timing: three registers (delay line, products, sum). With x(t) the input
// sampled at clock edge t, y after edge t+2 = sum_k h[k]*x(t-k).
module fir_lowpass
  import updown_pkg::*;
#(
  parameter int IN_W  = 16,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);

  localparam int N      = FIR_TAPS;
  localparam int FRAC   = FIR_COEF_FRAC;
  localparam int PROD_W = IN_W + FIR_COEF_W;
  localparam int ACC_W  = PROD_W + $clog2(N);
  localparam fir_coef_array_t H = fir_coefs();

  logic signed [IN_W-1:0]   taps [N];
  logic signed [PROD_W-1:0] prod [N];
  logic signed [ACC_W-1:0]  acc_sum;
  logic signed [ACC_W-1:0]  acc_rnd;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) begin
        taps[k] <= '0;
        prod[k] <= '0;
      end
    end else begin
      taps[0] <= x;
      for (int k = 1; k < N; k++) taps[k] <= taps[k-1];
      for (int k = 0; k < N; k++) prod[k] <= PROD_W'(taps[k]) * PROD_W'(H[k]);
    end
  end

  always_comb begin
    acc_sum = '0;
    for (int k = 0; k < N; k++) acc_sum = acc_sum + ACC_W'(prod[k]);
    acc_rnd = (acc_sum + (ACC_W'(1) <<< (FRAC - 1))) >>> FRAC;
  end

  localparam logic signed [ACC_W-1:0] YMAX = (ACC_W'(1) <<< (OUT_W - 1)) - 1;
  localparam logic signed [ACC_W-1:0] YMIN = -(ACC_W'(1) <<< (OUT_W - 1));

  always_ff @(posedge clk) begin
    if (rst)                 y <= '0;
    else if (acc_rnd > YMAX) y <= YMAX[OUT_W-1:0];
    else if (acc_rnd < YMIN) y <= YMIN[OUT_W-1:0];
    else                     y <= acc_rnd[OUT_W-1:0];
  end

endmodule
