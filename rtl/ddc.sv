// ddc -- mixer-less digital down converter for an IF at a quarter of the
// sample rate.
//
// With the carrier at fs/4, cos(pi*n/2) and sin(pi*n/2) only take the
// values 0, +1 and -1, so the IF samples x(n) = I(n)cos(pi*n/2) -
// Q(n)sin(pi*n/2) already are the baseband samples, with a sign, in turn:
// x(4k) = I, x(4k+1) = -Q, x(4k+2) = -I, x(4k+3) = Q. The converter
// therefore needs no mixer and no filter: it splits the ADC stream in two,
// delays one copy by one sample, decimates both by 4 and inverts both.
// When the in-phase branch keeps the samples with n = 4k+2 it outputs
// I(4k+2), and the quadrature branch, one sample behind, Q(4k+1).
// This structure, the z^-1 delay, the decimators and the x(-1) stages are
// the source's; the input register, DS_PHASE and the saturation of the
// inversion are this design's.
//
// Interface: adc_data every clock (92.16 Msps); i_out/q_out with a common
// out_valid strobe every 4th clock (23.04 Msps).
// Timing: with adc_data = x(t) at clock t and the decimators' counter at
// DS_PHASE on clock t+1, out_valid is high after clock t+2 with
// i_out = -x(t) and q_out = -x(t-1), each saturated to BB_W bits.
module ddc
  import updown_pkg::*;
#(
  parameter int DS_PHASE = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    out_valid,
  output logic signed [BB_W-1:0]  i_out,
  output logic signed [BB_W-1:0]  q_out
);

  logic signed [ADC_W-1:0] adc_q, adc_dly;
  logic signed [ADC_W-1:0] i_dec, q_dec;
  logic                    i_dec_v, q_dec_v, q_out_v;

  always_ff @(posedge clk) begin
    if (rst) adc_q <= '0;
    else     adc_q <= adc_data;
  end

  // In-phase branch: decimate, invert.
  downsampler #(.W(ADC_W), .FACTOR(DOWN_FACTOR), .PHASE(DS_PHASE)) u_ds_i (
    .clk, .rst, .in_data(adc_q), .out_valid(i_dec_v), .out_data(i_dec));

  cmult #(.IN_W(ADC_W), .OUT_W(BB_W), .GAIN(-1)) u_inv_i (
    .clk, .rst, .in_valid(i_dec_v), .in_data(i_dec), .out_valid(out_valid), .out_data(i_out));

  // Quadrature branch: delay one sample, decimate, invert.
  sample_delay #(.W(ADC_W), .DEPTH(1)) u_dly_q (
    .clk, .rst, .in_data(adc_q), .out_data(adc_dly));

  downsampler #(.W(ADC_W), .FACTOR(DOWN_FACTOR), .PHASE(DS_PHASE)) u_ds_q (
    .clk, .rst, .in_data(adc_dly), .out_valid(q_dec_v), .out_data(q_dec));

  cmult #(.IN_W(ADC_W), .OUT_W(BB_W), .GAIN(-1)) u_inv_q (
    .clk, .rst, .in_valid(q_dec_v), .in_data(q_dec), .out_valid(q_out_v), .out_data(q_out));

  // Both decimators count from the same reset, so the branches stay aligned.
  a_aligned : assert property (@(posedge clk) disable iff (rst) q_out_v == out_valid)
    else $error("ddc: I and Q branches out of step");

endmodule
