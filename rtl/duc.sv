// duc -- complex digital up converter.
//
// Takes baseband I and Q at 23.04 Msps and produces a real IF signal at
// 92.16 Msps centred on the NCO frequency (23.04 MHz by default):
//
//   I -> up x4 -> cast -> FIR -> x4 --\
//                                     (x) cos*2 --\
//                       NCO (DDS) -- x2                (a - b) -> DAC word
//                                     (x) sin*2 --/
//   Q -> up x4 -> cast -> FIR -> x4 --/
//
// i.e. dac = I'*cos(w0 n) - Q'*sin(w0 n), where I', Q' are the interpolated
// baseband streams. The chain of blocks, the x4 and x2 gains, the
// three-clock multipliers and the sign of the combiner are the source's.
// Word widths are this design's: the 14-bit input is cast to 16 bits by
// appending two fraction bits, the filter keeps 16 bits, x4 gives 18 bits,
// the oscillator's 16 bits become 17 after x2, the mixers produce 35 bits
// and the combiner 36. The DAC word is the combiner output rounded by 2**18
// and saturated to 14 bits, so that a full-scale input on one branch gives
// a full-scale DAC swing.
//
// Interface: in_valid strobes I/Q every 4th clock; nco_we/nco_inc program
// the oscillator increment (the top holds nco_we high with a constant).
// Timing, counting clock edges e from the first edge out of reset:
//   dac after e = sat(round((4*F_I(e-9)*2*C(e-6) - 4*F_Q(e-9)*2*S(e-6)) / 2**18))
// where F(t) is the filter output for the zero-stuffed stream sampled at
// edge t and C(e), S(e) are the cosine/sine table values for the phase
// before edge e. Input-to-DAC latency is 10 clocks.
module duc
  import updown_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  input  logic signed [BB_W-1:0]        i_in,
  input  logic signed [BB_W-1:0]        q_in,
  input  logic                          nco_we,
  input  logic [DDS_PHASE_W-1:0]        nco_inc,
  output logic signed [DAC_W-1:0]       dac_out
);

  localparam int CAST_W = BB_W + 2;       // two extra fraction bits
  localparam int FIR_W  = 16;
  localparam int GF_W   = FIR_W + 2;      // after x4
  localparam int NCO2_W = DDS_OUT_W + 1;  // after x2
  localparam int MIX_W  = GF_W + NCO2_W;
  localparam int DAC_SHIFT = 18;

  // ---- interpolation and filtering ------------------------------------------
  logic signed [BB_W-1:0]   i_up, q_up;
  logic signed [FIR_W-1:0]  i_fir, q_fir;
  logic signed [GF_W-1:0]   i_g, q_g;

  upsampler #(.W(BB_W), .FACTOR(UP_FACTOR)) u_up_i (
    .clk, .rst, .in_valid, .in_data(i_in), .out_data(i_up));
  upsampler #(.W(BB_W), .FACTOR(UP_FACTOR)) u_up_q (
    .clk, .rst, .in_valid, .in_data(q_in), .out_data(q_up));

  fir_lowpass #(.IN_W(CAST_W), .OUT_W(FIR_W)) u_fir_i (
    .clk, .rst, .x({i_up, 2'b00}), .y(i_fir));
  fir_lowpass #(.IN_W(CAST_W), .OUT_W(FIR_W)) u_fir_q (
    .clk, .rst, .x({q_up, 2'b00}), .y(q_fir));

  cmult #(.IN_W(FIR_W), .OUT_W(GF_W), .GAIN(4)) u_g4_i (
    .clk, .rst, .in_valid(1'b1), .in_data(i_fir), .out_valid(), .out_data(i_g));
  cmult #(.IN_W(FIR_W), .OUT_W(GF_W), .GAIN(4)) u_g4_q (
    .clk, .rst, .in_valid(1'b1), .in_data(q_fir), .out_valid(), .out_data(q_g));

  // ---- oscillator ---------------------------------------------------------------
  logic signed [DDS_OUT_W-1:0] nco_sin, nco_cos;
  logic signed [NCO2_W-1:0]    sin2, cos2;

  dds u_nco (
    .clk, .rst, .we(nco_we), .data(nco_inc), .sin_out(nco_sin), .cos_out(nco_cos));

  cmult #(.IN_W(DDS_OUT_W), .OUT_W(NCO2_W), .GAIN(2)) u_g2_cos (
    .clk, .rst, .in_valid(1'b1), .in_data(nco_cos), .out_valid(), .out_data(cos2));
  cmult #(.IN_W(DDS_OUT_W), .OUT_W(NCO2_W), .GAIN(2)) u_g2_sin (
    .clk, .rst, .in_valid(1'b1), .in_data(nco_sin), .out_valid(), .out_data(sin2));

  // ---- mixing and combining ---------------------------------------------------
  logic signed [MIX_W-1:0] mix_i, mix_q;
  logic signed [MIX_W:0]   comb;

  pipe_mult #(.A_W(GF_W), .B_W(NCO2_W)) u_mix_i (.clk, .rst, .a(i_g), .b(cos2), .p(mix_i));
  pipe_mult #(.A_W(GF_W), .B_W(NCO2_W)) u_mix_q (.clk, .rst, .a(q_g), .b(sin2), .p(mix_q));

  addsub #(.W(MIX_W)) u_comb (.clk, .rst, .a(mix_i), .b(mix_q), .s(comb));

  // ---- DAC word: round and saturate -----------------------------------------
  localparam int CW = MIX_W + 1;
  localparam logic signed [CW-1:0] DMAX = (CW'(1) <<< (DAC_W - 1)) - 1;
  localparam logic signed [CW-1:0] DMIN = -(CW'(1) <<< (DAC_W - 1));
  logic signed [CW-1:0] comb_rnd;

  assign comb_rnd = (comb + (CW'(1) <<< (DAC_SHIFT - 1))) >>> DAC_SHIFT;

  always_ff @(posedge clk) begin
    if (rst)                  dac_out <= '0;
    else if (comb_rnd > DMAX) dac_out <= DMAX[DAC_W-1:0];
    else if (comb_rnd < DMIN) dac_out <= DMIN[DAC_W-1:0];
    else                      dac_out <= comb_rnd[DAC_W-1:0];
  end

endmodule
