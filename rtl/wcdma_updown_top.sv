// wcdma_updown_top -- the converter pair as wired for the laboratory
// loop: ADC -> down converter -> up converter -> DAC, on one 92.16 MHz
// clock.
//
// A 23.04 MHz (fs/4) IF signal sampled at 92.16 Msps enters on adc_data.
// The down converter turns it into baseband I(4n) and Q(4n-1) at 23.04 Msps
// (brought out on bb_i/bb_q/bb_valid); the up converter interpolates these
// back to 92.16 Msps and remodulates them onto its oscillator, whose
// increment is the constant NCO_INC written on every clock (2**28: fs/4,
// 23.04 MHz). dac_data carries the resulting IF samples.
// The converters themselves are outside this module's scope: the ADC and
// DAC are board parts whose digital samples are the ports.
//
// Timing: bb_* follow adc_data by 2 clocks (see ddc); dac_data follows
// bb_* by 10 clocks (see duc).
module wcdma_updown_top
  import updown_pkg::*;
#(
  parameter logic [DDS_PHASE_W-1:0] NCO_INC  = NCO_INC_FS4,
  parameter int                     DS_PHASE = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic signed [BB_W-1:0]  bb_i,
  output logic signed [BB_W-1:0]  bb_q,
  output logic                    bb_valid,
  output logic signed [DAC_W-1:0] dac_data
);

  ddc #(.DS_PHASE(DS_PHASE)) u_ddc (
    .clk, .rst, .adc_data, .out_valid(bb_valid), .i_out(bb_i), .q_out(bb_q));

  duc u_duc (
    .clk, .rst, .in_valid(bb_valid), .i_in(bb_i), .q_in(bb_q),
    .nco_we(1'b1), .nco_inc(NCO_INC), .dac_out(dac_data));

endmodule
