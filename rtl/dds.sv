// dds -- direct digital synthesiser, the numerically controlled oscillator
// of the up converter.
//
// A PHASE_W-bit phase accumulator advances by a programmable increment on
// every clock; its top LUT_AW bits address a sine table, and the same table
// read a quarter turn later gives the cosine. Output frequency is
// f = inc / 2**PHASE_W * f_clk; the increment 268435456 (2**28) with the
// 30-bit accumulator gives f_clk/4 = 23.04 MHz, the IF of this design.
//
// Interface (as the source's oscillator block): `data` is the phase
// increment and `we` writes it; the up converter holds `we` high with a
// constant on `data`. An increment written at a clock edge is already used
// at that edge. Accumulator width, table size and output width are this
// design's choices.
//
// Timing: after clock edge e (counted from the first edge out of reset)
// sin = round(A*sin(2*pi*phase(e)/2**PHASE_W)) with phase(e) the
// accumulator value before that edge, truncated to LUT_AW bits; A = 2**(OUT_W-1)-1.
// Latency from a phase to its sample is one clock.
module dds
  import updown_pkg::*;
#(
  parameter int PHASE_W = DDS_PHASE_W,
  parameter int LUT_AW  = DDS_LUT_AW
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        we,
  input  logic [PHASE_W-1:0]          data,
  output logic signed [DDS_OUT_W-1:0] sin_out,
  output logic signed [DDS_OUT_W-1:0] cos_out
);

  localparam dds_lut_t LUT = dds_sine();
  localparam logic [LUT_AW-1:0] QUARTER = LUT_AW'(2**(LUT_AW-2));

  logic [PHASE_W-1:0] inc_q;
  logic [PHASE_W-1:0] inc_use;
  logic [PHASE_W-1:0] phase;
  logic [LUT_AW-1:0]  addr;

  assign inc_use = we ? data : inc_q;
  assign addr    = phase[PHASE_W-1 -: LUT_AW];

  always_ff @(posedge clk) begin
    if (rst) begin
      inc_q   <= '0;
      phase   <= '0;
      sin_out <= '0;
      cos_out <= '0;
    end else begin
      inc_q   <= inc_use;
      phase   <= phase + inc_use;
      sin_out <= LUT[addr];
      cos_out <= LUT[addr + QUARTER];
    end
  end

endmodule
