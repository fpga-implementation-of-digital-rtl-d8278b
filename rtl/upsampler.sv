// upsampler -- zero-stuffing interpolator by FACTOR (4 in this design).
//
// The baseband stream arrives at clk/FACTOR as a strobe (in_valid) with a
// sample; the output stream runs at the full clock rate. On the clock after a
// strobe the output carries the sample, and on the other FACTOR-1 clocks it
// carries zero, which is what up-sampling by 4 means in the source. The
// following low-pass FIR removes the spectral images this creates.
//
// Timing: one register, so out_data follows in_data by one clock. The
// strobe is expected exactly every FACTOR clocks (checked by an assertion);
// registering the output and resetting it to zero are this design's choices.
module upsampler #(
  parameter int W      = 14,
  parameter int FACTOR = 4
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] out_data
);

  always_ff @(posedge clk) begin
    if (rst)           out_data <= '0;
    else if (in_valid) out_data <= in_data;
    else               out_data <= '0;
  end

  // Input rate check: strobes are FACTOR clocks apart.
  int unsigned since_valid;
  always_ff @(posedge clk) begin
    if (rst)           since_valid <= 0;
    else if (in_valid) since_valid <= 1;
    else if (since_valid != 0 && since_valid < FACTOR) since_valid <= since_valid + 1;
  end

  a_rate : assert property (@(posedge clk) disable iff (rst)
                            in_valid && since_valid != 0 |-> since_valid == FACTOR)
    else $error("upsampler: input strobe not %0d clocks after the previous one", FACTOR);

endmodule
