// sample_delay -- delay a sample stream by DEPTH clocks (z^-DEPTH).
//
// In the down converter DEPTH = 1: the quadrature branch sees x(n-1) while
// the in-phase branch sees x(n), so that after decimation by 4 the two
// branches pick up the sin- and cos-modulated samples of the fs/4 carrier.
// A shift register, cleared by reset (this design's choice).
module sample_delay #(
  parameter int W     = 14,
  parameter int DEPTH = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] out_data
);

  logic signed [W-1:0] line [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++) line[k] <= '0;
    end else begin
      line[0] <= in_data;
      for (int k = 1; k < DEPTH; k++) line[k] <= line[k-1];
    end
  end

  assign out_data = line[DEPTH-1];

endmodule
