// addsub -- the output combiner of the up converter: s = a - b.
//
// a is the in-phase mixer product I*cos, b the quadrature one Q*sin, so
// s = I*cos - Q*sin, the sign the source gives to the two adder inputs.
// The result is one bit wider than the operands, so it never wraps.
//
// Timing: one register, s after clock edge t = a(t) - b(t) for the operands
// sampled at edge t (this design's choice of latency).
module addsub #(
  parameter int W = 35
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W:0]   s
);

  always_ff @(posedge clk) begin
    if (rst) s <= '0;
    else     s <= (W+1)'(a) - (W+1)'(b);
  end

endmodule
