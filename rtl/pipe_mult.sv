// pipe_mult -- the mixer: a full-precision signed multiplier with a
// three-clock pipeline (the source marks its multipliers z^-3).
//
// The operands are registered, then the product, then the product again,
// so with a(t), b(t) the operands sampled at clock edge t, p after edge
// t+2 = a(t)*b(t): three registers, as z^-3. The register placement is this design's; the latency is the
// source's.
module pipe_mult #(
  parameter int A_W = 18,
  parameter int B_W = 17
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic signed [A_W-1:0]       a,
  input  logic signed [B_W-1:0]       b,
  output logic signed [A_W+B_W-1:0]   p
);

  logic signed [A_W-1:0]     a_q;
  logic signed [B_W-1:0]     b_q;
  logic signed [A_W+B_W-1:0] p_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
      p_q <= '0;
      p   <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
      p_q <= (A_W+B_W)'(a_q) * (A_W+B_W)'(b_q);
      p   <= p_q;
    end
  end

endmodule
