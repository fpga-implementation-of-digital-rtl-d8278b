// cmult -- multiply by a constant, with saturation.
//
// Used for the fixed gains of the converters: x4 after each up-converter
// filter (restoring the amplitude lost to zero-stuffing by 4), x2 on each
// oscillator output, and x(-1), the inverting stage on each down-converter
// branch. The gains are the source's; the output width, saturation and the
// single output register are this design's. Saturation matters for x(-1):
// the most negative input has no positive twin and becomes the largest
// positive value.
//
// Timing: one clock; out_valid is in_valid delayed with the data.
module cmult #(
  parameter int IN_W  = 14,
  parameter int OUT_W = 14,
  parameter int GAIN  = -1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int PW = IN_W + 34;
  localparam logic signed [PW-1:0] OMAX = (PW'(1) <<< (OUT_W - 1)) - 1;
  localparam logic signed [PW-1:0] OMIN = -(PW'(1) <<< (OUT_W - 1));

  logic signed [PW-1:0] p;
  assign p = PW'(in_data) * PW'(GAIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (p > OMAX)      out_data <= OMAX[OUT_W-1:0];
      else if (p < OMIN) out_data <= OMIN[OUT_W-1:0];
      else               out_data <= p[OUT_W-1:0];
    end
  end

endmodule
