// downsampler -- decimate by FACTOR (4 in this design).
//
// A free-running modulo-FACTOR counter, cleared by reset, picks the input
// sample present when the counter equals PHASE; that sample is held on
// out_data and announced by a one-clock out_valid strobe. Every other
// sample is dropped. No filter precedes it: in the down converter the IF
// sits at exactly fs/4, so the kept samples are the baseband values
// themselves.
//
// Timing: one clock of latency (the source's z^-1): the sample at clock t
// with cnt == PHASE appears after clock t, i.e. on the next cycle.
// PHASE and the reset behaviour are this design's choices.
module downsampler #(
  parameter int W      = 14,
  parameter int FACTOR = 4,
  parameter int PHASE  = 0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_data
);

  localparam int CW = (FACTOR > 1) ? $clog2(FACTOR) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      cnt       <= (cnt == CW'(FACTOR - 1)) ? '0 : cnt + 1'b1;
      out_valid <= (cnt == CW'(PHASE));
      if (cnt == CW'(PHASE)) out_data <= in_data;
    end
  end

endmodule
