// tb_downsampler -- checks decimation by 4: out_valid once every 4 clocks,
// one clock after the counter phase, holding the sample present at that
// clock; all other samples dropped. Runs PHASE = 2.
module tb_downsampler;
  localparam int W = 14;
  localparam int PHASE = 2;
  logic clk = 0, rst = 1;
  logic signed [W-1:0] in_data = '0, out_data;
  logic out_valid;
  int checks = 0, failures = 0, strobes = 0;

  downsampler #(.W(W), .FACTOR(4), .PHASE(PHASE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] held;
    bit keep;
    repeat (3) @(negedge clk);
    rst = 0;
    held = '0;
    // clock n (n = 0 is the first edge out of reset) keeps its sample when n % 4 == PHASE
    for (int n = 0; n < 4000; n++) begin
      if (n > 0) @(negedge clk);
      in_data = W'($urandom);
      keep = (n % 4 == PHASE);
      if (keep) held = in_data;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== keep || out_data !== held) begin
        failures++;
        if (failures < 10) $display("n=%0d v=%0b out=%0d exp v=%0b %0d", n, out_valid, out_data, keep, held);
      end
      if (out_valid) strobes++;
    end
    checks++;
    if (strobes != 1000) begin failures++; $display("strobes %0d", strobes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
