// tb_upsampler -- self-checking test of the zero-stuffing interpolator.
// Random samples arrive every 4th clock; after each clock the output must be
// the sample strobed on that clock, or zero on the other three. Also checks
// that exactly one in four output slots can be non-zero.
module tb_upsampler;
  localparam int W = 14;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0, nonzero = 0;

  upsampler #(.W(W), .FACTOR(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] exp_v;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = (n % 4 == 0);
      in_data  = W'($urandom);
      exp_v    = in_valid ? in_data : '0;
      @(posedge clk); #1;
      checks++;
      if (out_data !== exp_v) begin
        failures++;
        if (failures < 10) $display("n=%0d out=%0d exp=%0d", n, out_data, exp_v);
      end
      if (out_data != 0) nonzero++;
    end
    checks++;
    if (nonzero > 1000 || nonzero < 990) begin
      failures++;
      $display("non-zero outputs %0d, expected ~1000", nonzero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
