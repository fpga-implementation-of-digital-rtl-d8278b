// tb_pipe_mult -- checks the mixer multiplier: p three clocks after the
// operands equals their exact signed product, including extreme operands.
module tb_pipe_mult;
  logic clk = 0, rst = 1;
  logic signed [17:0] a = '0;
  logic signed [16:0] b = '0;
  logic signed [34:0] p;
  int checks = 0, failures = 0;
  longint hist [$];

  pipe_mult #(.A_W(18), .B_W(17)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      case (n % 100)
        0: begin a = -18'sd131072; b = -17'sd65536; end
        1: begin a = 18'sd131071;  b = -17'sd65536; end
        default: begin a = 18'($urandom); b = 17'($urandom); end
      endcase
      hist.push_back(longint'(a) * longint'(b));
      @(posedge clk); #1;
      if (hist.size() == 3) begin     // result of the operands 3 clocks ago
        checks++;
        if (p !== 35'(hist[0])) begin
          failures++;
          if (failures < 10) $display("n=%0d p=%0d exp=%0d", n, p, hist[0]);
        end
      end
      if (hist.size() == 3) void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
