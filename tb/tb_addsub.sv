// tb_addsub -- checks s = a - b, exact and one clock late, on random and
// extreme 35-bit operands.
module tb_addsub;
  logic clk = 0, rst = 1;
  logic signed [34:0] a = '0, b = '0;
  logic signed [35:0] s;
  int checks = 0, failures = 0;

  addsub #(.W(35)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 64 == 0) begin a = {1'b1, 34'd0}; b = {1'b0, {34{1'b1}}}; end
      else begin a = 35'({$urandom, $urandom}); b = 35'({$urandom, $urandom}); end
      e = longint'(a) - longint'(b);
      @(posedge clk); #1;
      checks++;
      if (s !== 36'(e)) begin
        failures++;
        if (failures < 10) $display("n=%0d s=%0d exp=%0d", n, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
