// tb_cmult -- checks the three constant gains of the design (x(-1), x4,
// x2) against integer arithmetic, including saturation of -2**13 * -1,
// and the one-clock latency of data and valid.
module tb_cmult;
  logic clk = 0, rst = 1, vin = 0;
  logic signed [13:0] d14 = '0;
  logic signed [15:0] d16 = '0;
  logic v_n, v_4, v_2;
  logic signed [13:0] o_n;
  logic signed [17:0] o_4;
  logic signed [16:0] o_2;
  int checks = 0, failures = 0, sats = 0;

  cmult #(.IN_W(14), .OUT_W(14), .GAIN(-1)) dut_n (.clk, .rst, .in_valid(vin), .in_data(d14), .out_valid(v_n), .out_data(o_n));
  cmult #(.IN_W(16), .OUT_W(18), .GAIN(4))  dut_4 (.clk, .rst, .in_valid(vin), .in_data(d16), .out_valid(v_4), .out_data(o_4));
  cmult #(.IN_W(16), .OUT_W(17), .GAIN(2))  dut_2 (.clk, .rst, .in_valid(vin), .in_data(d16), .out_valid(v_2), .out_data(o_2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    longint en, e4, e2;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      vin = $urandom_range(1, 0);
      d14 = (n % 50 == 0) ? -14'sd8192 : 14'($urandom);
      d16 = (n % 37 == 0) ? -16'sd32768 : 16'($urandom);
      en = -longint'(d14);
      if (en > 8191) begin en = 8191; sats++; end
      e4 = 4 * longint'(d16);
      e2 = 2 * longint'(d16);
      @(posedge clk); #1;
      check("x(-1)", o_n, en);
      check("x4", o_4, e4);
      check("x2", o_2, e2);
      check("valid", v_n && v_4 && v_2, vin);
      check("valid0", v_n || v_4 || v_2, vin);
    end
    check("saturation seen", sats > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
