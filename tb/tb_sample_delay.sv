// tb_sample_delay -- checks the one-sample delay: after each clock the
// output equals the input of the previous clock.
module tb_sample_delay;
  localparam int W = 14;
  logic clk = 0, rst = 1;
  logic signed [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;

  sample_delay #(.W(W), .DEPTH(1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] prev;
    repeat (3) @(negedge clk);
    rst = 0;
    prev = '0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_data = W'($urandom);
      checks++;
      if (out_data !== prev) begin   // before the edge: last clock's input
        failures++;
        if (failures < 10) $display("n=%0d out=%0d exp=%0d", n, out_data, prev);
      end
      @(posedge clk); #1;
      checks++;
      if (out_data !== in_data) failures++;
      prev = in_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
