// tb_dds -- checks the oscillator.
//  1. Its sine table against round(32767*sin(2*pi*k/1024)) computed here.
//  2. With the fs/4 increment 2**28 written on every clock: the outputs cycle
//     sin = 0, 32767, 0, -32767 and cos = 32767, 0, -32767, 0 from the first
//     clock out of reset (period 4 clocks = 23.04 MHz at 92.16 MHz).
//  3. With random increments written at random times: each output equals
//     the table value at the top 10 bits of the 30-bit phase accumulated so
//     far, one clock late.
module tb_dds;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  logic [29:0] data = '0;
  logic signed [15:0] sin_out, cos_out;
  int checks = 0, failures = 0, writes = 0;

  dds dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    updown_pkg::dds_lut_t lc;
    longint acc, inc_q, inc_use, es, ec;
    int a;
    longint exp_s [4] = '{0, 32767, 0, -32767};
    longint exp_c [4] = '{32767, 0, -32767, 0};

    lc = updown_pkg::dds_sine();
    for (int k = 0; k < 1024; k++)
      check($sformatf("table %0d", k), longint'(lc[k]) == ref_sine(k));

    // fs/4 carrier, as in the up converter
    repeat (3) @(negedge clk);
    we = 1; data = 30'd268435456;
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      if (n > 0) @(negedge clk);
      @(posedge clk); #1;
      check($sformatf("fs/4 n=%0d sin=%0d cos=%0d", n, sin_out, cos_out),
            sin_out == exp_s[n % 4] && cos_out == exp_c[n % 4]);
    end

    // random reprogramming
    @(negedge clk);
    rst = 1; we = 0;
    @(negedge clk);
    rst = 0;
    acc = 0; inc_q = 0;
    for (int n = 0; n < 5000; n++) begin
      if (n > 0) @(negedge clk);
      we = ($urandom_range(15, 0) == 0);
      data = 30'($urandom);
      if (we) writes++;
      inc_use = we ? longint'(data) : inc_q;
      a  = int'(acc >> 20);
      es = ref_sine(a);
      ec = ref_sine((a + 256) % 1024);
      acc = (acc + inc_use) % (longint'(1) << 30);
      inc_q = inc_use;
      @(posedge clk); #1;
      check($sformatf("prog n=%0d sin=%0d/%0d cos=%0d/%0d", n, sin_out, es, cos_out, ec),
            sin_out == es && cos_out == ec);
    end
    check("increment written", writes > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
