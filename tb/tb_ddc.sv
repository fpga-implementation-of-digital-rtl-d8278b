// tb_ddc -- checks the mixer-less down converter.
// Random baseband I(t), Q(t) are modulated onto an fs/4 carrier,
// x(t) = I(t)cos(pi*n/2) - Q(t)sin(pi*n/2), with the carrier index n = t+3
// so that the decimators (phase 0) keep the samples with n = 4k+2. The
// converter must then output I(t) and Q(t-1) exactly, two clocks after
// x(t), with the strobe on every 4th clock. Samples of -8192 are injected
// at kept positions to check that the inversion saturates to +8191.
module tb_ddc;
  logic clk = 0, rst = 1;
  logic signed [13:0] adc_data = '0;
  logic out_valid;
  logic signed [13:0] i_out, q_out;
  int checks = 0, failures = 0, strobes = 0, sats = 0;
  longint xs [$];

  ddc dut (.*);

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
    longint bi, bq, x, ei, eq;
    int n;
    bit ev;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 8000; t++) begin
      if (t > 0) @(negedge clk);
      bi = longint'($urandom_range(16382, 0)) - 8191;
      bq = longint'($urandom_range(16382, 0)) - 8191;
      n = t + 3;
      case (n % 4)
        0: x = bi;
        1: x = -bq;
        2: x = -bi;
        default: x = bq;
      endcase
      if ((n % 4 == 2 || n % 4 == 1) && $urandom_range(20, 0) == 0) x = -8192;
      adc_data = 14'(x);
      xs.push_front(x);
      @(posedge clk); #1;
      // after edge t: valid when (t-1) % 4 == 0, i = -x(t-2), q = -x(t-3)
      ev = ((t - 1) % 4 == 0);
      ei = (t >= 2) ? -xs[2] : 0;
      eq = (t >= 3) ? -xs[3] : 0;
      if (ei > 8191) ei = 8191;
      if (eq > 8191) eq = 8191;
      check($sformatf("t=%0d valid=%0b", t, out_valid), out_valid == ev);
      if (ev) begin
        strobes++;
        if (t >= 2 && (xs[2] == -8192 || xs[3] == -8192)) sats++;
        check($sformatf("t=%0d i=%0d exp %0d", t, i_out, ei), longint'(i_out) == ei);
        check($sformatf("t=%0d q=%0d exp %0d", t, q_out, eq), longint'(q_out) == eq);
      end
      if (xs.size() > 8) void'(xs.pop_back());
    end
    check($sformatf("strobe count %0d", strobes), strobes == 2000);
    check("inversion saturation exercised", sats > 0);
    $display("saturated inversions: %0d", sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
