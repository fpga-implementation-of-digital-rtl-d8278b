// tb_duc -- checks the up converter bit for bit against tb_ref_pkg's
// duc_model, on every clock, for:
//   * random full-range I/Q (which also drives the DAC word into saturation),
//   * a single in-phase impulse, whose response must peak 9 + 32 clocks
//     after it enters (1 for the interpolator, 3 for the filter, 1 for x4,
//     3 for the mixer, 1 for the combiner, then the filter's centre tap 32;
//     the carrier may move the peak by one clock),
//   * a run with the oscillator reprogrammed to other increments.
module tb_duc;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, nco_we = 0;
  logic signed [13:0] i_in = '0, q_in = '0;
  logic [29:0] nco_inc = '0;
  logic signed [13:0] dac_out;
  int checks = 0, failures = 0;

  duc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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
    duc_model m;
    longint e;
    int peak_t, reprogs;
    longint peak;
    m = new();
    peak_t = -1; peak = 0;
    reprogs = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 12000; t++) begin
      if (t > 0) @(negedge clk);
      in_valid = (t % 4 == 1);
      if (t < 400) begin
        // impulse on I at t = 41, oscillator at fs/4
        i_in = (t == 41) ? 14'sd8000 : '0;
        q_in = '0;
        nco_we = 1; nco_inc = 30'd268435456;
      end else if (t < 6000) begin
        i_in = 14'($urandom); q_in = 14'($urandom);
        nco_we = 1; nco_inc = 30'd268435456;
      end else begin
        i_in = 14'($urandom_range(4000, 0) - 2000);
        q_in = 14'($urandom_range(4000, 0) - 2000);
        nco_we = ($urandom_range(200, 0) == 0);
        nco_inc = 30'($urandom);
        if (nco_we) reprogs++;
      end
      m.step(in_valid, longint'(i_in), longint'(q_in), nco_we, longint'(nco_inc));
      @(posedge clk); #1;
      e = m.dac();
      check($sformatf("t=%0d dac=%0d exp=%0d", t, dac_out, e), longint'(dac_out) == e);
      if (t < 400 && (dac_out > peak || -dac_out > peak)) begin
        peak = (dac_out > 0) ? longint'(dac_out) : -longint'(dac_out);
        peak_t = t;
      end
    end
    check($sformatf("impulse response peaks %0d clocks after the input", peak_t - 41),
          peak_t - 41 >= 40 && peak_t - 41 <= 42);
    check("DAC saturation exercised", m.dac_sat > 0);
    check("oscillator reprogrammed", reprogs > 5);
    $display("impulse peak after %0d clocks, DAC saturations %0d, reprogrammings %0d", peak_t - 41, m.dac_sat, reprogs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
