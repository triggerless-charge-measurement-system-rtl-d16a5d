// tb_calibration_test: self-checking test of the test-pulse source.
// With a short period, checks over several periods that each pulse is the
// 26-sample triangle (computed here from its formula) peaking at 714, that
// pulses repeat exactly every PERIOD clocks, that the output is 0 between
// pulses and while disabled.
module tb_calibration_test;
  import daq_pkg::*;
  localparam int unsigned PERIOD = 100, WIDTH = 26, AMPL = 714;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [ADC_W-1:0] sample;
  logic pulse_start;
  always #5 clk = ~clk;

  calibration_test #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .enable, .sample, .pulse_start);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int expect_at(int k);
    int h = WIDTH / 2;
    int d = (k > h) ? k - h : h - k;
    return (k < WIDTH) ? AMPL * (h - d) / h : 0;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phase, npulse, peak, last_start, cyc;
    phase = -1; npulse = 0; peak = 0; last_start = -1; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(posedge clk);
    check(sample == 0 && !pulse_start, "quiet while disabled");
    enable <= 1;
    repeat (5 * PERIOD - 10) begin
      @(posedge clk); #1;
      cyc++;
      if (pulse_start) begin
        if (last_start >= 0) check(cyc - last_start == PERIOD, $sformatf("period %0d", cyc - last_start));
        last_start = cyc; phase = 0; npulse++;
      end
      if (phase >= 0) begin
        check(int'(sample) == expect_at(phase), $sformatf("sample %0d = %0d exp %0d", phase, sample, expect_at(phase)));
        if (int'(sample) > peak) peak = int'(sample);
        phase++;
      end
    end
    check(npulse == 5, $sformatf("%0d pulses", npulse));
    check(peak == AMPL, $sformatf("peak %0d", peak));
    enable <= 0;
    @(posedge clk); @(posedge clk); #1;
    check(sample == 0, "quiet after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
