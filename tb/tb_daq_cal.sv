// tb_daq_cal: calibration workload on daq_top at its default parameters.
// Channel 0 runs in auto-test mode for two calibration periods (about 1 s of
// ADC time): three test pulses must come back as packets peaking at 714
// counts, spaced by exactly 20,160,000 samples (0.504 s), and match the
// reference model of daq_env word for word.
`timescale 1ns / 1ps
module tb_daq_cal;
  daq_env #(.FULL(1'b1), .CAL(1'b1)) env ();
  initial begin
    #1_200_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
