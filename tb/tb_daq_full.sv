// tb_daq_full: one complete operation of daq_top at its default parameters
// (8192-sample ring buffers, 8192-word multi-event buffer, 1 s maximum
// waiting time, calibration period of 0.504 s): configuration, a data run,
// an auto-test run, stop and read-out; see daq_env.
`timescale 1ns / 1ps
module tb_daq_full;
  daq_env #(.FULL(1'b1)) env ();
  initial begin
    #2_000_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
