// tb_daq_rate: peak-rate workload on daq_top at its default parameters.
// All eight channels receive one 26-sample (650 ns) detector pulse every
// 100 us, the maximum input rate of 10 kHz per channel, for 10 ms while the
// USB side reads continuously. Every packet is checked word by word against
// the reference model of daq_env; each must carry 25 samples, and no ring
// buffer or multi-event buffer may overflow.
`timescale 1ns / 1ps
module tb_daq_rate;
  daq_env #(.FULL(1'b1), .RATE(1'b1)) env ();
  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
