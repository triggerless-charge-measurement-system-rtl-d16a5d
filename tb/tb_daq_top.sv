// tb_daq_top: end-to-end test of the interface at reduced sizes (ring buffers
// of 512 samples, a 256-word multi-event buffer, empty events after 300
// quiet samples, a calibration pulse every 200 samples); see daq_env.
`timescale 1ns / 1ps
module tb_daq_top;
  daq_env #(.FULL(1'b0)) env ();
  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end
endmodule
