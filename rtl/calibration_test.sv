// calibration_test: internal test-pulse source used by the auto-test mode.
//
// A test pulse of fixed shape, peaking at 714 ADC counts (document), is held
// in a small ROM and played out on the ADC clock once every PERIOD samples
// while "enable" is high; between pulses the output is 0. The document gives
// the amplitude and the use (events of known amplitude injected in place of
// the ADC data, about 100,000 in 14 hours, i.e. one every 0.504 s or
// 20,160,000 samples at 40 MHz, the default PERIOD). It does not give the
// pulse shape: this design uses a triangle of WIDTH = 26 samples (650 ns at
// 40 MHz, the signal width quoted in the document),
//   shape[k] = AMPL * (H - |k - H|) / H,  H = WIDTH/2, k = 0..WIDTH-1,
// computed at elaboration. Its first sample is 0, so 25 samples are non-zero,
// which matches the 25-word payload of a packet.
//
// Timing: pulse_start is high on the clock whose sample is shape[0];
// sample is registered.
module calibration_test
  import daq_pkg::*;
#(
  parameter int unsigned PERIOD = 20_160_000,
  parameter int unsigned AMPL   = 714,
  parameter int unsigned WIDTH  = 26
) (
  input  logic             clk,         // ADC clock
  input  logic             rst_n,
  input  logic             enable,
  output logic [ADC_W-1:0] sample,
  output logic             pulse_start
);
  localparam int unsigned H  = WIDTH / 2;
  localparam int unsigned CW = $clog2(PERIOD + 1);

  logic [ADC_W-1:0] shape [WIDTH];
  for (genvar k = 0; k < WIDTH; k++) begin : g_rom
    localparam int unsigned D = (k > H) ? (k - H) : (H - k);
    assign shape[k] = ADC_W'(AMPL * (H - D) / H);
  end

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      sample      <= '0;
      pulse_start <= 1'b0;
    end else if (!enable) begin
      cnt         <= '0;
      sample      <= '0;
      pulse_start <= 1'b0;
    end else begin
      cnt         <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      sample      <= (cnt < CW'(WIDTH)) ? shape[cnt[$clog2(WIDTH)-1:0]] : '0;
      pulse_start <= (cnt == '0);
    end
  end

endmodule
