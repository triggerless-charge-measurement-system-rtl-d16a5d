// config_control: configuration registers of the interface, including the
// discriminator threshold (Vth).
//
// Register writes arrive on the processing clock as (cfg_wr, cfg_addr,
// cfg_data); the 4-bit address follows the width printed on the configuration
// link of the firmware diagram and the 8-bit threshold the width printed on
// the threshold link. Map (this design's choice):
//   0 CMD       bit0 start, bit1 stop: one-clock pulses, nothing stored
//   1 CHANNELS  active-channel mask, one bit per channel
//   2 THRESHOLD discriminator threshold in ADC counts, shared by all channels
//   3 TEST      bit0 auto-test: the calibration signal replaces the ADC data
// Everything resets to zero (no channel active, threshold 0, test off).
// The document names the settings (active channels, reference threshold,
// start, stop, auto-test); the register map and reset values are this
// design's. Writes take effect on the next clock.
module config_control
  import daq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_wr,
  input  logic [3:0]        cfg_addr,
  input  logic [WORD_W-1:0] cfg_data,
  output logic              start,
  output logic              stop,
  output logic [N_CH-1:0]   ch_mask,
  output logic [THR_W-1:0]  threshold,
  output logic              test_mode
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start     <= 1'b0;
      stop      <= 1'b0;
      ch_mask   <= '0;
      threshold <= '0;
      test_mode <= 1'b0;
    end else begin
      start <= 1'b0;
      stop  <= 1'b0;
      if (cfg_wr) begin
        unique case (cfg_addr)
          CFG_CMD: begin
            start <= cfg_data[0];
            stop  <= cfg_data[1];
          end
          CFG_CHANNELS:  ch_mask   <= cfg_data[N_CH-1:0];
          CFG_THRESHOLD: threshold <= cfg_data[THR_W-1:0];
          CFG_TEST:      test_mode <= cfg_data[0];
          default: ;
        endcase
      end
    end
  end
endmodule
