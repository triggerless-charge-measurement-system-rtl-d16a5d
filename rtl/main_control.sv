// main_control: run sequencing of the interface.
//
// Distributes the settings latched at start (active channels, threshold,
// auto-test), so they stay constant for the whole run, and
// sequences a run:
//   IDLE  --start-->  one-clock "clear" (event numbers and time references of
//                     all channels restart), then RUN
//   RUN   "run" high: the ADC conversions of the active channels are enabled
//                     and their samples written into the ring buffers
//   RUN   --stop-->   "run" low, then SETTLE clocks for the last samples to
//                     cross into the processing clock domain
//   DRAIN "flush" high until every ring buffer has been read empty; a channel
//                     whose ring buffer is empty closes its open pulse at once,
//                     so a packet left open cannot hold up the others in the
//                     shared multi-event buffer
//   FLUSH "flush" still high until every pulse finder is idle and every data
//                     formatter is idle; then IDLE with a one-clock "done"
// Start is ignored outside IDLE, stop outside RUN. The document says this
// block distributes the active channels, threshold, start/stop and auto-test
// and starts sequences on signals from the other blocks; the states above,
// SETTLE and the drain-then-flush order are this design's choices.
module main_control
  import daq_pkg::*;
#(
  parameter int unsigned NCH    = N_CH,
  parameter int unsigned SETTLE = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            stop,
  input  logic [NCH-1:0]  cfg_mask,
  input  logic            cfg_test,
  input  logic [THR_W-1:0] cfg_thr,
  input  logic [NCH-1:0]  rb_empty,
  input  logic [NCH-1:0]  pf_busy,
  input  logic [NCH-1:0]  df_idle,
  output logic            run,
  output logic [NCH-1:0]  ch_en,
  output logic            test_sel,
  output logic [THR_W-1:0] threshold,
  output logic            clear,
  output logic            flush,
  output logic            done,
  output logic [2:0]      phase
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_SETTLE, S_DRAIN, S_FLUSH} state_e;

  state_e                      state;
  logic [$clog2(SETTLE+1)-1:0] cnt;

  assign phase = 3'(state);
  assign run   = (state == S_RUN);
  assign flush = (state == S_DRAIN || state == S_FLUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      ch_en    <= '0;
      test_sel <= 1'b0;
      threshold <= '0;
      clear    <= 1'b0;
      done     <= 1'b0;
    end else begin
      clear <= 1'b0;
      done  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ch_en    <= cfg_mask;
          test_sel <= cfg_test;
          threshold <= cfg_thr;
          clear    <= 1'b1;
          state    <= S_RUN;
        end
        S_RUN: if (stop) begin
          cnt   <= '0;
          state <= S_SETTLE;
        end
        S_SETTLE: begin
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(SETTLE)) state <= S_DRAIN;
        end
        S_DRAIN: if (&rb_empty) begin
          cnt   <= '0;
          state <= S_FLUSH;
        end
        S_FLUSH: begin
          if (cnt < 2) cnt <= cnt + 1'b1;
          else if (pf_busy == '0 && &df_idle) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
