// daq_channel: the processing chain of one channel: input register and
// test-signal selection on the ADC clock, ring buffer, pulse finder and data
// formatter on the processing clock. The output is this channel's packet-word
// stream towards the multi-event buffer.
//
// Samples are registered once on the ADC clock. While "run_a" and "en_a" (both
// already synchronised to the ADC clock) are high, every sample is written to
// the ring buffer; "test_a" selects the calibration signal instead of the ADC
// data. Channel chaining follows the firmware diagram of the document; the
// input register is this design's.
module daq_channel
  import daq_pkg::*;
#(
  parameter int unsigned RB_DEPTH = 8192,
  parameter int unsigned MAX_WAIT = 40_000_000
) (
  input  logic              aclk,
  input  logic              arst_n,
  input  logic [ADC_W-1:0]  adc_data,
  input  logic [ADC_W-1:0]  cal_sample,
  input  logic              run_a,
  input  logic              en_a,
  input  logic              test_a,
  input  logic              pclk,
  input  logic              prst_n,
  input  logic [CH_W-1:0]   channel,
  input  logic [THR_W-1:0]  threshold,
  input  logic              clear,
  input  logic              flush,
  output logic              out_valid,
  input  logic              out_ready,
  output evt_word_t         out,
  output logic              rb_empty,
  output logic              pf_busy,
  output logic              df_idle,
  output logic              hit,
  output logic [15:0]       overruns,
  output logic [7:0]        proto_err
);
  logic [ADC_W-1:0] wr_data;
  logic             wr_en;

  always_ff @(posedge aclk or negedge arst_n) begin
    if (!arst_n) begin
      wr_data <= '0;
      wr_en   <= 1'b0;
    end else begin
      wr_data <= test_a ? cal_sample : adc_data;
      wr_en   <= run_a && en_a;
    end
  end

  logic       rb_valid, rb_ready;
  rb_sample_t rb_out;
  logic       tk_valid, tk_ready;
  pf_tok_t    tk;

  ring_buffer #(.DEPTH(RB_DEPTH)) u_rb (
    .wclk(aclk), .wrst_n(arst_n), .wr_en(wr_en), .wr_data(wr_data),
    .rclk(pclk), .rrst_n(prst_n),
    .out_valid(rb_valid), .out_ready(rb_ready), .out(rb_out),
    .empty(rb_empty), .overruns(overruns)
  );

  pulse_finder #(.MAX_WAIT(MAX_WAIT)) u_pf (
    .clk(pclk), .rst_n(prst_n), .clear(clear), .flush(flush && rb_empty), .threshold(threshold),
    .in_valid(rb_valid), .in_ready(rb_ready), .in(rb_out),
    .out_valid(tk_valid), .out_ready(tk_ready), .out(tk),
    .busy(pf_busy), .hit(hit)
  );

  data_format u_df (
    .clk(pclk), .rst_n(prst_n), .clear(clear), .channel(channel),
    .tok_valid(tk_valid), .tok_ready(tk_ready), .tok(tk),
    .out_valid(out_valid), .out_ready(out_ready), .out(out),
    .idle(df_idle), .proto_err(proto_err)
  );

endmodule
