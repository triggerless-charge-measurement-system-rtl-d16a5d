// daq_top: triggerless charge-measurement firmware for up to eight
// photodetector channels (APD or PMT front ends with 10-bit ADCs).
//
// Three clocks come from the FPGA PLL (outside this module): aclk, the ADC
// sampling clock (40 MHz), pclk, the processing clock at twice that rate
// (80 MHz), and uclk, the clock of the USB microcontroller bus. Each ADC
// sample is written into its channel's ring buffer on aclk; on pclk the pulse
// finder searches the stored stream for three consecutive samples above the
// threshold, the data formatter wraps each pulse (or an empty event after the
// maximum waiting time) into a packet, and the multi-event buffer gathers the
// packets of all channels; on uclk the microcontroller reads them out and
// writes the configuration. The main control starts and stops runs and the
// calibration test can replace the ADC data by a stored test pulse.
//
// fee_clk forwards the ADC clock to each front-end card and adc_en enables
// the conversions of the active channels during a run. Block structure,
// sizes and clock ratio follow the document; the bus protocols, register map
// and run sequencing are this design's (see each block).
module daq_top
  import daq_pkg::*;
#(
  parameter int unsigned RB_DEPTH   = 8192,
  parameter int unsigned MEB_DEPTH  = 8192,
  parameter int unsigned MAX_WAIT   = 40_000_000,
  parameter int unsigned CAL_PERIOD = 20_160_000
) (
  input  logic              aclk,
  input  logic              pclk,
  input  logic              uclk,
  input  logic              rst_n,
  // front-end cards
  input  logic [ADC_W-1:0]  adc_data [N_CH],
  output logic [N_CH-1:0]   fee_clk,
  output logic [N_CH-1:0]   adc_en,
  // USB microcontroller bus (uclk)
  input  logic              uc_rd,
  output logic [WORD_W-1:0] uc_data,
  output logic              uc_valid,
  output logic              uc_empty,
  input  logic              uc_wr,
  input  logic [15:0]       uc_wdata,
  output logic              uc_busy,
  // status (pclk)
  output logic [2:0]        run_phase,
  output logic              run_done,
  output logic [N_CH-1:0]   ch_overrun,
  output logic              meb_full
);
  logic arst_n, prst_n, urst_n;
  reset_sync u_rs_a (.clk(aclk), .rst_n_in(rst_n), .rst_n_out(arst_n));
  reset_sync u_rs_p (.clk(pclk), .rst_n_in(rst_n), .rst_n_out(prst_n));
  reset_sync u_rs_u (.clk(uclk), .rst_n_in(rst_n), .rst_n_out(urst_n));

  // ---------------- configuration ----------------
  logic              cfg_wr;
  logic [3:0]        cfg_addr;
  logic [WORD_W-1:0] cfg_data;
  logic              start, stop, cfg_test;
  logic [N_CH-1:0]   cfg_mask;
  logic [THR_W-1:0]  cfg_thr, threshold;
  logic              meb_rd_en, meb_rd_valid, meb_empty;
  logic [WORD_W-1:0] meb_rd_data;
  logic [7:0]        uc_dropped;

  usb_interface u_usb (
    .uclk(uclk), .urst_n(urst_n),
    .uc_rd(uc_rd), .uc_data(uc_data), .uc_valid(uc_valid), .uc_empty(uc_empty),
    .uc_wr(uc_wr), .uc_wdata(uc_wdata), .uc_busy(uc_busy), .uc_dropped(uc_dropped),
    .meb_rd_en(meb_rd_en), .meb_rd_data(meb_rd_data), .meb_rd_valid(meb_rd_valid),
    .meb_empty(meb_empty),
    .pclk(pclk), .prst_n(prst_n), .cfg_wr(cfg_wr), .cfg_addr(cfg_addr), .cfg_data(cfg_data)
  );

  config_control u_cfg (
    .clk(pclk), .rst_n(prst_n), .cfg_wr(cfg_wr), .cfg_addr(cfg_addr), .cfg_data(cfg_data),
    .start(start), .stop(stop), .ch_mask(cfg_mask), .threshold(cfg_thr), .test_mode(cfg_test)
  );

  // ---------------- main control ----------------
  logic [N_CH-1:0] rb_empty, pf_busy, df_idle, ch_en;
  logic            run, test_sel, clear, flush;

  main_control #(.NCH(N_CH)) u_mc (
    .clk(pclk), .rst_n(prst_n), .start(start), .stop(stop),
    .cfg_mask(cfg_mask), .cfg_test(cfg_test), .cfg_thr(cfg_thr),
    .rb_empty(rb_empty), .pf_busy(pf_busy), .df_idle(df_idle),
    .run(run), .ch_en(ch_en), .test_sel(test_sel), .threshold(threshold), .clear(clear), .flush(flush),
    .done(run_done), .phase(run_phase)
  );

  // run, channel enables and test selection into the ADC clock domain
  logic            run_a, test_a;
  logic [N_CH-1:0] en_a;
  sync_2ff #(.W(N_CH + 2)) u_sync_a (
    .clk(aclk), .rst_n(arst_n), .d({run, test_sel, ch_en}), .q({run_a, test_a, en_a})
  );

  assign fee_clk = {N_CH{aclk}};
  assign adc_en  = run_a ? en_a : '0;

  // ---------------- calibration test ----------------
  logic [ADC_W-1:0] cal_sample;
  logic             cal_start;
  calibration_test #(.PERIOD(CAL_PERIOD)) u_cal (
    .clk(aclk), .rst_n(arst_n), .enable(run_a && test_a),
    .sample(cal_sample), .pulse_start(cal_start)
  );

  // ---------------- channels ----------------
  logic [N_CH-1:0] ch_valid, ch_ready, ch_hit;
  evt_word_t       ch_word [N_CH];
  logic [15:0]     overruns [N_CH];
  logic [7:0]      proto_err [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    daq_channel #(.RB_DEPTH(RB_DEPTH), .MAX_WAIT(MAX_WAIT)) u_ch (
      .aclk(aclk), .arst_n(arst_n), .adc_data(adc_data[c]), .cal_sample(cal_sample),
      .run_a(run_a), .en_a(en_a[c]), .test_a(test_a),
      .pclk(pclk), .prst_n(prst_n), .channel(CH_W'(c)), .threshold(threshold),
      .clear(clear), .flush(flush),
      .out_valid(ch_valid[c]), .out_ready(ch_ready[c]), .out(ch_word[c]),
      .rb_empty(rb_empty[c]), .pf_busy(pf_busy[c]), .df_idle(df_idle[c]), .hit(ch_hit[c]),
      .overruns(overruns[c]), .proto_err(proto_err[c])
    );
    assign ch_overrun[c] = (overruns[c] != '0);
  end

  // ---------------- multi-event buffer ----------------
  logic [$clog2(MEB_DEPTH):0] meb_level;
  multi_event_buffer #(.NCH(N_CH), .DEPTH(MEB_DEPTH)) u_meb (
    .wclk(pclk), .wrst_n(prst_n), .in_valid(ch_valid), .in_ready(ch_ready), .in_word(ch_word),
    .full(meb_full), .wr_level(meb_level),
    .rclk(uclk), .rrst_n(urst_n), .rd_en(meb_rd_en), .rd_data(meb_rd_data),
    .rd_valid(meb_rd_valid), .empty(meb_empty)
  );

endmodule
