// daq_env: end-to-end test environment for daq_top, shared by the reduced
// end-to-end test (FULL = 0) and the full-size test (FULL = 1, daq_top at its
// default parameters).
//
// Front-end model: each channel's ADC produces noise of 0..4 counts with an
// occasional 5 (a single hit for a threshold of 4), glitches of one or two samples
// and pulses of 3..40 samples at random amplitudes. The samples actually
// written into each ring buffer are recorded at the write port (and checked
// against what the front-end model or the calibration formula drove one ADC
// clock earlier). After each run a reference model, written from the rules
// (three samples over threshold start a pulse, at most 25 kept samples,
// an empty event after MAX_WAIT quiet samples, packet layout of the data
// formatter), turns each recorded stream into the expected packets, and the
// words read over the USB port are compared word by word.
//
// Runs: (1) data taking on seven of eight channels with USB read-out paused
// for a while, so the multi-event buffer fills and processing stalls;
// (2) auto-test: the calibration pulse replaces the ADC data and every valid
// packet must peak at 714; (3, reduced test only) a long USB stall that
// makes the ring buffers overrun; the run must still complete and drain;
// (3, full-size test only) a quiet run on one channel, longer than the 1 s
// maximum waiting time, which must yield an empty event.
// RATE = 1 (default sizes) replaces all of this by the peak-rate workload:
// all eight channels active, each receiving one 650 ns detector pulse
// (26 samples: one at the baseline, then 25 over threshold) every 100 us,
// i.e. 10 kHz per channel. Every packet must be read back exactly, with 25
// samples and no truncation, and neither a ring buffer nor the multi-event
// buffer may overflow.
// CAL = 1 (default sizes) runs the calibration workload instead: channel 0
// alone in auto-test mode for two calibration periods plus a margin. Three
// packets must arrive, each peaking at 714, the second and third with a time
// stamp of exactly CAL_PERIOD (0.504 s).
// Every mechanism is counted and a failure is counted for one never seen.
`timescale 1ns / 1ps
module daq_env #(
  parameter bit FULL = 0,
  parameter bit RATE = 0,
  parameter bit CAL  = 0
) ();
  import daq_pkg::*;

  localparam int unsigned RB_DEPTH   = FULL ? 8192 : 512;
  localparam int unsigned MEB_DEPTH  = FULL ? 8192 : 256;
  localparam int unsigned MAX_WAIT   = FULL ? 40_000_000 : 300;
  localparam int unsigned CAL_PERIOD = FULL ? 20_160_000 : 200;
  localparam int          RUN_LEN    = FULL ? 3000 : 6000;   // ADC samples per data run
  localparam logic [7:0]  MASK       = 8'b1101_1111;           // channel 5 inactive
  localparam int unsigned THR        = 4;
  localparam int          RATE_GAP   = 4000;     // samples between pulses: 10 kHz at 40 MHz
  localparam int          RATE_LEN   = 400_000;  // 10 ms of data taking

  logic aclk = 0, pclk = 0, uclk = 0, rst_n = 0;
  logic [ADC_W-1:0] adc_data [N_CH];
  logic [N_CH-1:0] fee_clk, adc_en, ch_overrun;
  logic uc_rd = 0, uc_valid, uc_empty, uc_wr = 0, uc_busy, run_done, meb_full;
  logic [WORD_W-1:0] uc_data;
  logic [15:0] uc_wdata = '0;
  logic [2:0] run_phase;

  always #12.5 aclk = ~aclk;
  always #6.25 pclk = ~pclk;
  always #8.0  uclk = ~uclk;

  if (FULL) begin : g_full
    daq_top dut (
      .aclk, .pclk, .uclk, .rst_n, .adc_data, .fee_clk, .adc_en,
      .uc_rd, .uc_data, .uc_valid, .uc_empty, .uc_wr, .uc_wdata, .uc_busy,
      .run_phase, .run_done, .ch_overrun, .meb_full
    );
  end else begin : g_red
    daq_top #(.RB_DEPTH(RB_DEPTH), .MEB_DEPTH(MEB_DEPTH), .MAX_WAIT(MAX_WAIT),
              .CAL_PERIOD(CAL_PERIOD)) dut (
      .aclk, .pclk, .uclk, .rst_n, .adc_data, .fee_clk, .adc_en,
      .uc_rd, .uc_data, .uc_valid, .uc_empty, .uc_wr, .uc_wdata, .uc_busy,
      .run_phase, .run_done, .ch_overrun, .meb_full
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_valid = 0, m_empty = 0, m_trunc = 0, m_glitch = 0, m_meb_full = 0,
      m_cal = 0, m_overrun = 0, m_stall = 0, m_runs = 0, m_inactive_quiet = 0;

  // ---------------- front-end model ----------------
  bit adc_on = 0, adc_quiet = 0;   // quiet: noise only, never over threshold
  logic [7:0] cur_mask = MASK;
  logic [ADC_W-1:0] drv_prev [N_CH];
  int               rem [N_CH];
  bit               kind_pulse [N_CH];
  int               gap [N_CH];       // RATE: samples until the next pulse

  always @(posedge aclk) begin
    for (int c = 0; c < N_CH; c++) begin
      logic [ADC_W-1:0] v;
      drv_prev[c] = adc_data[c];
      if (RATE && adc_on && rem[c] == 0 && gap[c] == 0) begin
        v = ADC_W'($urandom_range(0, 4)); rem[c] = 25; kind_pulse[c] = 1; gap[c] = RATE_GAP - 1;
      end else if (rem[c] > 0) begin
        v = ADC_W'($urandom_range(5, 1000)); rem[c]--;
        if (RATE) gap[c]--;
      end else if (RATE) begin
        v = ADC_W'($urandom_range(0, 4));
        if (adc_on) gap[c]--;
      end else begin
        int r;
        r = $urandom_range(0, 999);
        v = ADC_W'((!adc_quiet && $urandom_range(0, 49) == 0) ? 5 : $urandom_range(0, 4));
        if (adc_on && r < 8) begin rem[c] = $urandom_range(3, 40); kind_pulse[c] = 1; end
        else if (adc_on && r < 14) begin rem[c] = $urandom_range(1, 2); kind_pulse[c] = 0; end
      end
      adc_data[c] <= v;
    end
  end

  // ---------------- recording of the written samples ----------------
  logic [ADC_W-1:0] rec [N_CH][$];
  bit   test_run = 0;
  int   cal_k = -1;
  for (genvar c = 0; c < N_CH; c++) begin : g_rec
    logic             w_en;
    logic [ADC_W-1:0] w_data;
    if (FULL) begin : g_f
      assign w_en = g_full.dut.g_ch[c].u_ch.wr_en;
      assign w_data = g_full.dut.g_ch[c].u_ch.wr_data;
    end else begin : g_r
      assign w_en = g_red.dut.g_ch[c].u_ch.wr_en;
      assign w_data = g_red.dut.g_ch[c].u_ch.wr_data;
    end
    always @(posedge aclk) if (rst_n && w_en) rec[c].push_back(w_data);
    // input path: the written sample is the ADC sample of the previous clock
    logic [ADC_W-1:0] last_drv = '0;
    always @(posedge aclk) begin
      if (rst_n && w_en && !test_run) check(w_data == last_drv, $sformatf("ch %0d input path", c));
      last_drv = adc_data[c];
    end
  end

  // ---------------- USB reader ----------------
  bit usb_pause = 0;
  logic [WORD_W-1:0] got [$];
  always @(posedge uclk) begin
    uc_rd <= !usb_pause;
    if (rst_n && uc_valid) got.push_back(uc_data);
  end
  always @(posedge pclk) if (rst_n && meb_full && m_runs == 0) m_meb_full++;  // counted in the exactly checked run 1

  // processing stalled by a full multi-event buffer
  logic any_stall;
  if (FULL) begin : g_st
    assign any_stall = |(g_full.dut.ch_valid & ~g_full.dut.ch_ready) && g_full.dut.meb_full;
  end else begin : g_st
    assign any_stall = |(g_red.dut.ch_valid & ~g_red.dut.ch_ready) && g_red.dut.meb_full;
  end
  always @(posedge pclk) if (rst_n && any_stall && m_runs == 0) m_stall++;

  // ---------------- reference model ----------------
  logic [WORD_W-1:0] expq [N_CH][$];
  int                explen [N_CH][$];

  task automatic model_channel(int c);
    typedef enum {M_SEARCH, M_PULSE, M_REARM} m_e;
    m_e m = M_SEARCH;
    int run = 0, n = 0, last = 0, evn = 0, ns, start_q, hits;
    logic [WORD_W-1:0] pk [$];
    ns = rec[c].size();
    hits = 0;
    for (int i = 0; i < ns; i++) begin
      bit h = int'(rec[c][i]) > int'(THR);
      // glitch: one or two hits between non-hits, outside a pulse
      if (m == M_SEARCH) begin
        if (h) hits++;
        else begin if (hits == 1 || hits == 2) m_glitch++; hits = 0; end
      end else hits = 0;
      case (m)
        M_PULSE: begin
          if (h && n < MAX_DATA) begin pk.push_back(WORD_W'(rec[c][i])); n++; end
          else begin
            pk.push_back(WORD_W'(n + 6));
            foreach (pk[k]) expq[c].push_back(pk[k]);
            explen[c].push_back(n + 6);
            pk.delete(); evn++; m_valid++;
            if (h) begin m = M_REARM; m_trunc++; end else m = M_SEARCH;
            run = h ? 1 : 0;
          end
        end
        default: begin
          if (m == M_SEARCH && h && run >= 2) begin
            int ts = i - 2 - last;
            pk.push_back(WORD_W'(896 + c));
            pk.push_back(WORD_W'(ts >> 20)); pk.push_back(WORD_W'(ts >> 10)); pk.push_back(WORD_W'(ts));
            pk.push_back(WORD_W'(evn % 1024));
            pk.push_back(WORD_W'(rec[c][i-2])); pk.push_back(WORD_W'(rec[c][i-1])); pk.push_back(WORD_W'(rec[c][i]));
            last = i - 2; n = 3; m = M_PULSE; hits = 0;
          end else begin
            run = h ? run + 1 : 0;
            if (m == M_REARM && !h) m = M_SEARCH;
            if (i > 0 && i - last >= int'(MAX_WAIT) + 2) begin
              expq[c].push_back(WORD_W'(896 + c));
              expq[c].push_back(WORD_W'(MAX_WAIT >> 20)); expq[c].push_back(WORD_W'(MAX_WAIT >> 10));
              expq[c].push_back(WORD_W'(MAX_WAIT)); expq[c].push_back(WORD_W'(evn % 1024));
              expq[c].push_back(WORD_W'(6));
              explen[c].push_back(6);
              evn++; last += int'(MAX_WAIT); m_empty++;
            end
          end
        end
      endcase
    end
    if (m == M_PULSE) begin
      pk.push_back(WORD_W'(n + 6));
      foreach (pk[k]) expq[c].push_back(pk[k]);
      explen[c].push_back(n + 6);
      m_valid++;
    end
  endtask

  // compare everything read so far against the expected packets
  task automatic compare_run(bit cal_check);
    int w = 0, nerr = 0;
    while (w < got.size()) begin
      int c, len;
      if (got[w][9:7] != 3'b111) begin
        check(0, $sformatf("run %0d word %0d: start of event expected, got %0h", m_runs, w, got[w])); return;
      end
      c = int'(got[w][2:0]);
      check(cur_mask[c], $sformatf("packet from inactive channel %0d", c));
      if (explen[c].size() == 0) begin check(0, $sformatf("unexpected packet from channel %0d", c)); return; end
      len = explen[c].pop_front();
      for (int k = 0; k < len; k++) begin
        if (w + k >= got.size()) begin check(0, "packet cut short"); return; end
        if (got[w + k] != expq[c][k]) begin
          nerr++;
          check(0, $sformatf("run %0d ch %0d word %0d of packet: got %0d exp %0d", m_runs, c, k, got[w + k], expq[c][k]));
        end else checks++;
      end
      if (cal_check && len > 6) begin
        int pk = 0;
        for (int k = 5; k < len - 1; k++) if (int'(got[w + k]) > pk) pk = int'(got[w + k]);
        check(pk == 714, $sformatf("calibration packet peak %0d", pk));
        if (pk == 714) m_cal++;
      end
      for (int k = 0; k < len; k++) void'(expq[c].pop_front());
      w += len;
      if (nerr > 20) return;
    end
    for (int c = 0; c < N_CH; c++)
      check(expq[c].size() == 0, $sformatf("channel %0d: %0d expected words never read", c, expq[c].size()));
    got.delete();
  endtask

  // ---------------- configuration ----------------
  task automatic cfg(logic [3:0] a, logic [9:0] d);
    @(posedge uclk); uc_wr <= 1; uc_wdata <= {a, 2'b00, d};
    @(posedge uclk); uc_wr <= 0;
    @(posedge uclk);
    while (uc_busy) @(posedge uclk);
  endtask

  task automatic do_run(bit test, int len, int pause_at, int pause_len, bit quiet = 0);
    foreach (rec[c]) rec[c].delete();
    test_run = test;
    cfg(4'd3, {9'd0, test});
    cfg(4'd0, 10'd1);                         // start
    adc_on = !quiet;
    adc_quiet = quiet;
    for (int t = 0; t < len; t++) begin
      @(posedge aclk);
      if (t == pause_at) usb_pause = 1;
      if (t == pause_at + pause_len) usb_pause = 0;
    end
    adc_on = 0;
    adc_quiet = 0;
    usb_pause = 0;
    repeat (40) @(posedge aclk);              // let a pulse in progress end
    cfg(4'd0, 10'd2);                         // stop
    fork
      begin : wait_done
        @(posedge pclk iff run_done);
      end
      begin
        repeat (200000) @(posedge pclk);
        check(0, $sformatf("run %0d never completed, phase %0d", m_runs + 1, run_phase));
      end
    join_any
    disable fork;
    m_runs++;
    // drain the multi-event buffer
    repeat (20) @(posedge uclk);
    while (!uc_empty) @(posedge uclk);
    repeat (20) @(posedge uclk);
    if (!cur_mask[5]) begin
      check(rec[5].size() == 0, "inactive channel wrote nothing");
      if (rec[5].size() == 0) m_inactive_quiet++;
    end
  endtask

  initial begin
    foreach (adc_data[c]) begin adc_data[c] = '0; rem[c] = 0; gap[c] = $urandom_range(100, RATE_GAP - 1); end
    #100 rst_n = 1;
    repeat (10) @(posedge uclk);
    if (CAL) begin
      logic [TS_W-1:0] ts [$];
      cur_mask = 8'h01;
      cfg(4'd2, 10'(THR));
      cfg(4'd1, 10'(cur_mask));
      do_run(1, 2 * CAL_PERIOD + 1000, -1, 0);
      model_channel(0);
      for (int w = 0; w + 4 < got.size(); w++)
        if (got[w][9:7] == 3'b111 && (w == 0 || ts.size() > 0)) begin
          ts.push_back({got[w + 1], got[w + 2], got[w + 3]});
          w += int'(explen[0][ts.size() - 1]) - 1;
        end
      compare_run(1);
      $display("calibration workload: %0d packets, time stamps %p, peaks at 714: %0d", ts.size(), ts, m_cal);
      check(ts.size() == 3, $sformatf("%0d calibration packets, 3 expected", ts.size()));
      check(m_cal == 3, $sformatf("%0d packets peaking at 714, 3 expected", m_cal));
      for (int i = 1; i < ts.size(); i++)
        check(ts[i] == TS_W'(CAL_PERIOD), $sformatf("calibration packet %0d time stamp %0d, %0d expected", i, ts[i], CAL_PERIOD));
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (RATE) begin
      int npk;
      cur_mask = 8'hFF;
      cfg(4'd2, 10'(THR));
      cfg(4'd1, 10'(cur_mask));
      do_run(0, RATE_LEN, -1, 0);
      npk = 0;
      for (int c = 0; c < N_CH; c++) begin model_channel(c); npk += explen[c].size(); end
      for (int c = 0; c < N_CH; c++)
        foreach (explen[c][i]) check(explen[c][i] == 31, $sformatf("ch %0d packet of %0d words, 31 expected", c, explen[c][i]));
      compare_run(0);
      $display("rate workload: %0d packets in %0d samples on 8 channels, meb_full_cycles=%0d truncated=%0d",
               npk, RATE_LEN, m_meb_full, m_trunc);
      check(npk >= N_CH * (RATE_LEN / RATE_GAP - 1), $sformatf("%0d packets, at least %0d expected", npk, N_CH * (RATE_LEN / RATE_GAP - 1)));
      check(m_trunc == 0, "no pulse truncated");
      check(m_meb_full == 0, "multi-event buffer never full");
      check(ch_overrun == '0, "no ring buffer overrun");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    cfg(4'd2, 10'(THR));
    cfg(4'd1, 10'(MASK));

    // run 1: data taking with a USB pause
    do_run(0, RUN_LEN, RUN_LEN / 4, FULL ? 200 : 350);
    for (int c = 0; c < N_CH; c++) model_channel(c);
    compare_run(0);
    check(ch_overrun == '0, "no ring buffer overrun in run 1");

    // run 2: auto-test with the calibration pulse
    do_run(1, FULL ? 400 : 5 * CAL_PERIOD, -1, 0);
    for (int c = 0; c < N_CH; c++) model_channel(c);
    compare_run(1);

    // full size only: a quiet run on channel 0 longer than MAX_WAIT, so that
    // an empty event is produced at the default maximum waiting time
    if (FULL) begin
      cur_mask = 8'h01;
      cfg(4'd1, 10'(cur_mask));
      do_run(0, MAX_WAIT + 2000, -1, 0, 1);
      model_channel(0);
      compare_run(0);
    end

    // run 3: long USB stall, ring buffers overrun
    if (!FULL) begin
      do_run(0, 4 * RB_DEPTH, 10, 3 * RB_DEPTH);
      got.delete();
      m_overrun = $countones(ch_overrun);
      check(m_overrun > 0, "ring buffer overrun seen");
    end

    $display("mechanisms: valid=%0d empty=%0d truncated=%0d glitches=%0d meb_full_cycles=%0d stall_cycles=%0d cal=%0d overrun_ch=%0d runs=%0d inactive_quiet=%0d",
             m_valid, m_empty, m_trunc, m_glitch, m_meb_full, m_stall, m_cal, m_overrun, m_runs, m_inactive_quiet);
    check(m_valid > 0, "valid events seen");
    check(m_trunc > 0, "truncated pulse seen");
    check(m_glitch > 0, "glitch rejected");
    check(m_cal > 0, "calibration events seen");
    check(m_inactive_quiet > 0, "inactive channel stays quiet");
    check(m_empty > 0, "empty events seen");
    if (!FULL) begin
      check(m_meb_full > 0, "multi-event buffer full seen");
      check(m_stall > 0, "processing stall seen");
      check(m_runs == 3, "three runs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
