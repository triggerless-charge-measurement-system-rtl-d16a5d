// tb_main_control: self-checking test of run sequencing.
// Checks: start latches the channel mask, threshold and test flag and gives one "clear";
// "run" stays high until stop; after stop, "flush" waits at least SETTLE
// clocks, and the drain phase lasts until every ring buffer reports empty; "done" comes only after
// all pulse finders are idle and all formatters idle; start is ignored while
// running and stop while idle. Three runs with random mask and drain delays.
module tb_main_control;
  import daq_pkg::*;
  localparam int unsigned NCH = 8, SETTLE = 16;

  logic clk = 0, rst_n = 0, start = 0, stop = 0, cfg_test = 0;
  logic [NCH-1:0] cfg_mask = '0, rb_empty = '1, pf_busy = '0, df_idle = '1;
  logic run, test_sel, clear, flush, done;
  logic [THR_W-1:0] cfg_thr = '0, threshold;
  logic [NCH-1:0] ch_en;
  logic [2:0] phase;
  always #5 clk = ~clk;

  main_control #(.NCH(NCH), .SETTLE(SETTLE)) dut (
    .clk, .rst_n, .start, .stop, .cfg_mask, .cfg_test, .cfg_thr, .rb_empty, .pf_busy, .df_idle,
    .run, .ch_en, .test_sel, .threshold, .clear, .flush, .done, .phase
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int n_clear = 0, n_done = 0, n_flush_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (clear) n_clear++;
    if (done) n_done++;
    if (flush) n_flush_cyc++;
  end

  task automatic pulse_start();
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
  endtask
  task automatic pulse_stop();
    @(posedge clk); stop <= 1; @(posedge clk); stop <= 0;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_stop, t;
    logic [NCH-1:0] m;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    pulse_stop();
    repeat (3) @(posedge clk);
    check(!run && !flush && n_done == 0, "stop ignored while idle");
    for (int r = 0; r < 3; r++) begin
      m = NCH'($urandom);
      cfg_mask <= m; cfg_test <= r[0]; cfg_thr <= THR_W'(r + 3);
      pulse_start();
      @(posedge clk); #1;
      check(run && ch_en == m && test_sel == r[0] && threshold == THR_W'(r + 3), "run, mask, threshold and test latched");
      check(n_clear == r + 1, "one clear per start");
      cfg_mask <= ~m; cfg_thr <= '1;
      pulse_start();
      repeat (20) @(posedge clk); #1;
      check(run && ch_en == m && threshold == THR_W'(r + 3) && n_clear == r + 1, "start ignored while running");
      // stop: ring buffers still hold data, a pulse finder is busy
      rb_empty <= ~m; pf_busy <= m; df_idle <= ~m;
      pulse_stop();
      t = 0;
      repeat (SETTLE + 30) begin
        @(posedge clk); #1; t++;
        check(!run, "run low after stop");
        if (t <= SETTLE) check(!flush, "no flush before the settling time");
        else check(flush && phase == 3'd3, "draining while ring buffers hold data");
        check(!done, "no done while ring buffers hold data");
      end
      rb_empty <= '1;
      wait (flush);
      @(posedge clk); #1;
      repeat (10) begin
        @(posedge clk); #1;
        check(flush && !done, "flush held while a pulse finder is busy");
      end
      pf_busy <= '0;
      repeat (5) @(posedge clk);
      check(flush, "flush held while a formatter is busy");
      df_idle <= '1;
      wait (done);
      @(posedge clk); #1;
      check(!flush && !run && phase == 3'd0, "idle after done");
    end
    check(n_done == 3, $sformatf("%0d runs completed", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
