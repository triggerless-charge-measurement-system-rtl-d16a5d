// tb_usb_interface: self-checking test of the microcontroller link.
// Configuration: random command words written from the USB clock side must
// each appear once, in order, as a one-clock cfg_wr with the right address
// and data on the processing clock side; a write made while busy is dropped
// and counted. Read-out: a small FIFO model stands in for the multi-event
// buffer; every uc_rd that finds it non-empty must pop exactly one word,
// delivered with uc_valid one clock later, in order.
`timescale 1ns / 1ps
module tb_usb_interface;
  import daq_pkg::*;

  logic uclk = 0, pclk = 0, rst_n = 0;
  logic uc_rd = 0, uc_valid, uc_empty, uc_wr = 0, uc_busy;
  logic [WORD_W-1:0] uc_data;
  logic [15:0] uc_wdata = '0;
  logic [7:0] uc_dropped;
  logic meb_rd_en, meb_rd_valid = 0, meb_empty;
  logic [WORD_W-1:0] meb_rd_data = '0;
  logic cfg_wr;
  logic [3:0] cfg_addr;
  logic [WORD_W-1:0] cfg_data;
  always #8.3 uclk = ~uclk;
  always #6.25 pclk = ~pclk;

  usb_interface dut (
    .uclk, .urst_n(rst_n), .uc_rd, .uc_data, .uc_valid, .uc_empty, .uc_wr, .uc_wdata,
    .uc_busy, .uc_dropped, .meb_rd_en, .meb_rd_data, .meb_rd_valid, .meb_empty,
    .pclk, .prst_n(rst_n), .cfg_wr, .cfg_addr, .cfg_data
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // FIFO model of the multi-event buffer read port
  logic [WORD_W-1:0] fifo [$];
  int next_word = 0, next_exp = 0, n_read = 0;
  assign meb_empty = (fifo.size() == 0);
  always @(posedge uclk) begin
    meb_rd_valid <= 0;
    if (meb_rd_en) begin
      if (fifo.size() == 0) check(0, "read from an empty buffer");
      else begin meb_rd_data <= fifo.pop_front(); meb_rd_valid <= 1; end
    end
    if (rst_n && $urandom_range(0, 3) == 0 && fifo.size() < 20) begin
      fifo.push_back(WORD_W'(next_word)); next_word++;
    end
    if (rst_n && uc_valid) begin
      check(uc_data == WORD_W'(next_exp), $sformatf("read-out word %0d got %0d", next_exp, uc_data));
      next_exp++; n_read++;
    end
  end

  // configuration monitor
  logic [15:0] cmd_q [$];
  int n_cfg = 0;
  always @(posedge pclk) if (rst_n && cfg_wr) begin
    logic [15:0] e;
    n_cfg++;
    if (cmd_q.size() == 0) check(0, "unexpected cfg_wr");
    else begin
      e = cmd_q.pop_front();
      check(cfg_addr == e[15:12] && cfg_data == e[9:0],
            $sformatf("cfg %0h/%0h exp %0h/%0h", cfg_addr, cfg_data, e[15:12], e[9:0]));
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w;
    #50 rst_n = 1;
    repeat (5) @(posedge uclk);
    uc_rd <= 1;
    for (int i = 0; i < 100; i++) begin
      w = 16'($urandom) & 16'hf3ff;
      @(posedge uclk); uc_wr <= 1; uc_wdata <= w; cmd_q.push_back(w);
      @(posedge uclk); uc_wr <= 0;
      @(posedge uclk);
      if (i == 50) begin
        // a second write while busy is dropped
        check(uc_busy, "busy after a write");
        uc_wr <= 1; uc_wdata <= 16'h1234;
        @(posedge uclk); uc_wr <= 0;
      end
      uc_rd <= 1'($urandom_range(0, 1));
      while (uc_busy) @(posedge uclk);
    end
    uc_rd <= 1;
    repeat (100) @(posedge uclk);
    uc_rd <= 0;
    repeat (10) @(posedge uclk);
    check(n_cfg == 100 && cmd_q.size() == 0, $sformatf("%0d configuration writes delivered", n_cfg));
    check(uc_dropped == 1, "dropped write counted");
    check(n_read > 100, $sformatf("%0d words read", n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
