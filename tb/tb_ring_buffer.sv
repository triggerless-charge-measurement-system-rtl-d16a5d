// tb_ring_buffer: self-checking test of the dual-clock ring buffer.
// Writes run on a 40 MHz clock, reads on an 80 MHz clock. Checked:
//  - every written sample comes out once, in order, with its running index,
//    while the reader has random stalls (data and index against a counter
//    model of what was written);
//  - with the reader never stalled, the buffer never fills beyond a few
//    samples (the read side keeps up at twice the write rate) and a sample
//    appears at the output within 8 read clocks of being written;
//  - a reader stalled for longer than the buffer depth makes the buffer skip
//    ahead: an overrun is counted, the next sample carries "resync", and its
//    index and data still match what was written at that index.
`timescale 1ns / 1ps
module tb_ring_buffer;
  import daq_pkg::*;

  localparam int unsigned DEPTH = 256;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [ADC_W-1:0] wr_data = '0;
  logic out_valid, out_ready, empty;
  rb_sample_t out;
  logic [15:0] overruns;
  always #12.5 wclk = ~wclk;
  always #6.25 rclk = ~rclk;

  ring_buffer #(.DEPTH(DEPTH)) dut (
    .wclk, .wrst_n(rst_n), .wr_en, .wr_data, .rclk, .rrst_n(rst_n),
    .out_valid, .out_ready, .out, .empty, .overruns
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // sample written at index i is a fixed function of i
  function automatic logic [ADC_W-1:0] val(logic [IDX_W-1:0] i);
    return ADC_W'((i * 37 + (i >> 3)) ^ 10'h2a5);
  endfunction

  logic [IDX_W-1:0] widx = 0, exp_idx = 0;
  int  rd_mode = 0;   // 0 random stalls, 1 always ready, 2 stalled, 3 catching up
  bit  lat_check = 0; // free-running reader, backlog of the random phase gone
  int  max_fill = 0, n_read = 0, n_resync = 0;
  real t_wr [int];

  always @(posedge wclk) if (rst_n) begin
    if (wr_en) begin t_wr[int'(widx)] = $realtime; widx <= widx + 1; end
    wr_en   <= 1'b1;
    wr_data <= val(widx + (wr_en ? 1 : 0));
  end

  always @(posedge rclk) begin
    if (rst_n && out_valid && out_ready) begin
      n_read++;
      if (out.resync) begin
        n_resync++;
        check(out.idx > exp_idx, "resync jumps forward");
        exp_idx = out.idx;
      end
      check(out.idx == exp_idx, $sformatf("index %0d exp %0d", out.idx, exp_idx));
      check(out.sample == val(out.idx), $sformatf("data at %0d", out.idx));
      if (lat_check && t_wr.exists(int'(out.idx)))
        check($realtime - t_wr[int'(out.idx)] <= 8 * 12.5, "read latency above 8 read clocks");
      exp_idx = out.idx + 1;
    end
    if (lat_check && int'(widx - exp_idx) > max_fill) max_fill = int'(widx - exp_idx);
    out_ready <= (rd_mode == 0) ? ($urandom_range(0, 9) < 6) : (rd_mode != 2);
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    out_ready = 0;
    #100 rst_n = 1;
    rd_mode = 0;
    repeat (3000) @(posedge rclk);
    rd_mode = 1;
    repeat (200) @(posedge rclk);
    lat_check = 1;
    repeat (3000) @(posedge rclk);
    lat_check = 0;
    check(max_fill <= 6, $sformatf("fill reached %0d with a free-running reader", max_fill));
    check(overruns == 0, "no overrun before the stall");
    rd_mode = 2;
    repeat (2 * 2 * DEPTH) @(posedge rclk);
    rd_mode = 3;
    repeat (2000) @(posedge rclk);
    check(overruns == 1, $sformatf("overruns %0d exp 1", overruns));
    check(n_resync == 1, "one resync sample");
    check(n_read > 4000, "samples read");
    $display("read %0d samples, max fill %0d", n_read, max_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
