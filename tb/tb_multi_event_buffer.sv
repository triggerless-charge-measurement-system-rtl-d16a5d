// tb_multi_event_buffer: self-checking test of the shared packet FIFO.
// Four channels offer random packets (random lengths, last word flagged) with
// random gaps, written on an 80 MHz clock; a reader on a separate 48 MHz clock
// pops words at random. Checked: every packet arrives whole (no interleaving),
// each channel's packets in order, no word lost or duplicated; the FIFO
// reports full when the reader stops and resumes afterwards; the arbiter
// serves every requesting channel (round robin).
`timescale 1ns / 1ps
module tb_multi_event_buffer;
  import daq_pkg::*;

  localparam int unsigned NCH = 4, DEPTH = 64;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic [NCH-1:0] in_valid, in_ready;
  evt_word_t in_word [NCH];
  logic full, rd_en, rd_valid, empty;
  logic [$clog2(DEPTH):0] wr_level;
  logic [WORD_W-1:0] rd_data;
  always #6.25 wclk = ~wclk;
  always #10.4 rclk = ~rclk;

  multi_event_buffer #(.NCH(NCH), .DEPTH(DEPTH)) dut (
    .wclk, .wrst_n(rst_n), .in_valid, .in_ready, .in_word, .full, .wr_level,
    .rclk, .rrst_n(rst_n), .rd_en, .rd_data, .rd_valid, .empty
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Word encoding used by the test: {channel[1:0], seq[3:0], k[3:0]}; the
  // first word of a packet has k = 0; the last word has k = length-1.
  int pkts_per_ch = 60;
  int sent [NCH], rcvd [NCH], len_q [NCH][$];
  bit rd_stop = 0;
  int full_seen = 0;

  for (genvar c = 0; c < NCH; c++) begin : g_src
    initial begin
      int k, len;
      in_valid[c] = 0; in_word[c] = '0; sent[c] = 0;
      wait (rst_n);
      for (int p = 0; p < pkts_per_ch; p++) begin
        len = $urandom_range(2, 12);
        len_q[c].push_back(len);
        k = 0;
        while (k < len) begin
          @(posedge wclk);
          if (in_valid[c] && in_ready[c]) k++;
          if (k < len) begin
            in_valid[c] <= (in_valid[c] && !in_ready[c]) || ($urandom_range(0, 3) != 0);
            in_word[c]  <= '{data: WORD_W'({2'(c), 4'(p), 4'(k)}), last: (k == len - 1)};
          end else in_valid[c] <= 0;
        end
        sent[c]++;
      end
    end
  end

  always @(posedge wclk) if (rst_n && full) full_seen++;

  // reader
  int cur_ch = -1, cur_k = 0, cur_len = 0, seq [NCH], nwords = 0;
  always @(posedge rclk) begin
    rd_en <= !rd_stop && ($urandom_range(0, 9) < 7);
    if (rst_n && rd_valid) begin
      int c, p, k;
      c = int'(rd_data[9:8]); p = int'(rd_data[7:4]); k = int'(rd_data[3:0]);
      nwords++;
      if (cur_ch < 0) begin
        check(k == 0, "packet starts with its first word");
        check(len_q[c].size() > 0, "packet was sent");
        cur_ch = c; cur_k = 0; cur_len = len_q[c].size() ? len_q[c].pop_front() : 1;
        check(p == seq[c] % 16, $sformatf("channel %0d packet order", c));
      end else begin
        check(c == cur_ch && k == cur_k, $sformatf("interleaved or lost word ch %0d k %0d exp ch %0d k %0d", c, k, cur_ch, cur_k));
      end
      cur_k++;
      if (cur_k == cur_len) begin rcvd[cur_ch]++; seq[cur_ch]++; cur_ch = -1; end
    end
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seq[c]) begin seq[c] = 0; rcvd[c] = 0; end
    rd_en = 0;
    #100 rst_n = 1;
    // let the FIFO fill up with the reader stopped, then drain
    rd_stop = 1;
    repeat (400) @(posedge wclk);
    check(full, "full with the reader stopped");
    check(wr_level == DEPTH, "level equals depth when full");
    rd_stop = 0;
    wait (sent[0] == pkts_per_ch && sent[1] == pkts_per_ch && sent[2] == pkts_per_ch && sent[3] == pkts_per_ch);
    repeat (400) @(posedge rclk);
    for (int c = 0; c < NCH; c++)
      check(rcvd[c] == pkts_per_ch, $sformatf("channel %0d: %0d of %0d packets", c, rcvd[c], pkts_per_ch));
    check(empty, "empty at the end");
    check(full_seen > 0, "full seen");
    $display("words read %0d", nwords);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
