// tb_data_format: self-checking test of the packet formatter.
// Random valid and empty events (random time stamps, 1..25 samples) are sent
// as token streams with random gaps and back-pressure; the expected packet
// words are built independently from the packet layout:
//   valid: {111,0000,ch} tsH tsM tsL evn samples... length(=n+6)
//   empty: {111,0000,ch} tsH tsM tsL evn 6
// Also checked: "last" only on the length word, the event number wrapping
// per packet, a stray token counted as a protocol error, "clear" resetting
// the event number, and one word per clock when nothing stalls.
module tb_data_format;
  import daq_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic tok_valid, tok_ready, out_valid, out_ready, idle;
  pf_tok_t tok;
  evt_word_t out;
  logic [7:0] proto_err;
  localparam logic [CH_W-1:0] CH = 3'd5;
  always #5 clk = ~clk;

  data_format dut (.clk, .rst_n, .clear, .channel(CH), .tok_valid, .tok_ready, .tok,
                   .out_valid, .out_ready, .out, .idle, .proto_err);

  int checks = 0, failures = 0;
  pf_tok_t   tq [$];
  evt_word_t eq [$];
  int evn = 0, n_empty = 0, n_valid = 0, n_full = 0;
  bit ready_rand = 1, tok_rand = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic pf_tok_t mk(tok_kind_e k, logic [TS_W-1:0] ts, logic [ADC_W-1:0] s);
    pf_tok_t t; t.kind = k; t.ts = ts; t.sample = s; return t;
  endfunction

  function automatic evt_word_t w(int d, bit l);
    evt_word_t x; x.data = WORD_W'(d); x.last = l; return x;
  endfunction

  task automatic add_packet(bit empty, int n);
    logic [TS_W-1:0] ts = TS_W'({$urandom, $urandom});
    tq.push_back(mk(empty ? TK_EMPTY : TK_START, ts, 0));
    eq.push_back(w(896 + CH, 0));                  // 3'b111 in bits 9:7
    eq.push_back(w(int'(ts[29:20]), 0));
    eq.push_back(w(int'(ts[19:10]), 0));
    eq.push_back(w(int'(ts[9:0]), 0));
    eq.push_back(w(evn % 1024, 0));
    if (empty) begin
      eq.push_back(w(6, 1)); n_empty++;
    end else begin
      for (int k = 0; k < n; k++) begin
        int s = $urandom_range(0, 1023);
        tq.push_back(mk(TK_SAMPLE, 0, ADC_W'(s)));
        eq.push_back(w(s, 0));
      end
      tq.push_back(mk(TK_END, 0, 0));
      eq.push_back(w(n + 6, 1)); n_valid++;
      if (n == MAX_DATA) n_full++;
    end
    evn++;
  endtask

  // driver
  initial begin
    tok_valid = 0; tok = '0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (tok_valid && tok_ready) void'(tq.pop_front());
      else if (tok_valid) continue;  // hold an offered token until it is taken
      if (tq.size() != 0 && (!tok_rand || $urandom_range(0, 9) < 8)) begin
        tok_valid <= 1; tok <= tq[0];
      end else tok_valid <= 0;
    end
  end

  // monitor
  int nw = 0, cyc = 0, t_soe = 0, t_len = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    evt_word_t e;
    out_ready <= !ready_rand || ($urandom_range(0, 9) < 7);
    if (rst_n && out_valid && out_ready) begin
      nw++;
      if (eq.size() == 0) check(0, "unexpected word");
      else begin
        e = eq.pop_front();
        if (e.data == WORD_W'(896 + CH) && !e.last) t_soe = cyc;
        if (e.last) t_len = cyc;
        check(out.data == e.data && out.last == e.last,
              $sformatf("word %0d got %0d/%0b exp %0d/%0b", nw, out.data, out.last, e.data, e.last));
      end
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // a stray sample token while idle is dropped and counted
    tq.push_back(mk(TK_SAMPLE, 0, 10'd7));
    repeat (10) @(posedge clk);
    check(proto_err == 8'd1, "stray token counted");
    for (int p = 0; p < 1100; p++) add_packet($urandom_range(0, 3) == 0, $urandom_range(1, 25));
    add_packet(0, 25);
    wait (eq.size() == 0 && tq.size() == 0);
    repeat (5) @(posedge clk);
    check(idle, "idle at end");
    check(n_empty > 100 && n_full > 0 && evn > 1024, "coverage");
    // clear restarts the event number
    @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
    evn = 0;
    // throughput: a 25-sample packet with no stalls takes 31 consecutive words
    ready_rand = 0; tok_rand = 0;
    @(posedge clk);
    add_packet(0, 25);
    wait (eq.size() == 0);
    check(t_len - t_soe == 30, $sformatf("31 words in %0d clocks, expected 31", t_len - t_soe + 1));
    repeat (3) @(posedge clk);
    $display("valid %0d empty %0d words %0d", n_valid, n_empty, nw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
