// tb_pulse_finder: self-checking test of the pulse finder.
// A random sample stream (noise around the threshold, isolated glitches of one
// or two samples, pulses of 3..40 samples, occasional ring-buffer resyncs with
// an index jump) is fed with random valid/ready gaps. A reference model,
// written from the rules (three consecutive samples above threshold start a
// pulse, at most 25 samples, empty event after MAX_WAIT samples), predicts the
// token stream, which is compared token by token. A second phase checks that
// a quiet stream is consumed at one sample per clock.
module tb_pulse_finder;
  import daq_pkg::*;

  localparam int unsigned MAX_WAIT = 150;
  localparam int NS = 6000;
  localparam logic [THR_W-1:0] THR = 8'd4;

  logic clk = 0, rst_n = 0, clear = 0, flush = 0;
  logic in_valid, in_ready, out_valid, out_ready, busy, hit;
  rb_sample_t in;
  pf_tok_t out;
  always #5 clk = ~clk;

  pulse_finder #(.MAX_WAIT(MAX_WAIT)) dut (
    .clk, .rst_n, .clear, .flush, .threshold(THR), .in_valid, .in_ready, .in,
    .out_valid, .out_ready, .out, .busy, .hit
  );

  int checks = 0, failures = 0;
  rb_sample_t stim [NS];
  pf_tok_t exp_q [$];
  int n_start = 0, n_empty = 0, n_trunc = 0, n_resync = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic pf_tok_t mk(tok_kind_e k, logic [TS_W-1:0] ts, logic [ADC_W-1:0] s);
    pf_tok_t t; t.kind = k; t.ts = ts; t.sample = s; return t;
  endfunction

  // stimulus
  task automatic gen();
    int i = 0; logic [IDX_W-1:0] idx = 32'd1000;
    while (i < NS) begin
      int r = $urandom_range(0, 99);
      if (r < 15) begin // pulse
        int len = $urandom_range(3, 40);
        for (int k = 0; k < len && i < NS; k++) begin
          stim[i] = '{sample: ADC_W'($urandom_range(5, 714)), idx: idx, resync: 1'b0}; i++; idx++;
        end
      end else if (r < 30) begin // glitch of 1 or 2
        int len = $urandom_range(1, 2);
        for (int k = 0; k < len && i < NS; k++) begin
          stim[i] = '{sample: ADC_W'($urandom_range(5, 300)), idx: idx, resync: 1'b0}; i++; idx++;
        end
        if (i < NS) begin stim[i] = '{sample: ADC_W'($urandom_range(0, 4)), idx: idx, resync: 1'b0}; i++; idx++; end
      end else begin
        int len = $urandom_range(1, 30);
        for (int k = 0; k < len && i < NS; k++) begin
          stim[i] = '{sample: ADC_W'($urandom_range(0, 4)), idx: idx, resync: 1'b0}; i++; idx++;
        end
      end
      if (i < NS && $urandom_range(0, 199) == 0) begin
        idx += 32'd700;
        stim[i] = '{sample: ADC_W'($urandom_range(0, 600)), idx: idx, resync: 1'b1}; i++; idx++;
      end
    end
  endtask

  // reference model
  task automatic model();
    typedef enum {M_SEARCH, M_PULSE, M_REARM} m_e;
    m_e m = M_SEARCH; int run = 0; int n = 0;
    logic [IDX_W-1:0] last = stim[0].idx;
    for (int i = 0; i < NS; i++) begin
      bit h = stim[i].sample > THR;
      bit rs = stim[i].resync;
      logic [IDX_W-1:0] ix = stim[i].idx;
      if (rs) n_resync++;
      case (m)
        M_PULSE: begin
          if (h && !rs && n < MAX_DATA) begin
            exp_q.push_back(mk(TK_SAMPLE, 0, stim[i].sample)); n++;
          end else begin
            exp_q.push_back(mk(TK_END, 0, 0));
            if (h && !rs) begin m = M_REARM; n_trunc++; end
            else m = M_SEARCH;
            run = h ? 1 : 0;
          end
        end
        default: begin
          if (m == M_SEARCH && h && !rs && run >= 2 && i > 0) begin
            exp_q.push_back(mk(TK_START, TS_W'(ix - 2 - last), 0));
            exp_q.push_back(mk(TK_SAMPLE, 0, stim[i-2].sample));
            exp_q.push_back(mk(TK_SAMPLE, 0, stim[i-1].sample));
            exp_q.push_back(mk(TK_SAMPLE, 0, stim[i].sample));
            last = ix - 2; n = 3; m = M_PULSE; n_start++;
          end else begin
            run = h ? (rs ? 1 : run + 1) : 0;
            if (m == M_REARM && (!h || rs)) m = M_SEARCH;
            if (i > 0 && ix - last >= MAX_WAIT + 2) begin
              exp_q.push_back(mk(TK_EMPTY, TS_W'(MAX_WAIT), 0));
              last += MAX_WAIT; n_empty++;
            end
          end
        end
      endcase
    end
    if (m == M_PULSE) exp_q.push_back(mk(TK_END, 0, 0));
  endtask

  // output monitor
  int n_out = 0;
  bit tp_phase = 0;
  always @(posedge clk) if (rst_n && !tp_phase && out_valid && out_ready) begin
    pf_tok_t e;
    n_out++;
    if (exp_q.size() == 0) check(0, "unexpected token");
    else begin
      e = exp_q.pop_front();
      check(out.kind == e.kind, $sformatf("token %0d kind %s exp %s", n_out, out.kind.name(), e.kind.name()));
      if (e.kind == TK_START || e.kind == TK_EMPTY)
        check(out.ts == e.ts, $sformatf("token %0d ts %0d exp %0d", n_out, out.ts, e.ts));
      if (e.kind == TK_SAMPLE)
        check(out.sample == e.sample, $sformatf("token %0d sample %0d exp %0d", n_out, out.sample, e.sample));
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
    int i, t0, consumed;
    in_valid = 0; in = '0; out_ready = 0;
    gen(); model();
    $display("model: %0d pulses, %0d empty, %0d truncated, %0d resync, %0d tokens",
             n_start, n_empty, n_trunc, n_resync, exp_q.size());
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); clear <= 1; @(posedge clk); clear <= 0;
    i = 0;
    while (i < NS) begin
      in_valid  <= ($urandom_range(0, 9) < 8);
      in        <= stim[i];
      out_ready <= ($urandom_range(0, 9) < 7);
      @(posedge clk);
      if (in_valid && in_ready) i++;
    end
    in_valid <= 0;
    out_ready <= 1;
    repeat (5) @(posedge clk);
    flush <= 1;
    repeat (5) @(posedge clk);
    flush <= 0;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d tokens never produced", exp_q.size()));
    check(n_start > 20 && n_empty > 3 && n_trunc > 0 && n_resync > 0, "stimulus coverage");
    check(!busy, "busy after flush");
    // throughput: quiet stream, one sample per clock
    consumed = 0;
    tp_phase = 1;
    in_valid <= 1; out_ready <= 1;
    for (int k = 0; k < 100; k++) begin
      in <= '{sample: 10'd0, idx: stim[NS-1].idx + 1 + k, resync: 1'b0};
      @(posedge clk);
      if (in_ready) consumed++;
    end
    in_valid <= 0;
    check(consumed == 100, $sformatf("throughput %0d of 100", consumed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
