// pulse_finder: triggerless pulse search on one channel's sample stream.
//
// Each sample read from the ring buffer is compared with the programmable
// threshold (a hit is a sample strictly above it). A pulse is recognised when
// three consecutive samples are hits, which rejects shorter glitches
// (document). The pulse then consists of those three samples and every
// following hit, up to MAX_DATA (25) samples, the payload limit of the packet
// format. Samples below the threshold are dropped, which is the zero
// suppression of the design.
//
// Output is a token stream to the data formatter: TK_START (time stamp),
// one TK_SAMPLE per kept sample, TK_END. The time stamp is the number of
// samples between this pulse's first sample and the previous event of the
// channel. When MAX_WAIT samples pass without a pulse, a TK_EMPTY token with
// time stamp MAX_WAIT is sent instead, so time stays continuous (document).
//
// Design choices: after a pulse is cut at 25 samples, no new pulse is looked
// for until a sample falls below the threshold; a "resync" sample (data lost
// in the ring buffer) or "flush" (end of run) closes an open pulse and clears
// the three-sample window; "clear" (start of run) restarts the time reference
// at the first sample that follows. The search consumes one sample per clock;
// when a pulse is found the input is held for three clocks while the two
// buffered samples and the current one are sent.
module pulse_finder
  import daq_pkg::*;
#(
  parameter int unsigned MAX_WAIT = 40_000_000  // samples before an empty event (1 s at 40 MHz)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,       // start of run
  input  logic              flush,       // end of run: close an open pulse
  input  logic [THR_W-1:0]  threshold,
  input  logic              in_valid,
  output logic              in_ready,
  input  rb_sample_t        in,
  output logic              out_valid,
  input  logic              out_ready,
  output pf_tok_t           out,
  output logic              busy,        // a pulse is open or a token is pending
  output logic              hit          // current input sample is above threshold
);
  typedef enum logic [2:0] {S_SEARCH, S_EMIT0, S_EMIT1, S_EMIT2, S_PULSE, S_REARM} state_e;

  state_e           state;
  logic [ADC_W-1:0] prev2, prev1, cur;   // window of the last samples
  logic [1:0]       nabove;              // consecutive hits ending at prev1 (saturates at 2)
  logic             first;
  logic [IDX_W-1:0] last_ev;
  logic [5:0]       nsamp;
  logic             adv;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && !clear && (state == S_SEARCH || state == S_PULSE || state == S_REARM);
  assign hit      = in.sample > ADC_W'(threshold);
  assign busy     = (state != S_SEARCH && state != S_REARM) || out_valid;

  // Time reference as seen by the current sample (first sample of a run resets it).
  logic [IDX_W-1:0] ref_idx, since;
  assign ref_idx = first ? in.idx : last_ev;
  assign since   = in.idx - ref_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_SEARCH;
      prev2     <= '0;
      prev1     <= '0;
      cur       <= '0;
      nabove    <= '0;
      first     <= 1'b1;
      last_ev   <= '0;
      nsamp     <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (clear) begin
        state  <= S_SEARCH;
        nabove <= '0;
        first  <= 1'b1;
      end else if (adv) begin
        unique case (state)
          S_SEARCH, S_REARM: begin
            if (in_valid) begin
              first <= 1'b0;
              if (first) last_ev <= in.idx;
              if (state == S_SEARCH && hit && !in.resync && nabove == 2'd2) begin
                // three consecutive hits: pulse starts two samples back
                out_valid <= 1'b1;
                out.kind  <= TK_START;
                out.ts    <= TS_W'(since - 2);
                out.sample <= '0;
                last_ev   <= in.idx - 2;
                cur       <= in.sample;
                state     <= S_EMIT0;
              end else begin
                prev2  <= prev1;
                prev1  <= in.sample;
                nabove <= hit ? ((in.resync || nabove == 2'd0) ? 2'd1 : 2'd2) : 2'd0;
                if (state == S_REARM && (!hit || in.resync)) state <= S_SEARCH;
                if (!first && since >= IDX_W'(MAX_WAIT + 2)) begin
                  out_valid  <= 1'b1;
                  out.kind   <= TK_EMPTY;
                  out.ts     <= TS_W'(MAX_WAIT);
                  out.sample <= '0;
                  last_ev    <= last_ev + IDX_W'(MAX_WAIT);
                end
              end
            end else if (flush) begin
              nabove <= '0;
              state  <= S_SEARCH;
            end
          end
          S_EMIT0: begin
            out_valid <= 1'b1; out.kind <= TK_SAMPLE; out.sample <= prev2;
            state <= S_EMIT1;
          end
          S_EMIT1: begin
            out_valid <= 1'b1; out.kind <= TK_SAMPLE; out.sample <= prev1;
            state <= S_EMIT2;
          end
          S_EMIT2: begin
            out_valid <= 1'b1; out.kind <= TK_SAMPLE; out.sample <= cur;
            nsamp <= 6'd3;
            state <= S_PULSE;
          end
          S_PULSE: begin
            if (in_valid) begin
              if (hit && !in.resync && nsamp < 6'(MAX_DATA)) begin
                out_valid  <= 1'b1;
                out.kind   <= TK_SAMPLE;
                out.sample <= in.sample;
                nsamp      <= nsamp + 1'b1;
              end else begin
                out_valid  <= 1'b1;
                out.kind   <= TK_END;
                out.sample <= '0;
                prev1      <= in.sample;
                nabove     <= hit ? 2'd1 : 2'd0;
                state      <= (hit && !in.resync) ? S_REARM : S_SEARCH;
              end
            end else if (flush) begin
              out_valid  <= 1'b1;
              out.kind   <= TK_END;
              out.sample <= '0;
              nabove     <= '0;
              state      <= S_SEARCH;
            end
          end
          default: state <= S_SEARCH;
        endcase
      end
    end
  end

endmodule
