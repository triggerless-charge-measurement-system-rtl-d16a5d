// data_format: turns one channel's pulse-finder tokens into packets.
//
// Valid-event packet (document, Fig. 4): start of event, time stamp high,
// time stamp medium, time stamp low, event number, the kept samples (1..25
// data words), event length. Empty-event packet: the same five header words
// and an event length of 6. The event length counts every word of the packet,
// itself included, which gives 6 for an empty event as the document prints.
//
// Design choices: the start-of-event word is {3'b111, 4'b0000, channel}, which
// carries both the "111" marker and the channel number that the document lists
// as part of the packet; the 30-bit time stamp is split into three 10-bit
// words, high first; the event number is a 10-bit per-channel count of all
// packets (valid and empty) since the last "clear", wrapping at 1024.
//
// Timing: one output word per clock when out_ready is high. The header of a
// pulse takes five clocks during which the start token is held; each sample
// token then maps to one word; the end token produces the length word, marked
// "last". Tokens that break this order are dropped and counted in proto_err.
module data_format
  import daq_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,       // start of run: event number back to 0
  input  logic [CH_W-1:0]   channel,
  input  logic              tok_valid,
  output logic              tok_ready,
  input  pf_tok_t           tok,
  output logic              out_valid,
  input  logic              out_ready,
  output evt_word_t         out,
  output logic              idle,        // no packet under construction
  output logic [7:0]        proto_err
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_BODY, S_LEN} state_e;

  state_e            state;
  logic [2:0]        hcnt;
  logic [EVN_W-1:0]  evn;
  logic [5:0]        len;
  logic              adv, is_empty;

  assign adv  = !out_valid || out_ready;
  assign idle = (state == S_IDLE) && !out_valid;

  always_comb begin
    tok_ready = 1'b0;
    if (adv && !clear) begin
      unique case (state)
        S_IDLE: tok_ready = (tok.kind == TK_SAMPLE || tok.kind == TK_END);  // stray tokens
        S_HDR:  tok_ready = (hcnt == 3'd4);
        S_BODY: tok_ready = 1'b1;
        default: tok_ready = 1'b0;
      endcase
    end
  end

  // Stream rules: an offered token stays offered and unchanged until taken,
  // and so does an offered output word.
  a_tok_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tok_valid && !tok_ready |=> tok_valid && $stable(tok));
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hcnt      <= '0;
      evn       <= '0;
      len       <= '0;
      is_empty  <= 1'b0;
      out_valid <= 1'b0;
      out       <= '0;
      proto_err <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (clear) begin
        state <= S_IDLE;
        evn   <= '0;
      end else if (adv) begin
        unique case (state)
          S_IDLE: if (tok_valid) begin
            if (tok.kind == TK_START || tok.kind == TK_EMPTY) begin
              is_empty  <= (tok.kind == TK_EMPTY);
              out_valid <= 1'b1;
              out       <= '{data: soe_word(channel), last: 1'b0};
              hcnt      <= 3'd1;
              state     <= S_HDR;
            end else if (proto_err != '1) begin
              proto_err <= proto_err + 1'b1;
            end
          end
          S_HDR: begin
            out_valid <= 1'b1;
            out.last  <= 1'b0;
            unique case (hcnt)
              3'd1:    out.data <= tok.ts[3*WORD_W-1:2*WORD_W];
              3'd2:    out.data <= tok.ts[2*WORD_W-1:WORD_W];
              3'd3:    out.data <= tok.ts[WORD_W-1:0];
              default: out.data <= evn;
            endcase
            hcnt <= hcnt + 1'b1;
            if (hcnt == 3'd4) begin
              len   <= 6'(HDR_WORDS);
              state <= is_empty ? S_LEN : S_BODY;
            end
          end
          S_BODY: if (tok_valid) begin
            unique case (tok.kind)
              TK_SAMPLE: begin
                out_valid <= 1'b1;
                out       <= '{data: WORD_W'(tok.sample), last: 1'b0};
                len       <= len + 1'b1;
              end
              TK_END: begin
                out_valid <= 1'b1;
                out       <= '{data: WORD_W'(len + 1'b1), last: 1'b1};
                evn       <= evn + 1'b1;
                state     <= S_IDLE;
              end
              default: if (proto_err != '1) proto_err <= proto_err + 1'b1;
            endcase
          end
          S_LEN: begin
            out_valid <= 1'b1;
            out       <= '{data: WORD_W'(EMPTY_LEN), last: 1'b1};
            evn       <= evn + 1'b1;
            state     <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
