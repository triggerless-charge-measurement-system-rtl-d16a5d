// daq_pkg: types and constants shared by the triggerless charge-measurement
// firmware. Samples are 10-bit ADC codes; packets are built from 10-bit words.
// A pulse finder talks to a data formatter through a token stream (start of
// pulse with its time stamp, one token per kept sample, end of pulse, empty
// event); the data formatter emits packet words with a "last" flag that the
// multi-event buffer uses to keep packets from different channels whole.
// The 10-bit width, the eight channels, the 25-word payload limit and the
// empty-packet length of 6 follow the document. The token stream, the 30-bit
// time stamp (three 10-bit words) and the start-of-event word layout
// {3'b111, 4'b0000, channel} are this design's own choices.
package daq_pkg;

  localparam int unsigned ADC_W       = 10;  // ADC sample width
  localparam int unsigned WORD_W      = 10;  // packet / FIFO word width
  localparam int unsigned N_CH        = 8;   // channels per interface
  localparam int unsigned CH_W        = 3;   // channel number width
  localparam int unsigned THR_W       = 8;   // threshold register width
  localparam int unsigned TS_W        = 3 * WORD_W; // time stamp: high, medium, low words
  localparam int unsigned IDX_W       = 32;  // running sample index
  localparam int unsigned EVN_W       = WORD_W; // event number, one word
  localparam int unsigned MAX_DATA    = 25;  // payload words per valid packet
  localparam int unsigned HDR_WORDS   = 5;   // start, ts high, ts medium, ts low, event number
  localparam int unsigned EMPTY_LEN   = 6;   // total words of an empty packet
  localparam logic [2:0]  SOE_MARK    = 3'b111;

  // Token kinds passed from the pulse finder to the data formatter.
  typedef enum logic [1:0] {
    TK_START  = 2'd0,  // a pulse begins; ts holds its delay since the last event
    TK_SAMPLE = 2'd1,  // one kept sample of the current pulse
    TK_END    = 2'd2,  // the current pulse is over
    TK_EMPTY  = 2'd3   // no pulse for the maximum waiting time; ts holds that time
  } tok_kind_e;

  typedef struct packed {
    tok_kind_e         kind;
    logic [TS_W-1:0]   ts;
    logic [ADC_W-1:0]  sample;
  } pf_tok_t;

  // One sample read back from a ring buffer, with its position in the stream.
  typedef struct packed {
    logic [ADC_W-1:0]  sample;
    logic [IDX_W-1:0]  idx;
    logic              resync;   // samples were lost before this one
  } rb_sample_t;

  // One packet word on its way to the multi-event buffer.
  typedef struct packed {
    logic [WORD_W-1:0] data;
    logic              last;     // final word (event length) of a packet
  } evt_word_t;

  // Configuration register map (address on the 4-bit configuration bus).
  typedef enum logic [3:0] {
    CFG_CMD       = 4'd0,  // bit0 start, bit1 stop (write-only commands)
    CFG_CHANNELS  = 4'd1,  // active-channel mask
    CFG_THRESHOLD = 4'd2,  // discriminator threshold, ADC counts
    CFG_TEST      = 4'd3   // bit0: auto-test (calibration signal instead of ADC)
  } cfg_addr_e;

  function automatic logic [WORD_W-1:0] soe_word(input logic [CH_W-1:0] ch);
    return {SOE_MARK, 4'b0000, ch};
  endfunction

endpackage
