// multi_event_buffer: collects the packets of all channels into one
// 8192 x 10-bit FIFO that is emptied through the USB interface.
//
// Write side (processing clock): a round-robin arbiter picks a channel that
// offers a word, then stays with it until the packet's "last" word (event
// length) has been written, so packets never interleave. A word is written
// whenever the FIFO has room; when it is full the channel is simply held
// (in_ready low), which pauses processing while the ring buffers keep
// recording. Read side (USB clock): rd_en pops one word; rd_data is valid the
// clock after, flagged by rd_valid. Pointers cross the two clocks in Gray code.
//
// The document gives the size (8192 x 10), that all channels and all packets
// including empty ones go through it, and that the USB side sets the read
// rate. The packet-locked round-robin arbitration and the dual-clock pointer
// scheme are this design's choices. Only the 10-bit data word is stored; a
// reader finds packet boundaries from the start word and the length word.
module multi_event_buffer
  import daq_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned DEPTH = 8192
) (
  // write side, processing clock
  input  logic               wclk,
  input  logic               wrst_n,
  input  logic [NCH-1:0]     in_valid,
  output logic [NCH-1:0]     in_ready,
  input  evt_word_t          in_word [NCH],
  output logic               full,
  output logic [$clog2(DEPTH):0] wr_level,   // words stored, as seen by the writer
  // read side, USB clock
  input  logic               rclk,
  input  logic               rrst_n,
  input  logic               rd_en,
  output logic [WORD_W-1:0]  rd_data,
  output logic               rd_valid,
  output logic               empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned SW = (NCH > 1) ? $clog2(NCH) : 1;

  logic [WORD_W-1:0] mem [DEPTH];

  // ---------------- arbiter ----------------
  logic          locked;
  logic [SW-1:0] sel, rr;
  logic          wr;
  evt_word_t     wword;

  always_comb begin
    in_ready = '0;
    wr       = 1'b0;
    wword    = in_word[sel];
    if (locked && !full) begin
      in_ready[sel] = 1'b1;
      wr            = in_valid[sel];
    end
  end

  // round-robin choice: the first requesting channel at or after rr
  logic [SW-1:0] pick;
  logic          any_req;
  always_comb begin
    pick    = rr;
    any_req = 1'b0;
    for (int k = NCH - 1; k >= 0; k--) begin
      if (in_valid[(int'(rr) + k) % NCH]) begin
        pick    = SW'((int'(rr) + k) % NCH);
        any_req = 1'b1;
      end
    end
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      locked <= 1'b0;
      sel    <= '0;
      rr     <= '0;
    end else if (!locked) begin
      if (any_req) begin
        sel    <= pick;
        locked <= 1'b1;
      end
    end else if (wr && wword.last) begin
      locked <= 1'b0;
      rr     <= (int'(sel) == NCH - 1) ? '0 : sel + 1'b1;
    end
  end

  // ---------------- FIFO write domain ----------------
  logic [AW:0] wptr, wgray, rgray_w, rptr_w;
  logic [AW:0] rptr, rgray, wgray_r, wptr_r;

  always_ff @(posedge wclk) begin
    if (wr) mem[wptr[AW-1:0]] <= wword.data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr  <= '0;
      wgray <= '0;
    end else if (wr) begin
      wptr  <= wptr + 1'b1;
      wgray <= (wptr + 1'b1) ^ ((wptr + 1'b1) >> 1);
    end
  end

  sync_2ff #(.W(AW + 1)) u_rsync (.clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_w));

  always_comb begin
    rptr_w[AW] = rgray_w[AW];
    for (int i = AW - 1; i >= 0; i--) rptr_w[i] = rptr_w[i+1] ^ rgray_w[i];
  end

  assign wr_level = wptr - rptr_w;
  assign full     = (wr_level == (AW + 1)'(DEPTH));

  // ---------------- FIFO read domain ----------------

  sync_2ff #(.W(AW + 1)) u_wsync (.clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_r));

  always_comb begin
    wptr_r[AW] = wgray_r[AW];
    for (int i = AW - 1; i >= 0; i--) wptr_r[i] = wptr_r[i+1] ^ wgray_r[i];
  end

  assign empty = (wptr_r == rptr);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr     <= '0;
      rgray    <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      if (rd_en && !empty) begin
        rd_data  <= mem[rptr[AW-1:0]];
        rd_valid <= 1'b1;
        rptr     <= rptr + 1'b1;
        rgray    <= (rptr + 1'b1) ^ ((rptr + 1'b1) >> 1);
      end
    end
  end

endmodule
