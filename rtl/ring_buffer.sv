// ring_buffer: per-channel dual-port memory that stores every ADC sample.
//
// The write side runs on the ADC clock and writes one sample per cycle while
// wr_en is high; it never waits, so acquisition is never interrupted. The read
// side runs on the faster processing clock and streams the stored samples out
// in order (valid/ready), each tagged with its running sample index. Because
// the read clock is twice the write clock (document), a reader that is not
// stalled always catches up. The write position is a wide binary counter that
// crosses to the read domain in Gray code through a two-stage synchroniser.
//
// If the reader is stalled so long that the writer is about to overwrite
// unread samples (fill above DEPTH-MARGIN), the reader skips forward to half a
// buffer behind the writer, counts an overrun and marks the next sample with
// "resync" so that downstream logic knows the stream is not contiguous. The
// overwrite-and-skip policy, the margin and the index tag are this design's
// choices; the 8192 x 10 size and the 40/80 MHz clocks are the document's.
//
// Timing: a sample written on the ADC clock can be read about three read
// clocks later; out_valid/out hold until out_ready.
module ring_buffer
  import daq_pkg::*;
#(
  parameter int unsigned DEPTH  = 8192,
  parameter int unsigned MARGIN = 8
) (
  // write side, ADC clock
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              wr_en,
  input  logic [ADC_W-1:0]  wr_data,
  // read side, processing clock
  input  logic              rclk,
  input  logic              rrst_n,
  output logic              out_valid,
  input  logic              out_ready,
  output rb_sample_t        out,
  output logic              empty,       // nothing stored and nothing pending
  output logic [15:0]       overruns     // number of skips (saturating)
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [ADC_W-1:0] mem [DEPTH];

  // ---------------- write domain ----------------
  logic [IDX_W-1:0] wcnt, wgray;

  always_ff @(posedge wclk) begin
    if (wr_en) mem[wcnt[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wcnt  <= '0;
      wgray <= '0;
    end else if (wr_en) begin
      wcnt  <= wcnt + 1'b1;
      wgray <= (wcnt + 1'b1) ^ ((wcnt + 1'b1) >> 1);
    end
  end

  // ---------------- read domain ----------------
  logic [IDX_W-1:0] wgray_r, wcnt_r, rcnt, fill;
  logic             resync_pending;

  sync_2ff #(.W(IDX_W)) u_sync (.clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_r));

  always_comb begin
    wcnt_r[IDX_W-1] = wgray_r[IDX_W-1];
    for (int i = IDX_W - 2; i >= 0; i--) wcnt_r[i] = wcnt_r[i+1] ^ wgray_r[i];
  end

  assign fill  = wcnt_r - rcnt;
  assign empty = (fill == '0) && !out_valid;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rcnt           <= '0;
      out_valid      <= 1'b0;
      out            <= '0;
      resync_pending <= 1'b0;
      overruns       <= '0;
    end else if (!out_valid || out_ready) begin
      if (fill > IDX_W'(DEPTH - MARGIN)) begin
        rcnt           <= wcnt_r - IDX_W'(DEPTH / 2);
        resync_pending <= 1'b1;
        out_valid      <= 1'b0;
        if (overruns != '1) overruns <= overruns + 1'b1;
      end else if (fill != '0) begin
        out.sample     <= mem[rcnt[AW-1:0]];
        out.idx        <= rcnt;
        out.resync     <= resync_pending;
        resync_pending <= 1'b0;
        out_valid      <= 1'b1;
        rcnt           <= rcnt + 1'b1;
      end else begin
        out_valid      <= 1'b0;
      end
    end
  end

endmodule
