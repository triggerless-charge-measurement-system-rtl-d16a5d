// usb_interface: FPGA side of the link to the USB microcontroller.
//
// Read-out: the microcontroller asks for words with uc_rd; each request that
// finds the multi-event buffer non-empty pops one word, which appears on
// uc_data with uc_valid one USB clock later. The microcontroller therefore
// sets the read-out rate (document: the FIFO read-out rate is set on the USB
// side, up to 200 Mbytes/s).
// Configuration: the microcontroller writes 16-bit command words
// {addr[3:0], 2'b00, data[9:0]} with uc_wr. A word is held in a register and
// handed to the processing clock domain with a toggle request/acknowledge
// handshake; it appears there as a one-clock cfg_wr. uc_busy is high from the
// write until the acknowledge returns (about five clocks of each domain);
// writes made while busy are ignored and counted in uc_dropped.
// The document only names this block; the bus protocol above is this
// design's choice.
module usb_interface
  import daq_pkg::*;
(
  // USB clock domain
  input  logic              uclk,
  input  logic              urst_n,
  input  logic              uc_rd,
  output logic [WORD_W-1:0] uc_data,
  output logic              uc_valid,
  output logic              uc_empty,
  input  logic              uc_wr,
  input  logic [15:0]       uc_wdata,
  output logic              uc_busy,
  output logic [7:0]        uc_dropped,
  // multi-event buffer read port (USB clock)
  output logic              meb_rd_en,
  input  logic [WORD_W-1:0] meb_rd_data,
  input  logic              meb_rd_valid,
  input  logic              meb_empty,
  // processing clock domain
  input  logic              pclk,
  input  logic              prst_n,
  output logic              cfg_wr,
  output logic [3:0]        cfg_addr,
  output logic [WORD_W-1:0] cfg_data
);
  // ---------------- read-out ----------------
  assign meb_rd_en = uc_rd && !meb_empty;
  assign uc_data   = meb_rd_data;
  assign uc_valid  = meb_rd_valid;
  assign uc_empty  = meb_empty;

  // ---------------- configuration, USB side ----------------
  logic              req_tgl, ack_tgl_u;
  logic [3:0]        hold_addr;
  logic [WORD_W-1:0] hold_data;

  assign uc_busy = (req_tgl != ack_tgl_u);

  always_ff @(posedge uclk or negedge urst_n) begin
    if (!urst_n) begin
      req_tgl    <= 1'b0;
      hold_addr  <= '0;
      hold_data  <= '0;
      uc_dropped <= '0;
    end else if (uc_wr) begin
      if (!uc_busy) begin
        hold_addr <= uc_wdata[15:12];
        hold_data <= uc_wdata[WORD_W-1:0];
        req_tgl   <= ~req_tgl;
      end else if (uc_dropped != '1) begin
        uc_dropped <= uc_dropped + 1'b1;
      end
    end
  end

  // ---------------- configuration, processing side ----------------
  logic req_p, req_p_d, ack_tgl;

  sync_2ff #(.W(1)) u_req (.clk(pclk), .rst_n(prst_n), .d(req_tgl), .q(req_p));
  sync_2ff #(.W(1)) u_ack (.clk(uclk), .rst_n(urst_n), .d(ack_tgl), .q(ack_tgl_u));

  always_ff @(posedge pclk or negedge prst_n) begin
    if (!prst_n) begin
      req_p_d  <= 1'b0;
      ack_tgl  <= 1'b0;
      cfg_wr   <= 1'b0;
      cfg_addr <= '0;
      cfg_data <= '0;
    end else begin
      req_p_d <= req_p;
      cfg_wr  <= 1'b0;
      if (req_p != req_p_d) begin
        cfg_wr   <= 1'b1;
        cfg_addr <= hold_addr;   // stable: held until the acknowledge
        cfg_data <= hold_data;
        ack_tgl  <= req_p;
      end
    end
  end

endmodule
