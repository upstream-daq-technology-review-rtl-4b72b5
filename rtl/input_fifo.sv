// input_fifo: one compressed-data link into the buffer manager.
//
// The write side runs on the link's AXI4-stream clock. 16-bit words of a
// super-packet (flags, four timestamp words, payload) are packed four to a
// 64-bit row, first word in bits [63:48]; the last row of a packet is padded
// with zeros. Rows go through a dual-clock FIFO holding DEPTH_WORDS 16-bit
// words (the document's 16x4096). The packet's length in 16-bit words is
// counted while it arrives and, at TLAST, pushed into a small length FIFO, so
// the read side (DDR4 user clock) sees a packet only once it is complete.
//
// enable gates the link at packet boundaries: a packet that starts while
// enable is low is accepted and discarded, so the sender is never blocked by
// a disabled buffer manager (this design's choice). s_tready drops only when
// the row FIFO or the length FIFO is full.
//
// Read side: pkt_valid/pkt_len describe the oldest complete packet, row/
// row_valid its next row, row_pop takes a row and pkt_pop retires the length.
module input_fifo #(
  parameter int unsigned DEPTH_WORDS = 4096,
  parameter int unsigned LEN_DEPTH   = 64
) (
  input  logic        s_clk,
  input  logic        s_rst,
  input  logic        enable,
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,

  input  logic        m_clk,
  input  logic        m_rst,
  output logic        pkt_valid,
  output logic [15:0] pkt_len,
  input  logic        pkt_pop,
  output logic [63:0] row,
  output logic        row_valid,
  input  logic        row_pop
);
  localparam int unsigned ROWS = DEPTH_WORDS / 4;

  logic [63:0] acc;
  logic [1:0]  wsel;
  logic [15:0] len;
  logic        in_pkt, drop;
  logic        row_full, len_full;
  logic        row_wr, len_wr;
  logic [63:0] row_wdata;
  logic        row_empty, len_empty;
  logic        beat;

  assign s_tready = !row_full && !len_full;
  assign beat     = s_tvalid && s_tready;

  // the word just received completes a row at slot 3 or at the packet end
  always_comb begin
    row_wdata = acc;
    row_wdata[63 - 16*wsel -: 16] = s_tdata;
  end

  // discard decision taken at the first word of each packet
  logic drop_now;
  assign drop_now = in_pkt ? drop : !enable;
  assign row_wr   = beat && !drop_now && (wsel == 2'd3 || s_tlast);
  assign len_wr   = beat && !drop_now && s_tlast;

  always_ff @(posedge s_clk) begin
    if (s_rst) begin
      acc <= '0; wsel <= '0; len <= '0; in_pkt <= 1'b0; drop <= 1'b0;
    end else if (beat) begin
      drop   <= drop_now;
      in_pkt <= !s_tlast;
      if (wsel == 2'd3 || s_tlast) begin
        acc  <= '0;
        wsel <= '0;
      end else begin
        acc  <= row_wdata;
        wsel <= wsel + 1'b1;
      end
      len <= s_tlast ? 16'd0 : len + 16'd1;
    end
  end

  async_fifo #(.WIDTH(64), .DEPTH(ROWS)) u_rows (
    .wr_clk(s_clk), .wr_rst(s_rst), .wr_en(row_wr), .wr_data(row_wdata),
    .full(row_full), .wr_count(),
    .rd_clk(m_clk), .rd_rst(m_rst), .rd_en(row_pop), .rd_data(row), .empty(row_empty));

  async_fifo #(.WIDTH(16), .DEPTH(LEN_DEPTH)) u_len (
    .wr_clk(s_clk), .wr_rst(s_rst), .wr_en(len_wr), .wr_data(len + 16'd1),
    .full(len_full), .wr_count(),
    .rd_clk(m_clk), .rd_rst(m_rst), .rd_en(pkt_pop), .rd_data(pkt_len), .empty(len_empty));

  assign pkt_valid = !len_empty;
  assign row_valid = !row_empty;
endmodule
