// snv_selector: supernova data selector of the output selector.
//
// Receives the DDR4 read data of a supernova trigger (512-bit words, rd_last
// on the last word of the request) into its own FIFO of FIFO_DEPTH words,
// and sends it on as a 256-bit AXI4-stream towards the NVMe storage path:
// each 512-bit word becomes two beats, bits [511:256] first. TLAST is set on
// the second beat of the request's last word. space_ok tells the read
// interface whether a whole 4 KByte burst still fits (flow control).
// The 256-bit width and the own FIFO follow the document; the beat order and
// the FIFO depth are this design's choices.
module snv_selector #(
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned BURST_BEATS = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [511:0]  rd_data,
  input  logic          rd_valid,
  input  logic          rd_last,
  output logic          space_ok,
  output logic [255:0]  m_tdata,
  output logic          m_tlast,
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic [31:0]   frame_count
);
  logic [512:0] q;
  logic         empty, phase, pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(513), .DEPTH(FIFO_DEPTH)) u_q (
    .clk, .rst, .wr_en(rd_valid), .wr_data({rd_last, rd_data}),
    .rd_en(pop), .rd_data(q), .full(), .empty(empty), .count(count));

  assign space_ok = (32'(FIFO_DEPTH) - 32'(count)) >= 32'(BURST_BEATS);
  assign m_tvalid = !empty;
  assign m_tdata  = phase ? q[255:0] : q[511:256];
  assign m_tlast  = phase && q[512];
  assign pop      = m_tvalid && m_tready && phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= 1'b0; frame_count <= '0;
    end else if (m_tvalid && m_tready) begin
      phase <= !phase;
      if (m_tlast) frame_count <= frame_count + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    rd_valid |-> count < ($clog2(FIFO_DEPTH+1))'(FIFO_DEPTH));
endmodule
