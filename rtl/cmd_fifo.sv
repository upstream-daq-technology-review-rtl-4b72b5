// cmd_fifo: command FIFO for event selection ("trigger") commands.
//
// Receives event fragment requests as a 16-bit AXI4-stream on the stream
// clock. A command is ten words, most significant first: command ID (2 words),
// start timestamp (4 words), end timestamp (4 words), TLAST on the tenth.
// The words are gathered into a trig_cmd_t and written into a dual-clock FIFO
// of CMD_DEPTH entries read on the DDR4 user clock, where the indexer and the
// event fragment selector take them. A packet whose TLAST does not come on
// the tenth word is dropped and counted in bad_cmds. s_tready is low only
// while the FIFO is full.
//
// The word order follows the document's command waveform; the FIFO depth and
// the handling of malformed commands are this design's choices.
module cmd_fifo
  import bm_pkg::*;
#(
  parameter int unsigned CMD_DEPTH = 32
) (
  input  logic        s_clk,
  input  logic        s_rst,
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [31:0] bad_cmds,

  input  logic        m_clk,
  input  logic        m_rst,
  output trig_cmd_t   cmd,
  output logic        cmd_valid,
  input  logic        cmd_pop
);
  logic [143:0] sr;
  logic [3:0]   cnt;
  logic         full, empty, push, beat;
  logic [159:0] sr_next;

  assign s_tready = !full;
  assign beat     = s_tvalid && s_tready;
  assign sr_next  = {sr, s_tdata};
  assign push     = beat && s_tlast && (cnt == 4'(CMD_WORDS-1));

  always_ff @(posedge s_clk) begin
    if (s_rst) begin
      sr <= '0; cnt <= '0; bad_cmds <= '0;
    end else if (beat) begin
      sr <= sr_next[143:0];
      if (s_tlast) begin
        cnt <= '0;
        if (cnt != 4'(CMD_WORDS-1)) bad_cmds <= bad_cmds + 1'b1;
      end else if (cnt != 4'd15) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  async_fifo #(.WIDTH(160), .DEPTH(CMD_DEPTH)) u_fifo (
    .wr_clk(s_clk), .wr_rst(s_rst), .wr_en(push), .wr_data(sr_next), .full(full), .wr_count(),
    .rd_clk(m_clk), .rd_rst(m_rst), .rd_en(cmd_pop), .rd_data(cmd), .empty(empty));

  assign cmd_valid = !empty;
endmodule
