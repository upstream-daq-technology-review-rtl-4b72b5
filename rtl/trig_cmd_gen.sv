// trig_cmd_gen: event selection command generator (test and debug source).
//
// On an issue pulse it takes the command ID, start and end timestamps from
// its register inputs and sends them as one event selection command on a
// 16-bit AXI4-stream: ID[31:16], ID[15:0], start[63:48] ... start[15:0],
// end[63:48] ... end[15:0], TLAST on the tenth word. One word per accepted
// beat; an issue pulse while busy is ignored. The word order follows the
// document's command format; the rest is this design's choice.
module trig_cmd_gen
  import bm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        issue,
  input  trig_cmd_t   cmd,
  output logic [15:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tlast,
  input  logic        m_tready,
  output logic        busy
);
  logic [159:0] sr;
  logic [3:0]   cnt;

  assign m_tdata  = sr[159:144];
  assign m_tvalid = busy;
  assign m_tlast  = (cnt == 4'(CMD_WORDS - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      sr <= '0; cnt <= '0; busy <= 1'b0;
    end else if (!busy) begin
      if (issue) begin
        sr   <= cmd;
        cnt  <= '0;
        busy <= 1'b1;
      end
    end else if (m_tready) begin
      sr  <= {sr[143:0], 16'h0};
      cnt <= cnt + 1'b1;
      if (m_tlast) busy <= 1'b0;
    end
  end
endmodule
