// compressor: Fibonacci compression of one link's raw super-packets.
//
// Input: raw super-packets on a 16-bit AXI4-stream, HDR_WORDS header words
// (flags and the 64-bit timestamp) followed by ADC samples, one 12-bit
// sample per word in bits [11:0], TLAST on the last sample. Output: the same
// packet with the header words unchanged and the samples replaced by a
// packed stream of Fibonacci code words, TLAST on its last 16-bit word.
//
// Structure (after the block diagram of the compression firmware):
//   header/payload state machine - splits each packet: header words go to the
//     header FIFO, samples go to the encoder;
//   encoder - maps each sample to a positive integer, codes it with
//     fib_encoder (one cycle) and the packer appends the code bits, first bit
//     first, to a bit buffer, from which full 16-bit words go to the payload
//     FIFO (first bit in bit 0 of a word). After the last sample of a packet
//     the remaining bits are padded with zeros to a whole word;
//   output state machine - sends HDR_WORDS words from the header FIFO, then
//     payload words up to the packet's last one.
// Mapping: d = sample - previous sample of the same packet (0 before the
// first), zigzag-mapped (0,-1,1,-2,... -> 0,1,2,3,...) and plus one, so small
// changes get short codes and 0 is never coded. A 12-bit sample therefore
// needs at most 20 code bits.
//
// Timing: one sample per cycle while the bit buffer holds fewer than 24 bits
// and the payload FIFO has room; one 16-bit payload word per cycle leaves
// the bit buffer. Every packet must hold at least one sample.
// The header/payload split, the header FIFO, the Fibonacci table, the packer,
// the payload FIFO and the output state machine follow the document's block
// diagram; the sample-to-integer mapping, the bit order, the padding and the
// FIFO depths are this design's choices, since the document does not give them.
module compressor #(
  parameter int unsigned HDR_WORDS = 5,
  parameter int unsigned HDR_DEPTH = 64,
  parameter int unsigned PAY_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tlast,
  output logic        s_tready,
  output logic [15:0] m_tdata,
  output logic        m_tvalid,
  output logic        m_tlast,
  input  logic        m_tready,
  output logic [31:0] words_in,
  output logic [31:0] words_out
);
  localparam int unsigned BUF_W = 80;
  localparam int unsigned FW    = $clog2(BUF_W + 1);

  // ---------------- header/payload state machine ----------------
  logic [$clog2(HDR_WORDS+1)-1:0] wcnt;
  logic        in_hdr, hq_full, hq_empty, hq_pop;
  logic [15:0] hq_data;
  logic        take_sample, beat;
  logic [11:0] prev;
  logic signed [12:0] diff;
  logic [15:0] zz;

  assign in_hdr = (wcnt < ($clog2(HDR_WORDS+1))'(HDR_WORDS));

  sync_fifo #(.WIDTH(16), .DEPTH(HDR_DEPTH)) u_hq (
    .clk, .rst, .wr_en(beat && in_hdr), .wr_data(s_tdata),
    .rd_en(hq_pop), .rd_data(hq_data), .full(hq_full), .empty(hq_empty), .count());

  // ---------------- encoder: table and packer ----------------
  logic [$clog2(PAY_DEPTH+1)-1:0] pq_count;
  logic        pq_full, pq_empty, pq_pop, pq_push, pq_last_in;
  logic [16:0] pq_data;
  logic [15:0] pq_word;
  logic [BUF_W-1:0] bbuf;
  logic [FW-1:0]    fill;
  logic        flushing, code_last;
  logic        code_valid, code_err;
  logic [23:0] code;
  logic [4:0]  code_len;
  logic        room;

  assign room        = (fill < FW'(24)) && !flushing &&
                       (32'(pq_count) + 32'd8 <= 32'(PAY_DEPTH));
  assign take_sample = !in_hdr && room;
  assign s_tready    = in_hdr ? !hq_full : take_sample;
  assign beat        = s_tvalid && s_tready;

  assign diff = $signed({1'b0, s_tdata[11:0]}) - $signed({1'b0, prev});
  logic [13:0] zneg;
  assign zneg = ~{diff, 1'b0};                 // -2d-1 for a negative d
  assign zz   = diff[12] ? {2'b00, zneg} : {3'b000, diff[11:0], 1'b0};

  fib_encoder #(.VALUE_W(16), .CODE_W(24)) u_fib (
    .clk, .rst, .in_valid(beat && !in_hdr), .in_value(zz + 16'd1),
    .out_valid(code_valid), .out_code(code), .out_len(code_len), .out_err(code_err));

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt <= '0; prev <= '0; code_last <= 1'b0; words_in <= '0;
    end else begin
      code_last <= beat && !in_hdr && s_tlast;
      if (beat) begin
        words_in <= words_in + 1'b1;
        if (s_tlast) begin
          wcnt <= '0; prev <= '0;
        end else if (in_hdr) begin
          wcnt <= wcnt + 1'b1;
        end else begin
          prev <= s_tdata[11:0];
        end
      end
    end
  end

  // packer: emit one word per cycle when 16 bits are there (or at the end)
  logic          emit;
  logic [FW-1:0] fill_after;
  assign emit       = !pq_full && ((fill >= FW'(16)) || (flushing && fill != '0));
  assign pq_push    = emit;
  assign pq_word    = bbuf[15:0];
  assign pq_last_in = flushing && (fill <= FW'(16));
  assign fill_after = emit ? ((fill > FW'(16)) ? fill - FW'(16) : '0) : fill;

  always_ff @(posedge clk) begin
    if (rst) begin
      bbuf <= '0; fill <= '0; flushing <= 1'b0;
    end else begin
      logic [BUF_W-1:0] b;
      b = emit ? (bbuf >> 16) : bbuf;
      if (code_valid && !code_err) b = b | (BUF_W'(code) << fill_after);
      bbuf <= b;
      fill <= fill_after + ((code_valid && !code_err) ? FW'(code_len) : '0);
      if (code_valid && code_last) flushing <= 1'b1;
      else if (emit && pq_last_in) flushing <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH(17), .DEPTH(PAY_DEPTH)) u_pq (
    .clk, .rst, .wr_en(pq_push), .wr_data({pq_last_in, pq_word}),
    .rd_en(pq_pop), .rd_data(pq_data), .full(pq_full), .empty(pq_empty), .count(pq_count));

  // ---------------- output state machine ----------------
  typedef enum logic {O_HDR, O_PAY} ostate_t;
  ostate_t ostate;
  logic [$clog2(HDR_WORDS+1)-1:0] ocnt;

  assign m_tvalid = (ostate == O_HDR) ? !hq_empty : !pq_empty;
  assign m_tdata  = (ostate == O_HDR) ? hq_data : pq_data[15:0];
  assign m_tlast  = (ostate == O_PAY) && pq_data[16];
  assign hq_pop   = (ostate == O_HDR) && m_tvalid && m_tready;
  assign pq_pop   = (ostate == O_PAY) && m_tvalid && m_tready;

  always_ff @(posedge clk) begin
    if (rst) begin
      ostate <= O_HDR; ocnt <= '0; words_out <= '0;
    end else if (m_tvalid && m_tready) begin
      words_out <= words_out + 1'b1;
      if (ostate == O_HDR) begin
        if (ocnt == ($clog2(HDR_WORDS+1))'(HDR_WORDS - 1)) begin ocnt <= '0; ostate <= O_PAY; end
        else ocnt <= ocnt + 1'b1;
      end else if (m_tlast) begin
        ostate <= O_HDR;
      end
    end
  end

  a_no_code_error: assert property (@(posedge clk) disable iff (rst) !(code_valid && code_err));
  a_buffer_bound:  assert property (@(posedge clk) disable iff (rst) fill <= FW'(BUF_W));
endmodule
