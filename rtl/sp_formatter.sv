// sp_formatter: super-packet formatter (input FIFOs, round-robin MUX, stream FIFO).
//
// Each of the N_LINKS links has its own input_fifo (16-bit AXI4-stream in,
// 64-bit rows out in the DDR4 clock domain). The MUX visits the links in
// strict round-robin order 0..N_LINKS-1 and waits at each link until that
// link holds a complete super-packet, so the super-packets of one time period
// leave one after another: a "write-run". For every packet it first emits the
// header row {BEEF, CAFE, length, link number}, then the packet's rows. The
// rows are gathered eight at a time into 512-bit words (first row in bits
// [511:448]) and written to the stream FIFO (512 bits x STREAM_DEPTH). The
// last word of a run is padded with zero rows, so each run starts on a
// 512-bit boundary in memory.
//
// Alongside the data, a descriptor FIFO tells the write interface how to cut
// the stream into bursts. Words are written to memory back to back from
// address 0, so the formatter knows where each word will land: a descriptor
// closes at every 4 KByte (BURST_BEATS-word) boundary of the memory and at the
// end of each write-run (flagged run_last). Bursts are therefore full 4 KByte
// bursts except around a write-run end. A descriptor is pushed together with
// the last word it covers, so its data is present.
//
// The timestamp of the first super-packet ever written (link 0, first run) is
// captured as the indexer's initial timestamp.
//
// Throughput: one 64-bit row per DDR4 clock cycle. The document gives the
// round-robin MUX, the header, the 16x4096 input FIFOs and the 512x128 stream
// FIFO; packet alignment to 64-bit rows, run padding and the descriptor FIFO
// are this design's choices.
module sp_formatter
  import bm_pkg::*;
#(
  parameter int unsigned N_LINKS      = 40,
  parameter int unsigned IN_DEPTH     = 4096,
  parameter int unsigned STREAM_DEPTH = 128,
  parameter int unsigned BURST_BEATS  = 64
) (
  input  logic                      s_clk,
  input  logic                      s_rst,
  input  logic                      enable,
  input  logic [N_LINKS-1:0][15:0]  s_tdata,
  input  logic [N_LINKS-1:0]        s_tvalid,
  input  logic [N_LINKS-1:0]        s_tlast,
  output logic [N_LINKS-1:0]        s_tready,

  input  logic                      m_clk,
  input  logic                      m_rst,
  // stream FIFO read port
  output logic [511:0]              wdata,
  output logic                      wdata_valid,
  input  logic                      wdata_pop,
  // burst descriptors
  output logic                      desc_valid,
  output logic [$clog2(BURST_BEATS+1)-1:0] desc_beats,
  output logic                      desc_run_last,
  input  logic                      desc_pop,
  // initial timestamp for the indexer
  output logic [63:0]               init_ts,
  output logic                      init_ts_valid
);
  localparam int unsigned LW = $clog2(N_LINKS);
  localparam int unsigned BW = $clog2(BURST_BEATS+1);

  logic [N_LINKS-1:0]       pkt_valid, pkt_pop, row_valid, row_pop;
  logic [N_LINKS-1:0][15:0] pkt_len;
  logic [N_LINKS-1:0][63:0] rows;

  for (genvar i = 0; i < N_LINKS; i++) begin : g_in
    input_fifo #(.DEPTH_WORDS(IN_DEPTH)) u_in (
      .s_clk, .s_rst, .enable,
      .s_tdata(s_tdata[i]), .s_tvalid(s_tvalid[i]), .s_tlast(s_tlast[i]), .s_tready(s_tready[i]),
      .m_clk, .m_rst,
      .pkt_valid(pkt_valid[i]), .pkt_len(pkt_len[i]), .pkt_pop(pkt_pop[i]),
      .row(rows[i]), .row_valid(row_valid[i]), .row_pop(row_pop[i]));
  end

  typedef enum logic [1:0] {S_HDR, S_BODY, S_PAD} state_t;
  state_t      state;
  logic [LW-1:0] link;
  logic [13:0] rows_left;
  logic [13:0] body_idx;
  logic        first_pkt;

  // row emitted this cycle
  logic        emit;
  logic [63:0] emit_row;
  logic        emit_end;       // last row of the write-run
  logic        sink_ready;

  logic [511:0] word_acc;
  logic [2:0]   slot;
  logic         push;
  logic [511:0] push_word;
  logic         push_last;
  logic [BW-1:0] dlen;       // words since the last descriptor
  logic [BW-1:0] pos;        // word position inside the current 4 KByte block
  logic          desc_push;

  logic data_full, desc_full, data_empty, desc_empty;

  assign sink_ready = !data_full && !desc_full;

  always_comb begin
    emit     = 1'b0;
    emit_row = '0;
    emit_end = 1'b0;
    pkt_pop  = '0;
    row_pop  = '0;
    unique case (state)
      S_HDR: if (pkt_valid[link] && sink_ready) begin
        emit     = 1'b1;
        emit_row = {MAGIC0, MAGIC1, pkt_len[link], 16'(link)};
      end
      S_BODY: if (row_valid[link] && sink_ready) begin
        emit          = 1'b1;
        emit_row      = rows[link];
        row_pop[link] = 1'b1;
        if (rows_left == 14'd1) begin
          pkt_pop[link] = 1'b1;
          emit_end      = (link == LW'(N_LINKS-1));
        end
      end
      S_PAD: if (sink_ready) begin
        emit     = 1'b1;
        emit_row = '0;
        emit_end = 1'b1;
      end
      default: ;
    endcase
  end

  // gather rows into 512-bit words
  always_comb begin
    push_word = word_acc;
    push_word[511 - 64*slot -: 64] = emit_row;
    push      = emit && (slot == 3'd7);
    push_last = emit_end && (slot == 3'd7);
  end

  always_ff @(posedge m_clk) begin
    if (m_rst) begin
      state <= S_HDR; link <= '0; rows_left <= '0; body_idx <= '0;
      first_pkt <= 1'b1; init_ts <= '0; init_ts_valid <= 1'b0;
      word_acc <= '0; slot <= '0; dlen <= '0; pos <= '0;
    end else begin
      if (emit) begin
        slot     <= slot + 3'd1;
        word_acc <= (slot == 3'd7) ? '0 : push_word;
      end
      if (push) begin
        pos  <= (pos == BW'(BURST_BEATS-1)) ? '0 : pos + 1'b1;
        dlen <= desc_push ? '0 : dlen + 1'b1;
      end

      unique case (state)
        S_HDR: if (emit) begin
          state     <= S_BODY;
          rows_left <= 14'((pkt_len[link] + 16'd3) >> 2);
          body_idx  <= '0;
        end
        S_BODY: if (emit) begin
          body_idx  <= body_idx + 1'b1;
          rows_left <= rows_left - 1'b1;
          if (first_pkt && body_idx == 14'd0) init_ts[63:16] <= emit_row[47:0];
          if (first_pkt && body_idx == 14'd1) begin
            init_ts[15:0] <= emit_row[63:48];
            init_ts_valid <= 1'b1;
            first_pkt     <= 1'b0;
          end
          if (rows_left == 14'd1) begin
            if (link == LW'(N_LINKS-1)) begin
              link  <= '0;
              state <= (slot == 3'd7) ? S_HDR : S_PAD;
            end else begin
              link  <= link + 1'b1;
              state <= S_HDR;
            end
          end
        end
        S_PAD: if (emit && slot == 3'd7) state <= S_HDR;
        default: ;
      endcase
    end
  end

  sync_fifo #(.WIDTH(512), .DEPTH(STREAM_DEPTH)) u_stream (
    .clk(m_clk), .rst(m_rst), .wr_en(push), .wr_data(push_word),
    .rd_en(wdata_pop), .rd_data(wdata), .full(data_full), .empty(data_empty), .count());

  sync_fifo #(.WIDTH(BW+1), .DEPTH(STREAM_DEPTH)) u_desc (
    .clk(m_clk), .rst(m_rst),
    .wr_en(desc_push),
    .wr_data({push_last, BW'(dlen + 1'b1)}),
    .rd_en(desc_pop), .rd_data({desc_run_last, desc_beats}),
    .full(desc_full), .empty(desc_empty), .count());

  assign desc_push   = push && (push_last || pos == BW'(BURST_BEATS-1));
  assign wdata_valid = !data_empty;
  assign desc_valid  = !desc_empty;
endmodule
