// evt_selector: event fragment selector of the output selector.
//
// Builds one event fragment per event selection command from the DDR4 data
// the read interface returns for it. Read data (512-bit words, rd_last on the
// final word of a command's range) first goes into this block's own FIFO of
// FIFO_DEPTH words; space_ok tells the read interface whether a whole 4 KByte
// burst still fits, which is how back-pressure reaches the memory side.
// Commands arrive in the same order as their reads, through cmd_push into a
// small command queue.
//
// The words are parsed one 64-bit row per cycle. A row starting with the
// magic words BEEF CAFE opens a super-packet: it carries the packet length in
// 16-bit words and the link number, the next two rows carry the flags and the
// 64-bit timestamp. The super-packet is kept when its time slot
// [ts, ts+TS_PER_RUN) overlaps the command's [t_start, t_end]; it is then
// forwarded whole (header rows included), otherwise its rows are dropped.
// Rows between packets (run padding) are skipped.
//
// Output: a 128-bit AXI4-stream. The first beat of every fragment is a header
// {command ID, t_start, t_end[31:0]}; then the kept rows, two per beat, first
// row in bits [127:64]. TLAST marks the last beat; a last beat holding one
// row has TKEEP = 16'hFF00, all others 16'hFFFF. A command with no matching
// packet gives a header-only fragment.
//
// The magic-word detection, the timestamp comparison, the own FIFO with flow
// control and the command ID at the start of the fragment follow the
// document; the header layout, the overlap rule and the one-row-per-cycle
// parser are this design's choices.
module evt_selector
  import bm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 512,
  parameter int unsigned CMDQ_DEPTH  = 16,
  parameter int unsigned TS_PER_RUN  = 64,
  parameter int unsigned BURST_BEATS = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  trig_cmd_t     cmd_in,
  input  logic          cmd_push,
  output logic          cmd_full,
  input  logic [511:0]  rd_data,
  input  logic          rd_valid,
  input  logic          rd_last,
  output logic          space_ok,
  output logic [127:0]  m_tdata,
  output logic [15:0]   m_tkeep,
  output logic          m_tlast,
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic [31:0]   frag_count,
  output logic [31:0]   pkt_kept,
  output logic [31:0]   pkt_dropped
);
  localparam int unsigned OQ_DEPTH = 16;

  // input data FIFO
  logic [512:0] dq_out;
  logic         dq_empty, dq_pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] dq_count;
  sync_fifo #(.WIDTH(513), .DEPTH(FIFO_DEPTH)) u_dq (
    .clk, .rst, .wr_en(rd_valid), .wr_data({rd_last, rd_data}),
    .rd_en(dq_pop), .rd_data(dq_out), .full(), .empty(dq_empty), .count(dq_count));
  assign space_ok = (32'(FIFO_DEPTH) - 32'(dq_count)) >= 32'(BURST_BEATS);

  // command queue
  trig_cmd_t cq_out;
  logic      cq_empty, cq_pop;
  sync_fifo #(.WIDTH($bits(trig_cmd_t)), .DEPTH(CMDQ_DEPTH)) u_cq (
    .clk, .rst, .wr_en(cmd_push), .wr_data(cmd_in),
    .rd_en(cq_pop), .rd_data(cq_out), .full(cmd_full), .empty(cq_empty), .count());

  // output FIFO {last, keep, data}
  logic         oq_push, oq_empty;
  logic [144:0] oq_in;
  logic [$clog2(OQ_DEPTH+1)-1:0] oq_count;
  sync_fifo #(.WIDTH(145), .DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst, .wr_en(oq_push), .wr_data(oq_in),
    .rd_en(m_tvalid && m_tready), .rd_data({m_tlast, m_tkeep, m_tdata}),
    .full(), .empty(oq_empty), .count(oq_count));
  assign m_tvalid = !oq_empty;

  typedef enum logic [3:0] {P_CMD, P_SEEK, P_H1, P_H2, P_E0, P_E1, P_E2, P_BODY, P_FLUSH} pstate_t;
  pstate_t state;

  logic [2:0]   rsel;
  logic [63:0]  row;
  logic [63:0]  h0, h1, h2;
  logic [15:0]  len;
  logic [14:0]  rows_left;
  logic         keep;
  logic         end_pending;
  logic [63:0]  ts;
  logic         go, consume, last_row, going_end;
  logic         sel_now;

  // packer: half row and a held beat (so TLAST can be put on the last one)
  logic [63:0]  half;
  logic         half_v;
  logic [143:0] hold;
  logic         hold_v;

  logic         emit_row_v;
  logic [63:0]  emit_row;
  logic         beat_v;
  logic [143:0] beat;       // {keep, data}

  assign go       = 32'(oq_count) <= 32'(OQ_DEPTH - 4);
  assign row      = dq_out[511 - 64*rsel -: 64];
  assign ts       = {h1[47:0], row[63:48]};
  assign sel_now  = (ts + 64'(TS_PER_RUN) > cq_out.t_start) && (ts <= cq_out.t_end);

  always_comb begin
    consume = 1'b0;
    emit_row_v = 1'b0;
    emit_row   = '0;
    if (go && !dq_empty) begin
      unique case (state)
        P_SEEK, P_H1, P_H2: consume = 1'b1;
        P_BODY: begin
          consume    = 1'b1;
          emit_row_v = keep;
          emit_row   = row;
        end
        default: ;
      endcase
    end
    if (go) begin
      unique case (state)
        P_E0: begin emit_row_v = 1'b1; emit_row = h0; end
        P_E1: begin emit_row_v = 1'b1; emit_row = h1; end
        P_E2: begin emit_row_v = 1'b1; emit_row = h2; end
        default: ;
      endcase
    end
    last_row  = consume && rsel == 3'd7 && dq_out[512];
    going_end = last_row || end_pending;
    dq_pop    = consume && rsel == 3'd7;
  end

  // beat assembly
  always_comb begin
    beat_v = 1'b0;
    beat   = '0;
    if (state == P_CMD && go && !cq_empty) begin
      beat_v = 1'b1;
      beat   = {16'hFFFF, cq_out.id, cq_out.t_start, cq_out.t_end[31:0]};
    end else if (emit_row_v && half_v) begin
      beat_v = 1'b1;
      beat   = {16'hFFFF, half, emit_row};
    end else if (state == P_FLUSH && go && half_v) begin
      beat_v = 1'b1;
      beat   = {16'hFF00, half, 64'd0};
    end
    oq_push = 1'b0;
    oq_in   = {1'b0, hold};
    if (beat_v && hold_v) oq_push = 1'b1;
    if (state == P_FLUSH && go && !half_v) begin
      oq_push = 1'b1;
      oq_in   = {1'b1, hold};
    end
    cq_pop = (state == P_FLUSH) && go && !half_v;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_CMD; rsel <= '0; h0 <= '0; h1 <= '0; h2 <= '0; len <= '0;
      rows_left <= '0; keep <= 1'b0; end_pending <= 1'b0;
      half <= '0; half_v <= 1'b0; hold <= '0; hold_v <= 1'b0;
      frag_count <= '0; pkt_kept <= '0; pkt_dropped <= '0;
    end else begin
      if (consume) rsel <= rsel + 3'd1;
      if (last_row) end_pending <= 1'b1;

      if (emit_row_v) begin
        if (half_v) half_v <= 1'b0;
        else begin half <= emit_row; half_v <= 1'b1; end
      end
      if (beat_v) begin
        hold   <= beat;
        hold_v <= 1'b1;
        if (state == P_FLUSH) half_v <= 1'b0;
      end

      unique case (state)
        P_CMD: if (go && !cq_empty) begin
          state       <= P_SEEK;
          end_pending <= 1'b0;
        end
        P_SEEK: if (consume) begin
          if (row[63:48] == MAGIC0 && row[47:32] == MAGIC1) begin
            h0    <= row;
            len   <= row[31:16];
            state <= going_end ? P_FLUSH : P_H1;
          end else if (going_end) state <= P_FLUSH;
        end
        P_H1: if (consume) begin
          h1    <= row;
          state <= going_end ? P_FLUSH : P_H2;
        end
        P_H2: if (consume) begin
          logic [14:0] body;
          body = 15'((17'(len) + 17'd3) >> 2) - 15'd2;
          h2        <= row;
          keep      <= sel_now;
          rows_left <= body;
          if (sel_now) begin
            pkt_kept <= pkt_kept + 1'b1;
            state    <= P_E0;
          end else begin
            pkt_dropped <= pkt_dropped + 1'b1;
            state <= going_end ? P_FLUSH : (body == '0 ? P_SEEK : P_BODY);
          end
        end
        P_E0: if (go) state <= P_E1;
        P_E1: if (go) state <= P_E2;
        P_E2: if (go) state <= end_pending ? P_FLUSH : (rows_left == '0 ? P_SEEK : P_BODY);
        P_BODY: if (consume) begin
          rows_left <= rows_left - 1'b1;
          if (going_end) state <= P_FLUSH;
          else if (rows_left == 15'd1) state <= P_SEEK;
        end
        P_FLUSH: if (go && !half_v) begin
          hold_v     <= 1'b0;
          frag_count <= frag_count + 1'b1;
          state      <= P_CMD;
        end
        default: ;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    rd_valid |-> dq_count < ($clog2(FIFO_DEPTH+1))'(FIFO_DEPTH));
endmodule
