// mem_rd_if: AXI4 read interface of the buffer manager.
//
// Serves two kinds of read request over one AXI4 read channel:
//  * event selection: a byte range [start, end) of the circular buffer, as
//    computed by the indexer (end may be below start when the range wraps);
//  * supernova: on a trigger pulse, the most recent snv_words 16-bit words
//    written, i.e. the range that ends at the current write pointer, rounded
//    up to whole 64-byte beats.
// Each request is cut into INCR bursts of up to 64 beats of 64 bytes (4 KByte)
// that never cross a 4 KByte boundary and wrap at MEM_BYTES. The two request
// kinds alternate burst by burst, and a burst is only issued when the output
// selector it is for reports room for a full burst (evt_space_ok /
// snv_space_ok): that is the flow control. One burst is in flight at a time.
//
// Read data leaves on rd_data/rd_valid with rd_src (0 = event selection,
// 1 = supernova) taken from ARID, and rd_last marks the final beat of a whole
// request. An event range of length 0 is taken as the whole memory.
//
// The request kinds, 4 KByte bursts and flow control follow the document;
// which supernova data is read (the latest words) and the burst-level
// alternation are this design's choices.
module mem_rd_if #(
  parameter int unsigned ADDR_W    = 32,
  parameter longint unsigned MEM_BYTES = 64'h8000_0000
) (
  input  logic              clk,
  input  logic              rst,
  // event selection request from the indexer
  input  logic              evt_req_valid,
  input  logic [ADDR_W-1:0] evt_start,
  input  logic [ADDR_W-1:0] evt_end,
  output logic              evt_req_ready,
  // supernova trigger
  input  logic              snv_trig,
  input  logic [31:0]       snv_words,
  input  logic [ADDR_W-1:0] wr_ptr,
  // flow control from the output selectors
  input  logic              evt_space_ok,
  input  logic              snv_space_ok,
  // AXI4 read address channel
  output logic [ADDR_W-1:0] m_araddr,
  output logic [7:0]        m_arlen,
  output logic [2:0]        m_arsize,
  output logic [1:0]        m_arburst,
  output logic [0:0]        m_arid,
  output logic              m_arvalid,
  input  logic              m_arready,
  // AXI4 read data channel
  input  logic [511:0]      m_rdata,
  input  logic [1:0]        m_rresp,
  input  logic [0:0]        m_rid,
  input  logic              m_rlast,
  input  logic              m_rvalid,
  output logic              m_rready,
  // read data to the output selectors
  output logic [511:0]      rd_data,
  output logic              rd_valid,
  output logic              rd_src,
  output logic              rd_last,
  output logic              snv_busy,
  output logic [31:0]       resp_errors
);
  localparam int unsigned BA = ADDR_W - 6;          // beat address width
  localparam logic [BA:0] MEM_BEATS = (BA+1)'(MEM_BYTES >> 6);

  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_t;
  rstate_t state;

  // per-source context: next beat address and beats left
  logic [1:0]        active;
  logic [1:0][BA-1:0] ptr;
  logic [1:0][BA:0]   left;
  logic              src;       // source of the burst in flight
  logic              prio;      // source preferred next
  logic [6:0]        n;
  logic              final_burst;

  logic [BA:0] evt_len, snv_len;
  logic [BA:0] snv_beats_req;

  always_comb begin
    evt_len = {1'b0, evt_end[ADDR_W-1:6]} - {1'b0, evt_start[ADDR_W-1:6]};
    if (evt_end[ADDR_W-1:6] < evt_start[ADDR_W-1:6]) evt_len = evt_len + MEM_BEATS;
    if (evt_len == '0) evt_len = MEM_BEATS;
    snv_beats_req = (BA+1)'((64'(snv_words) * 2 + 63) >> 6);
    snv_len = (snv_beats_req > MEM_BEATS) ? MEM_BEATS : snv_beats_req;
  end

  // choose the source of the next burst
  logic        can_e, can_s, pick_valid, pick;
  assign can_e = active[0] && evt_space_ok;
  assign can_s = active[1] && snv_space_ok;
  always_comb begin
    pick_valid = can_e || can_s;
    if (can_e && can_s) pick = prio;
    else pick = can_s;
  end

  // burst length for the chosen source
  always_comb begin
    logic [6:0] to_4k;
    to_4k = 7'd64 - {1'b0, ptr[src][5:0]};
    n = (left[src] < (BA+1)'(to_4k)) ? 7'(left[src]) : to_4k;
  end

  assign evt_req_ready = !active[0];
  assign snv_busy      = active[1];
  assign m_araddr  = {ptr[src], 6'b0};
  assign m_arlen   = 8'(n - 7'd1);
  assign m_arsize  = 3'd6;
  assign m_arburst = 2'b01;
  assign m_arid    = src;
  assign m_arvalid = (state == R_ADDR);
  assign m_rready  = (state == R_DATA);
  assign rd_data   = m_rdata;
  assign rd_valid  = m_rvalid && m_rready;
  assign rd_src    = m_rid[0];
  assign rd_last   = m_rlast && final_burst;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= R_IDLE; active <= '0; ptr <= '0; left <= '0;
      src <= 1'b0; prio <= 1'b0; final_burst <= 1'b0; resp_errors <= '0;
    end else begin
      if (evt_req_valid && evt_req_ready) begin
        active[0] <= 1'b1;
        ptr[0]    <= evt_start[ADDR_W-1:6];
        left[0]   <= evt_len;
      end
      if (snv_trig && !active[1] && snv_len != '0) begin
        logic [BA:0] p;
        p = {1'b0, wr_ptr[ADDR_W-1:6]} - snv_len;
        if ({1'b0, wr_ptr[ADDR_W-1:6]} < snv_len) p = p + MEM_BEATS;
        active[1] <= 1'b1;
        ptr[1]    <= BA'(p);
        left[1]   <= snv_len;
      end
      unique case (state)
        R_IDLE: if (pick_valid) begin
          src   <= pick;
          prio  <= !pick;
          state <= R_ADDR;
        end
        R_ADDR: if (m_arready) begin
          logic [BA:0] np;
          np = {1'b0, ptr[src]} + (BA+1)'(n);
          if (np >= MEM_BEATS) np = np - MEM_BEATS;
          ptr[src]    <= BA'(np);
          left[src]   <= left[src] - (BA+1)'(n);
          final_burst <= (left[src] == (BA+1)'(n));
          state       <= R_DATA;
        end
        R_DATA: if (m_rvalid) begin
          if (m_rresp != 2'b00) resp_errors <= resp_errors + 1'b1;
          if (m_rlast) begin
            state <= R_IDLE;
            if (final_burst) active[src] <= 1'b0;
          end
        end
        default: ;
      endcase
    end
  end

  a_ar_stable: assert property (@(posedge clk) disable iff (rst)
    m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr) && $stable(m_arlen));
  a_rid_match: assert property (@(posedge clk) disable iff (rst)
    m_rvalid && m_rready |-> m_rid[0] == src);
endmodule
