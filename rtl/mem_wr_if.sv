// mem_wr_if: AXI4 write interface of the buffer manager.
//
// Takes 512-bit words from the formatter's stream FIFO and writes them to
// DDR4 through an AXI4 memory-mapped write channel (to the vendor memory
// controller). The formatter's descriptors say how many words to send: 64
// words (4 KByte, one full-length INCR burst of 64-byte beats) or fewer at
// the end of a write-run. The module computes address, length and strobe of
// each burst; a burst is also split where it would cross a 4 KByte boundary,
// as AXI4 requires. The write address is a circular pointer that rolls over
// to 0 at MEM_BYTES, so the oldest data is overwritten.
//
// One burst is in flight at a time: the next address is issued after the
// write response of the previous one. When the last burst of a write-run has
// been answered, run_done pulses for one cycle with the run's first byte
// address (run_addr) and the address where the next run will start
// (next_addr); the indexer stores these.
//
// 4 KByte bursts, the circular buffer and the write-run end signal follow the
// document; the one-burst-at-a-time policy is this design's choice.
module mem_wr_if #(
  parameter int unsigned ADDR_W      = 32,
  parameter longint unsigned MEM_BYTES = 64'h8000_0000,  // 2 GiB
  parameter int unsigned BURST_BEATS = 64
) (
  input  logic              clk,
  input  logic              rst,
  // from the formatter
  input  logic [511:0]      wdata,
  input  logic              wdata_valid,
  output logic              wdata_pop,
  input  logic              desc_valid,
  input  logic [$clog2(BURST_BEATS+1)-1:0] desc_beats,
  input  logic              desc_run_last,
  output logic              desc_pop,
  // AXI4 write address channel
  output logic [ADDR_W-1:0] m_awaddr,
  output logic [7:0]        m_awlen,
  output logic [2:0]        m_awsize,
  output logic [1:0]        m_awburst,
  output logic              m_awvalid,
  input  logic              m_awready,
  // AXI4 write data channel
  output logic [511:0]      m_wdata,
  output logic [63:0]       m_wstrb,
  output logic              m_wlast,
  output logic              m_wvalid,
  input  logic              m_wready,
  // AXI4 write response channel
  input  logic [1:0]        m_bresp,
  input  logic              m_bvalid,
  output logic              m_bready,
  // to the indexer and the read interface
  output logic              run_done,
  output logic [ADDR_W-1:0] run_addr,
  output logic [ADDR_W-1:0] next_addr,
  output logic [ADDR_W-1:0] wr_ptr,
  output logic [31:0]       resp_errors
);
  localparam int unsigned BW = $clog2(BURST_BEATS+1);

  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_t;
  wstate_t     state;
  logic [BW-1:0] left;      // words of the current descriptor still to send
  logic          last_run;
  logic [BW-1:0] n;         // beats of the current burst
  logic [BW-1:0] beats;     // beats still to send in the current burst
  logic [6:0]    to_4k;
  logic [ADDR_W-1:0] run_start;
  logic [ADDR_W-1:0] ptr_next;

  // beats that fit before the next 4 KByte boundary
  assign to_4k = 7'd64 - {1'b0, wr_ptr[11:6]};
  always_comb begin
    n = left;
    if (32'(left) > 32'(to_4k)) n = BW'(to_4k);
    ptr_next = wr_ptr + ADDR_W'({n, 6'b0});
    if ({1'b0, ptr_next} >= (ADDR_W+1)'(MEM_BYTES)) ptr_next = '0;
  end

  assign m_awaddr  = wr_ptr;
  assign m_awlen   = 8'(n - 1'b1);
  assign m_awsize  = 3'd6;      // 64 bytes per beat
  assign m_awburst = 2'b01;     // INCR
  assign m_awvalid = (state == W_ADDR);
  assign m_wdata   = wdata;
  assign m_wstrb   = '1;
  assign m_wlast   = (beats == BW'(1));
  assign m_wvalid  = (state == W_DATA) && wdata_valid;
  assign wdata_pop = m_wvalid && m_wready;
  assign m_bready  = (state == W_RESP);
  assign desc_pop  = (state == W_IDLE) && desc_valid;
  assign next_addr = wr_ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= W_IDLE; left <= '0; last_run <= 1'b0; beats <= '0;
      wr_ptr <= '0; run_start <= '0; run_done <= 1'b0; run_addr <= '0;
      resp_errors <= '0;
    end else begin
      run_done <= 1'b0;
      unique case (state)
        W_IDLE: if (desc_valid) begin
          left     <= desc_beats;
          last_run <= desc_run_last;
          state    <= W_ADDR;
        end
        W_ADDR: if (m_awready) begin
          beats <= n;
          state <= W_DATA;
        end
        W_DATA: if (wdata_pop) begin
          beats <= beats - 1'b1;
          if (beats == BW'(1)) state <= W_RESP;
        end
        W_RESP: if (m_bvalid) begin
          if (m_bresp != 2'b00) resp_errors <= resp_errors + 1'b1;
          wr_ptr <= ptr_next;
          left   <= left - n;
          if (left == n) begin
            state <= W_IDLE;
            if (last_run) begin
              run_done  <= 1'b1;
              run_addr  <= run_start;
              run_start <= ptr_next;
            end
          end else begin
            state <= W_ADDR;
          end
        end
        default: ;
      endcase
    end
  end

  // AXI4: address and data must stay stable while valid and not accepted
  a_aw_stable: assert property (@(posedge clk) disable iff (rst)
    m_awvalid && !m_awready |=> m_awvalid && $stable(m_awaddr) && $stable(m_awlen));
  a_no_4k_cross: assert property (@(posedge clk) disable iff (rst)
    m_awvalid |-> (32'(m_awaddr[11:0]) + (32'(m_awlen) + 1) * 64) <= 4096);
endmodule
