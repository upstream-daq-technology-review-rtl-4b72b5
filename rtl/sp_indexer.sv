// sp_indexer: super-packet indexer.
//
// Keeps, in an index RAM of INDEX_DEPTH 32-bit entries (the document's
// 32x16384), the DDR4 byte address at which each write-run starts. Write-run
// k holds the super-packets whose timestamp is init_ts + k*TS_PER_RUN, where
// init_ts is the timestamp of the very first super-packet stored; entry
// k mod INDEX_DEPTH holds its address. The write interface reports each
// finished run (run_done, run_addr) and where the next one will start
// (next_addr).
//
// For an event selection command with start and end timestamps the control
// block computes the run indices
//     si = (t_start - init_ts) / TS_PER_RUN,  ei = (t_end - init_ts) / TS_PER_RUN
// (a time before init_ts counts as run 0), waits until run ei has been
// written (a stall, counted in wait_cycles), then reads entry si and entry
// ei+1 (or next_addr when run ei is the newest) and hands the byte range
// [start, end) to the read interface. A start run that has already left the
// index (more than INDEX_DEPTH runs ago) is moved up to the oldest run still
// indexed and counted in lost_cmds: old data is lost, as the document warns.
// When the whole range has left the index, the oldest indexed run is read;
// the event fragment selector then finds no matching timestamp in it.
//
// Timing: a command takes 6 cycles when its data is present, plus the wait.
// The index RAM size, its contents and the timestamp-to-index step follow the
// document; the wait-for-data rule and the use of the next run's address as
// the end of the range are this design's choices.
module sp_indexer #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned INDEX_DEPTH = 16384,
  parameter int unsigned TS_PER_RUN  = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [63:0]       init_ts,
  input  logic              init_ts_valid,
  input  logic              run_done,
  input  logic [ADDR_W-1:0] run_addr,
  input  logic [ADDR_W-1:0] next_addr,
  input  logic              cmd_valid,
  input  logic [63:0]       cmd_start,
  input  logic [63:0]       cmd_end,
  output logic              cmd_ready,
  output logic              req_valid,
  output logic [ADDR_W-1:0] req_start,
  output logic [ADDR_W-1:0] req_end,
  input  logic              req_ready,
  output logic [47:0]       runs_written,
  output logic [31:0]       wait_cycles,
  output logic [31:0]       lost_cmds
);
  localparam int unsigned IW = $clog2(INDEX_DEPTH);
  localparam int unsigned SH = $clog2(TS_PER_RUN);

  logic [31:0] index_ram [INDEX_DEPTH];
  logic [IW-1:0] raddr;
  logic [31:0]   ram_q;
  logic [ADDR_W-1:0] last_next;

  typedef enum logic [2:0] {I_IDLE, I_WAIT, I_RS1, I_RS2, I_RE1, I_RE2, I_REQ} istate_t;
  istate_t state;
  logic [47:0] si, ei;

  function automatic logic [47:0] ts2run(input logic [63:0] t, input logic [63:0] t0);
    return (t < t0) ? 48'd0 : 48'((t - t0) >> SH);
  endfunction

  always_ff @(posedge clk) begin
    if (run_done) index_ram[runs_written[IW-1:0]] <= 32'(run_addr);
    ram_q <= index_ram[raddr];
  end

  assign cmd_ready = (state == I_IDLE) && init_ts_valid;
  assign req_valid = (state == I_REQ);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= I_IDLE; si <= '0; ei <= '0; raddr <= '0;
      runs_written <= '0; last_next <= '0; req_start <= '0; req_end <= '0;
      wait_cycles <= '0; lost_cmds <= '0;
    end else begin
      if (run_done) begin
        runs_written <= runs_written + 1'b1;
        last_next    <= next_addr;
      end
      unique case (state)
        I_IDLE: if (cmd_valid && cmd_ready) begin
          si    <= ts2run(cmd_start, init_ts);
          ei    <= (ts2run(cmd_end, init_ts) < ts2run(cmd_start, init_ts)) ?
                   ts2run(cmd_start, init_ts) : ts2run(cmd_end, init_ts);
          state <= I_WAIT;
        end
        I_WAIT: if (ei < runs_written) begin
          if (runs_written - si > 48'(INDEX_DEPTH)) begin
            si        <= runs_written - 48'(INDEX_DEPTH);
            raddr     <= IW'(runs_written - 48'(INDEX_DEPTH));
            if (ei < runs_written - 48'(INDEX_DEPTH)) ei <= runs_written - 48'(INDEX_DEPTH);
            lost_cmds <= lost_cmds + 1'b1;
          end else begin
            raddr <= si[IW-1:0];
          end
          state <= I_RS1;
        end else begin
          wait_cycles <= wait_cycles + 1'b1;
        end
        I_RS1: state <= I_RS2;
        I_RS2: begin
          req_start <= ADDR_W'(ram_q);
          if (ei + 1'b1 == runs_written) begin
            req_end <= last_next;
            state   <= I_REQ;
          end else begin
            raddr <= IW'(ei + 1'b1);
            state <= I_RE1;
          end
        end
        I_RE1: state <= I_RE2;
        I_RE2: begin
          req_end <= ADDR_W'(ram_q);
          state   <= I_REQ;
        end
        I_REQ: if (req_ready) state <= I_IDLE;
        default: ;
      endcase
    end
  end
endmodule
