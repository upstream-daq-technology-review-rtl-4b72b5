// bm_top: 10-second DDR4 buffer manager with its test and debug blocks.
//
// Compressed wire data arrives as super-packets on N_LINKS 16-bit
// AXI4-stream links (one link per 64 wires). The super-packet formatter
// collects them, in round-robin write-runs (one super-packet per link per
// 32 us time period), into a 512-bit stream that the write interface stores
// in DDR4 as a circular buffer using 4 KByte AXI4 bursts. The indexer
// records the address of every write-run. An event selection command
// (command ID, start and end timestamp) goes through the command FIFO to the
// indexer, which turns the times into a DDR4 address range; the read
// interface fetches it and the event fragment selector keeps the super-
// packets whose timestamps match and sends a 128-bit event fragment headed by
// the command ID. A supernova trigger reads the most recent N samples and the
// supernova selector sends them as a 256-bit stream towards NVMe storage.
//
// Test and debug: an input data generator and an event selection command
// generator (used instead of the external inputs when USE_TEST_SOURCES is 1),
// a snapshot sink of the event fragment stream and IPBus registers.
//
// Clocks: clk_s is the AXI4-stream input clock (200-250 MHz), which also runs
// the IPBus registers and the generators; clk_m is the DDR4 controller's user
// clock (300 MHz) for everything else. Data, commands, the supernova trigger
// and the sink cross with dual-clock FIFOs or synchronisers. The input FIFO
// enable is used on the clk_s side. The supernova sample count is a static
// setting read across the boundary without synchronising it, and the status
// words are clk_m counters read from clk_s as debug values; a read that
// coincides with a change may show a mixed value.
//
// One link's compressor (Fibonacci coding) sits beside the buffer manager
// with its own ports: in the full system one compressor per link feeds the
// links above; here its output is brought out so the two can be used apart.
//
// The memory controller (MIG), the AXI interconnect and the DDR4 are outside:
// the two AXI4 channels are ports. The block structure follows the document;
// the register map, the header layouts and the flow-control details are
// this design's choices (see the module files).
module bm_top
  import bm_pkg::*;
#(
  parameter int unsigned     N_LINKS          = 40,
  parameter int unsigned     ADDR_W           = 32,
  parameter longint unsigned MEM_BYTES        = 64'h8000_0000,
  parameter int unsigned     INDEX_DEPTH      = 16384,
  parameter int unsigned     PAYLOAD_WORDS    = 1024,
  parameter bit              USE_TEST_SOURCES = 1'b1
) (
  input  logic                     clk_s,
  input  logic                     rst_s,
  input  logic                     clk_m,
  input  logic                     rst_m,
  // IPBus
  input  ipb_wbus_t                ipb_in,
  output ipb_rbus_t                ipb_out,
  // compressed data links (used when USE_TEST_SOURCES is 0)
  input  logic [N_LINKS-1:0][15:0] link_tdata,
  input  logic [N_LINKS-1:0]       link_tvalid,
  input  logic [N_LINKS-1:0]       link_tlast,
  output logic [N_LINKS-1:0]       link_tready,
  // event fragment requests (used when USE_TEST_SOURCES is 0)
  input  logic [15:0]              req_tdata,
  input  logic                     req_tvalid,
  input  logic                     req_tlast,
  output logic                     req_tready,
  // AXI4 master to the memory controller
  output logic [ADDR_W-1:0]        m_awaddr,
  output logic [7:0]               m_awlen,
  output logic [2:0]               m_awsize,
  output logic [1:0]               m_awburst,
  output logic                     m_awvalid,
  input  logic                     m_awready,
  output logic [511:0]             m_wdata,
  output logic [63:0]              m_wstrb,
  output logic                     m_wlast,
  output logic                     m_wvalid,
  input  logic                     m_wready,
  input  logic [1:0]               m_bresp,
  input  logic                     m_bvalid,
  output logic                     m_bready,
  output logic [ADDR_W-1:0]        m_araddr,
  output logic [7:0]               m_arlen,
  output logic [2:0]               m_arsize,
  output logic [1:0]               m_arburst,
  output logic [0:0]               m_arid,
  output logic                     m_arvalid,
  input  logic                     m_arready,
  input  logic [511:0]             m_rdata,
  input  logic [1:0]               m_rresp,
  input  logic [0:0]               m_rid,
  input  logic                     m_rlast,
  input  logic                     m_rvalid,
  output logic                     m_rready,
  // event fragments, 128-bit (clk_m)
  output logic [127:0]             evt_tdata,
  output logic [15:0]              evt_tkeep,
  output logic                     evt_tlast,
  output logic                     evt_tvalid,
  input  logic                     evt_tready,
  // supernova data, 256-bit (clk_m)
  output logic [255:0]             snv_tdata,
  output logic                     snv_tlast,
  output logic                     snv_tvalid,
  input  logic                     snv_tready,
  // compression of one link (clk_s), standing beside the buffer manager:
  // raw super-packets in, Fibonacci-coded super-packets out
  input  logic [15:0]              raw_tdata,
  input  logic                     raw_tvalid,
  input  logic                     raw_tlast,
  output logic                     raw_tready,
  output logic [15:0]              comp_tdata,
  output logic                     comp_tvalid,
  output logic                     comp_tlast,
  input  logic                     comp_tready
);
  localparam int unsigned BURST_BEATS = 64;
  localparam int unsigned BW = $clog2(BURST_BEATS+1);
  localparam int unsigned SINK_DEPTH = 4096;
  localparam int unsigned SINK_AW = $clog2(SINK_DEPTH) + 2;

  // ---------------- registers ----------------
  logic init_send, cmd_issue, snv_trig_s, sink_clear, fifo_en;
  logic [31:0] n_packets, snv_samples;
  trig_cmd_t   csr_cmd;
  logic [15:0][31:0] stat;
  logic [SINK_AW-1:0] sink_addr;
  logic [31:0] sink_data;

  bm_csr #(.SINK_AW(SINK_AW)) u_csr (
    .clk(clk_s), .rst(rst_s), .ipb_in, .ipb_out,
    .init_send, .cmd_issue, .snv_trig(snv_trig_s), .sink_clear, .fifo_en,
    .n_packets, .cmd(csr_cmd), .snv_samples, .stat, .sink_addr, .sink_data);

  // ---------------- test sources ----------------
  logic [N_LINKS-1:0][15:0] gen_tdata;
  logic [N_LINKS-1:0]       gen_tvalid, gen_tlast;
  logic                     gen_busy;
  logic [N_LINKS-1:0][15:0] in_tdata;
  logic [N_LINKS-1:0]       in_tvalid, in_tlast, in_tready;

  data_gen #(.N_LINKS(N_LINKS), .PAYLOAD_WORDS(PAYLOAD_WORDS)) u_gen (
    .clk(clk_s), .rst(rst_s), .start(init_send), .n_runs(n_packets),
    .m_tdata(gen_tdata), .m_tvalid(gen_tvalid), .m_tlast(gen_tlast),
    .m_tready(USE_TEST_SOURCES ? in_tready : '0), .busy(gen_busy));

  logic [15:0] tg_tdata, cq_tdata;
  logic        tg_tvalid, tg_tlast, tg_busy, cq_tvalid, cq_tlast, cq_tready;

  trig_cmd_gen u_tgen (
    .clk(clk_s), .rst(rst_s), .issue(cmd_issue), .cmd(csr_cmd),
    .m_tdata(tg_tdata), .m_tvalid(tg_tvalid), .m_tlast(tg_tlast),
    .m_tready(USE_TEST_SOURCES ? cq_tready : 1'b0), .busy(tg_busy));

  assign in_tdata    = USE_TEST_SOURCES ? gen_tdata  : link_tdata;
  assign in_tvalid   = USE_TEST_SOURCES ? gen_tvalid : link_tvalid;
  assign in_tlast    = USE_TEST_SOURCES ? gen_tlast  : link_tlast;
  assign link_tready = USE_TEST_SOURCES ? '0 : in_tready;
  assign cq_tdata    = USE_TEST_SOURCES ? tg_tdata   : req_tdata;
  assign cq_tvalid   = USE_TEST_SOURCES ? tg_tvalid  : req_tvalid;
  assign cq_tlast    = USE_TEST_SOURCES ? tg_tlast   : req_tlast;
  assign req_tready  = USE_TEST_SOURCES ? 1'b0 : cq_tready;

  // ---------------- write path ----------------
  logic [511:0]  f_wdata;
  logic          f_wvalid, f_wpop, f_dvalid, f_dlast, f_dpop;
  logic [BW-1:0] f_dbeats;
  logic [63:0]   init_ts;
  logic          init_ts_valid;

  sp_formatter #(.N_LINKS(N_LINKS), .BURST_BEATS(BURST_BEATS)) u_fmt (
    .s_clk(clk_s), .s_rst(rst_s), .enable(fifo_en),
    .s_tdata(in_tdata), .s_tvalid(in_tvalid), .s_tlast(in_tlast), .s_tready(in_tready),
    .m_clk(clk_m), .m_rst(rst_m),
    .wdata(f_wdata), .wdata_valid(f_wvalid), .wdata_pop(f_wpop),
    .desc_valid(f_dvalid), .desc_beats(f_dbeats), .desc_run_last(f_dlast), .desc_pop(f_dpop),
    .init_ts, .init_ts_valid);

  logic              run_done;
  logic [ADDR_W-1:0] run_addr, next_addr, wr_ptr;
  logic [31:0]       wr_errors, rd_errors;

  mem_wr_if #(.ADDR_W(ADDR_W), .MEM_BYTES(MEM_BYTES), .BURST_BEATS(BURST_BEATS)) u_wr (
    .clk(clk_m), .rst(rst_m),
    .wdata(f_wdata), .wdata_valid(f_wvalid), .wdata_pop(f_wpop),
    .desc_valid(f_dvalid), .desc_beats(f_dbeats), .desc_run_last(f_dlast), .desc_pop(f_dpop),
    .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .run_done, .run_addr, .next_addr, .wr_ptr, .resp_errors(wr_errors));

  // ---------------- commands and index ----------------
  trig_cmd_t cmd;
  logic      cmd_valid, cmd_pop, evq_full, idx_cmd_ready;
  logic [31:0] bad_cmds;

  cmd_fifo u_cmdq (
    .s_clk(clk_s), .s_rst(rst_s),
    .s_tdata(cq_tdata), .s_tvalid(cq_tvalid), .s_tlast(cq_tlast), .s_tready(cq_tready),
    .bad_cmds, .m_clk(clk_m), .m_rst(rst_m), .cmd, .cmd_valid, .cmd_pop);

  assign cmd_pop = cmd_valid && idx_cmd_ready && !evq_full;

  logic              req_valid, req_ready;
  logic [ADDR_W-1:0] req_start, req_end;
  logic [47:0]       runs_written;
  logic [31:0]       idx_waits, idx_lost;

  sp_indexer #(.ADDR_W(ADDR_W), .INDEX_DEPTH(INDEX_DEPTH), .TS_PER_RUN(64)) u_idx (
    .clk(clk_m), .rst(rst_m), .init_ts, .init_ts_valid,
    .run_done, .run_addr, .next_addr,
    .cmd_valid(cmd_valid && !evq_full), .cmd_start(cmd.t_start), .cmd_end(cmd.t_end),
    .cmd_ready(idx_cmd_ready),
    .req_valid, .req_start, .req_end, .req_ready,
    .runs_written, .wait_cycles(idx_waits), .lost_cmds(idx_lost));

  // ---------------- read path ----------------
  logic         snv_trig_m, snv_busy;
  logic         evt_space, snv_space;
  logic [511:0] rd_data;
  logic         rd_valid, rd_src, rd_last;

  pulse_sync u_snv_sync (.src_clk(clk_s), .src_rst(rst_s), .src_pulse(snv_trig_s),
                         .dst_clk(clk_m), .dst_rst(rst_m), .dst_pulse(snv_trig_m));

  mem_rd_if #(.ADDR_W(ADDR_W), .MEM_BYTES(MEM_BYTES)) u_rd (
    .clk(clk_m), .rst(rst_m),
    .evt_req_valid(req_valid), .evt_start(req_start), .evt_end(req_end), .evt_req_ready(req_ready),
    .snv_trig(snv_trig_m), .snv_words(snv_samples), .wr_ptr,
    .evt_space_ok(evt_space), .snv_space_ok(snv_space),
    .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arid, .m_arvalid, .m_arready,
    .m_rdata, .m_rresp, .m_rid, .m_rlast, .m_rvalid, .m_rready,
    .rd_data, .rd_valid, .rd_src, .rd_last, .snv_busy, .resp_errors(rd_errors));

  // ---------------- output selector ----------------
  logic [31:0] frag_count, pkt_kept, pkt_dropped, snv_frames;

  evt_selector #(.TS_PER_RUN(64), .BURST_BEATS(BURST_BEATS)) u_evt (
    .clk(clk_m), .rst(rst_m),
    .cmd_in(cmd), .cmd_push(cmd_pop), .cmd_full(evq_full),
    .rd_data, .rd_valid(rd_valid && !rd_src), .rd_last, .space_ok(evt_space),
    .m_tdata(evt_tdata), .m_tkeep(evt_tkeep), .m_tlast(evt_tlast),
    .m_tvalid(evt_tvalid), .m_tready(evt_tready),
    .frag_count, .pkt_kept, .pkt_dropped);

  snv_selector #(.BURST_BEATS(BURST_BEATS)) u_snv (
    .clk(clk_m), .rst(rst_m),
    .rd_data, .rd_valid(rd_valid && rd_src), .rd_last, .space_ok(snv_space),
    .m_tdata(snv_tdata), .m_tlast(snv_tlast), .m_tvalid(snv_tvalid), .m_tready(snv_tready),
    .frame_count(snv_frames));

  // ---------------- snapshot sink ----------------
  logic [$clog2(SINK_DEPTH):0] sink_stored;
  logic [31:0] sink_lasts;

  b128_sink #(.DEPTH(SINK_DEPTH)) u_sink (
    .clk(clk_m), .rst(rst_m),
    .s_tdata(evt_tdata), .s_tvalid(evt_tvalid), .s_tready(evt_tready), .s_tlast(evt_tlast),
    .rd_clk(clk_s), .rd_rst(rst_s), .clear(sink_clear), .rd_addr(sink_addr),
    .rd_data(sink_data), .stored(sink_stored), .lasts_seen(sink_lasts));

  // ---------------- status words ----------------
  always_comb begin
    stat     = '0;
    stat[0]  = {27'd0, snv_busy, init_ts_valid, tg_busy, gen_busy, fifo_en};
    stat[1]  = runs_written[31:0];
    stat[2]  = idx_waits;
    stat[3]  = idx_lost;
    stat[4]  = frag_count;
    stat[5]  = pkt_kept;
    stat[6]  = pkt_dropped;
    stat[7]  = snv_frames;
    stat[8]  = wr_errors;
    stat[9]  = rd_errors;
    stat[10] = bad_cmds;
    stat[11] = 32'(sink_stored);
    stat[12] = sink_lasts;
    stat[13] = 32'(wr_ptr);
    stat[14] = init_ts[63:32];
    stat[15] = init_ts[31:0];
  end
  // ---------------- compression of one link ----------------
  compressor u_comp (
    .clk(clk_s), .rst(rst_s),
    .s_tdata(raw_tdata), .s_tvalid(raw_tvalid), .s_tlast(raw_tlast), .s_tready(raw_tready),
    .m_tdata(comp_tdata), .m_tvalid(comp_tvalid), .m_tlast(comp_tlast), .m_tready(comp_tready),
    .words_in(), .words_out());
endmodule
