// tb_bm_full: one complete operation of the buffer manager at its default
// size (40 links, 1024-word payloads, 2 GiB circular buffer, 16384-entry
// index), driven only through IPBus as the debug firmware is used:
// enable the input FIFOs, send three write-runs from the data generator,
// issue an event selection command for the middle run, check the event
// fragment word by word against the generator's known pattern, read part of
// it back from the snapshot sink, then fire a supernova trigger and check its
// stream against the memory model. It also checks the 4 KByte write and read
// times against the memory model's latencies.
`timescale 1ns/1ps
module tb_bm_full;
  import bm_pkg::*;
  localparam int N = 40, PL = 1024, RUNS = 3, SNV_WORDS = 5000;

  logic clk_s = 0, clk_m = 0, rst_s = 1, rst_m = 1;
  always #2.0 clk_s = !clk_s;
  always #1.667 clk_m = !clk_m;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  ipb_wbus_t ipb_in;
  ipb_rbus_t ipb_out;
  logic [N-1:0][15:0] link_tdata = '0;
  logic [N-1:0] link_tvalid = '0, link_tlast = '0, link_tready;
  logic [15:0] req_tdata = '0; logic req_tvalid = 1'b0, req_tlast = 1'b0, req_tready;
  logic [31:0] m_awaddr, m_araddr; logic [7:0] m_awlen, m_arlen; logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp; logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready;
  logic [511:0] m_wdata, m_rdata; logic [63:0] m_wstrb; logic m_bvalid, m_bready;
  logic [0:0] m_arid, m_rid; logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [127:0] evt_tdata; logic [15:0] evt_tkeep; logic evt_tlast, evt_tvalid, evt_tready;
  logic [255:0] snv_tdata; logic snv_tlast, snv_tvalid, snv_tready;

  // the compressor beside the buffer manager is idle here
  logic [15:0] raw_tdata = 0; logic raw_tvalid = 0, raw_tlast = 0, raw_tready;
  logic [15:0] comp_tdata; logic comp_tvalid, comp_tlast, comp_tready = 1;
  bm_top dut (.*);

  ddr4_axi_model ddr (
    .clk(clk_m), .rst(rst_m),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arlen(m_arlen), .arid(m_arid), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rid(m_rid), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready));

  assign evt_tready = 1'b1;
  assign snv_tready = 1'b1;

  task automatic ipb_write(input logic [31:0] a, input logic [31:0] d);
    @(posedge clk_s); ipb_in <= '{addr: a, wdata: d, strobe: 1'b1, write: 1'b1};
    do @(posedge clk_s); while (!ipb_out.ack && !ipb_out.err);
    ipb_in <= '0;
  endtask
  task automatic ipb_read(input logic [31:0] a, output logic [31:0] d);
    @(posedge clk_s); ipb_in <= '{addr: a, wdata: 0, strobe: 1'b1, write: 1'b0};
    do @(posedge clk_s); while (!ipb_out.ack && !ipb_out.err);
    d = ipb_out.rdata;
    ipb_in <= '0;
  endtask

  // expected stored words of the generator's packet (link l, run r)
  function automatic void stored_words(int l, int r, ref logic [15:0] w[$]);
    longint t = 64 * r;
    w = {};
    w.push_back(MAGIC0); w.push_back(MAGIC1); w.push_back(16'(PL + 5)); w.push_back(16'(l));
    w.push_back(16'h0); w.push_back(t[63:48]); w.push_back(t[47:32]);
    w.push_back(t[31:16]); w.push_back(t[15:0]);
    for (int j = 0; j < PL; j++) w.push_back(16'(j));
    while (w.size() % 4 != 0) w.push_back(16'h0);
  endfunction

  logic [15:0]  exp_w[$];
  logic [127:0] frag[$];
  int frags = 0, beat_no = 0;
  always @(posedge clk_m) if (!rst_m && evt_tvalid && evt_tready) begin
    frag.push_back(evt_tdata);
    if (beat_no == 0) begin
      check(evt_tdata == {32'h0000_1234, 64'd64, 32'd127}, "fragment header");
    end else begin
      for (int k = 0; k < 8; k++) if (evt_tkeep[15 - 2*k]) begin
        logic [15:0] e;
        e = exp_w.size() ? exp_w.pop_front() : 16'hFFFF;
        check(evt_tdata[127 - 16*k -: 16] == e, $sformatf("beat %0d word %0d", beat_no, k));
      end
    end
    beat_no++;
    if (evt_tlast) begin
      check(exp_w.size() == 0, "fragment complete");
      frags++;
    end
  end

  logic [31:0] snv_ptr_beat;
  int snv_beats = 0, snv_frames = 0;
  always @(posedge clk_m) if (!rst_m && dut.u_rd.snv_trig) snv_ptr_beat <= 32'(dut.u_rd.wr_ptr >> 6);
  always @(posedge clk_m) if (!rst_m && snv_tvalid && snv_tready) begin
    longint b;
    logic [511:0] m;
    b = longint'(snv_ptr_beat) - (SNV_WORDS * 2 + 63) / 64 + snv_beats / 2;
    m = ddr.peek(b);
    check(snv_tdata == ((snv_beats % 2) ? m[255:0] : m[511:256]), $sformatf("supernova beat %0d", snv_beats));
    snv_beats++;
    if (snv_tlast) snv_frames++;
  end

  // 4 KByte write and read times (AW to B, AR to last R)
  int t_aw, t_ar, wr_full_time = 0, rd_full_time = 0, cyc = 0;
  logic [7:0] cur_awlen, cur_arlen;
  always @(posedge clk_m) begin
    cyc++;
    if (m_awvalid && m_awready) begin t_aw = cyc; cur_awlen = m_awlen; end
    if (m_bvalid && m_bready && cur_awlen == 8'd63) wr_full_time = cyc - t_aw;
    if (m_arvalid && m_arready) begin t_ar = cyc; cur_arlen = m_arlen; end
    if (m_rvalid && m_rready && m_rlast && cur_arlen == 8'd63) rd_full_time = cyc - t_ar;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [15:0] w[$];
    ipb_in = '0;
    repeat (10) @(posedge clk_s);
    rst_s = 0; rst_m = 0;
    repeat (10) @(posedge clk_s);
    ipb_write(32'h1, 32'h1);             // input FIFOs enable
    ipb_write(32'h2, RUNS);              // number of super-packets per link
    ipb_write(32'h0, 32'h1);             // initialise data send
    for (int l = 0; l < N; l++) begin stored_words(l, 1, w); foreach (w[k]) exp_w.push_back(w[k]); end
    wait (dut.u_idx.runs_written == RUNS);
    ipb_read(32'h11, d); check(d == RUNS, "runs written");
    ipb_read(32'h1F, d); check(d == 0, "initial timestamp");
    // event selection command for run 1 (timestamps 64..127)
    ipb_write(32'h3, 32'h1234);
    ipb_write(32'h4, 0); ipb_write(32'h5, 64);
    ipb_write(32'h6, 0); ipb_write(32'h7, 127);
    ipb_write(32'h0, 32'h2);             // issue
    wait (frags == 1);
    check(frag.size() == 1 + (N * 1036 / 4 + 1) / 2, $sformatf("fragment beats %0d", frag.size()));
    repeat (20) @(posedge clk_s);
    ipb_read(32'h1B, d); check(d == ((frag.size() < 4096) ? frag.size() : 4096), "sink stored the snapshot");
    for (int b = 0; b < 3; b++) for (int k = 0; k < 4; k++) begin
      ipb_read(32'h10000 + 4 * b + k, d);
      check(d == frag[b][127 - 32*k -: 32], "sink word");
    end
    // supernova trigger
    ipb_write(32'h8, SNV_WORDS);
    ipb_write(32'h0, 32'h4);
    wait (snv_frames == 1);
    check(snv_beats == 2 * ((SNV_WORDS * 2 + 63) / 64), "supernova length");
    check(ddr.cross_4k == 0, "no 4 KByte crossing");
    $display("4KB write %0d cycles, 4KB read %0d cycles", wr_full_time, rd_full_time);
    // document: ~83 cycles per 4 KByte write and ~98 per read with ~15/~30 cycle latency
    check(wr_full_time >= 78 && wr_full_time <= 88, "4 KByte write time");
    check(rd_full_time >= 93 && rd_full_time <= 103, "4 KByte read time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
