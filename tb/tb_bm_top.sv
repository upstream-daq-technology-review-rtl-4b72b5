// tb_bm_top: end-to-end test of the buffer manager at reduced size.
//
// Four links are driven from the testbench (external-input mode) with
// super-packets of varying length; a circular memory and a
// 32-entry index make the write pointer wrap and old commands fall out of
// the index. The testbench keeps its own copy of every packet and builds the
// expected event fragment of each command from it: header beat, then the
// stored rows of every packet whose 64-tick time slot overlaps the command's
// window. It also checks the supernova stream against the memory model and
// counts how often each mechanism of the design was exercised; a mechanism
// that never happens counts as a failure. The compressor beside the buffer
// manager gets three packets of constant samples whose coded length is known.
`timescale 1ns/1ps
module tb_bm_top;
  import bm_pkg::*;
  localparam int N      = 4;
  localparam int RUNS   = 100;
  localparam int SKEW_LINK = 1, SKEW_RUN = 90;
  localparam longint MEMB = 64'h8_0000;

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
  logic [N-1:0][15:0] link_tdata;
  logic [N-1:0] link_tvalid, link_tlast, link_tready;
  logic [15:0] req_tdata; logic req_tvalid, req_tlast, req_tready;
  logic [31:0] m_awaddr, m_araddr; logic [7:0] m_awlen, m_arlen; logic [2:0] m_awsize, m_arsize;
  logic [1:0] m_awburst, m_arburst, m_bresp, m_rresp; logic m_awvalid, m_awready, m_wlast, m_wvalid, m_wready;
  logic [511:0] m_wdata, m_rdata; logic [63:0] m_wstrb; logic m_bvalid, m_bready;
  logic [0:0] m_arid, m_rid; logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [127:0] evt_tdata; logic [15:0] evt_tkeep; logic evt_tlast, evt_tvalid, evt_tready;
  logic [255:0] snv_tdata; logic snv_tlast, snv_tvalid, snv_tready;

  bm_top #(.N_LINKS(N), .MEM_BYTES(MEMB), .INDEX_DEPTH(32), .USE_TEST_SOURCES(1'b0)) dut (.*);

  ddr4_axi_model #(.STALL(1'b1)) ddr (
    .clk(clk_m), .rst(rst_m),
    .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr(m_araddr), .arlen(m_arlen), .arid(m_arid), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rid(m_rid), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready));

  // ---------------- reference packets ----------------
  function automatic int plen(int l, int r);      // payload words
    return 300 + ((l * 53 + r * 29) % 1500);
  endfunction
  function automatic longint pts(int l, int r);
    return (l == SKEW_LINK && r == SKEW_RUN) ? 64 * (r - 1) : 64 * r;
  endfunction
  function automatic logic [15:0] pword(int l, int r, int j);
    return 16'(l * 4099 + r * 257 + j * 3);
  endfunction

  // stored rows of one packet as 16-bit words (header row + packet, padded)
  function automatic void stored_words(int l, int r, ref logic [15:0] w[$]);
    longint t = pts(l, r);
    int n = 5 + plen(l, r);
    w = {};
    w.push_back(MAGIC0); w.push_back(MAGIC1); w.push_back(16'(n)); w.push_back(16'(l));
    w.push_back(16'h00A5); w.push_back(t[63:48]); w.push_back(t[47:32]);
    w.push_back(t[31:16]); w.push_back(t[15:0]);
    for (int j = 0; j < plen(l, r); j++) w.push_back(pword(l, r, j));
    while (w.size() % 4 != 0) w.push_back(16'h0);
  endfunction

  // ---------------- link drivers ----------------
  logic [16:0] lq [N][$];
  task automatic queue_packet(int l, int r, bit junk);
    logic [15:0] w[$];
    stored_words(l, r, w);
    for (int j = 4; j < 9 + plen(l, r); j++)
      lq[l].push_back({(j == 8 + plen(l, r)), junk ? 16'hDEAD : w[j]});
  endtask

  int lp[N] = '{default: 0};     // read pointers, advanced after the edge
  always_ff @(posedge clk_s) begin
    for (int l = 0; l < N; l++) begin
      if (link_tvalid[l] && link_tready[l]) lp[l] <= lp[l] + 1;
    end
  end
  always_comb begin
    for (int l = 0; l < N; l++) begin
      link_tvalid[l] = lq[l].size() > lp[l];
      link_tdata[l]  = link_tvalid[l] ? lq[l][lp[l]][15:0] : 16'h0;
      link_tlast[l]  = link_tvalid[l] ? lq[l][lp[l]][16] : 1'b0;
    end
  end

  // ---------------- IPBus ----------------
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

  // ---------------- command sender ----------------
  logic [16:0] cq[$];
  trig_cmd_t sent[$];
  task automatic send_cmd(input logic [31:0] id, input longint t0, input longint t1);
    trig_cmd_t c = '{id: id, t_start: t0, t_end: t1};
    logic [159:0] v = c;
    sent.push_back(c);
    for (int k = 0; k < 10; k++) cq.push_back({(k == 9), v[159 - 16*k -: 16]});
  endtask
  int cp = 0;
  always_ff @(posedge clk_s) if (req_tvalid && req_tready) cp <= cp + 1;
  assign req_tvalid = cq.size() > cp;
  assign req_tdata  = req_tvalid ? cq[cp][15:0] : 16'h0;
  assign req_tlast  = req_tvalid ? cq[cp][16] : 1'b0;

  // ---------------- fragment checker ----------------
  int frags = 0, kept_ref = 0, dropped_ref = 0, hdr_only = 0;
  logic [15:0] exp_w[$];
  int beat_no = 0;
  int oldest_idx;   // oldest run the indexer still held when the command ran

  function automatic void build_expected(trig_cmd_t c, int first_run);
    logic [15:0] w[$];
    int si = int'(c.t_start >> 6), ei = int'(c.t_end >> 6);
    if (si < first_run) si = first_run;
    if (ei < si) ei = si;
    exp_w = {};
    for (int r = si; r <= ei; r++)
      for (int l = 0; l < N; l++) begin
        longint t = pts(l, r);
        if (t + 64 > longint'(c.t_start) && t <= longint'(c.t_end)) begin
          stored_words(l, r, w);
          foreach (w[k]) exp_w.push_back(w[k]);
          kept_ref++;
        end else dropped_ref++;
      end
    if (exp_w.size() == 0) hdr_only++;
  endfunction

  // oldest indexed run at the moment the indexer takes each command
  int first_run_q[$];
  always @(posedge clk_m) if (!rst_m && dut.u_idx.state == 3'd0 && dut.u_idx.cmd_valid && dut.u_idx.cmd_ready)
    first_run_q.push_back(int'(dut.u_idx.runs_written) > 32 ? int'(dut.u_idx.runs_written) - 32 : 0);

  logic rnd_ready = 1'b1, hold_low = 1'b0;
  always @(posedge clk_m) rnd_ready <= ($urandom_range(0, 2) != 0);
  assign evt_tready = rnd_ready && !hold_low;

  int bp_cycles = 0;
  logic [127:0] last_frag[$];
  always @(posedge clk_m) if (!rst_m) begin
    if (evt_tvalid && !evt_tready) bp_cycles++;
    if (evt_tvalid && evt_tready) begin
      if (beat_no == 0) begin
        trig_cmd_t c;
        c = sent[frags];
        build_expected(c, first_run_q[frags]);
        check(evt_tdata == {c.id, c.t_start, c.t_end[31:0]}, $sformatf("fragment %0d header", frags));
        check(evt_tkeep == 16'hFFFF, "header keep");
      end else begin
        for (int k = 0; k < 8; k++) begin
          if (evt_tkeep[15 - 2*k]) begin
            logic [15:0] e;
            e = exp_w.size() ? exp_w.pop_front() : 16'hFFFF;
            check(evt_tdata[127 - 16*k -: 16] == e,
                  $sformatf("frag %0d beat %0d word %0d: %h vs %h", frags, beat_no, k, evt_tdata[127 - 16*k -: 16], e));
          end
        end
      end
      beat_no++;
      last_frag.push_back(evt_tdata);
      if (evt_tlast) begin
        check(exp_w.size() == 0, $sformatf("fragment %0d length (%0d words missing)", frags, exp_w.size()));
        frags++;
        beat_no = 0;
      end
    end
  end

  // ---------------- supernova checker ----------------
  logic [31:0] snv_ptr_beat;
  int snv_beats = 0, snv_frames = 0, snv_words_req = 20000, snv_bp = 0;
  logic snv_rnd = 1'b1;
  always @(posedge clk_m) snv_rnd <= ($urandom_range(0, 3) != 0);
  assign snv_tready = snv_rnd;
  always @(posedge clk_m) if (!rst_m && dut.u_rd.snv_trig) snv_ptr_beat <= 32'(dut.u_rd.wr_ptr >> 6);
  always @(posedge clk_m) if (!rst_m) begin
    if (snv_tvalid && !snv_tready) snv_bp++;
    if (snv_tvalid && snv_tready) begin
      int nb;
      longint b;
      logic [511:0] m;
      nb = (snv_words_req * 2 + 63) / 64;
      b = (longint'(snv_ptr_beat) - nb + (snv_beats / 2) + MEMB / 64) % (MEMB / 64);
      m = ddr.peek(b);
      check(snv_tdata == ((snv_beats % 2) ? m[255:0] : m[511:256]), $sformatf("supernova beat %0d", snv_beats));
      snv_beats++;
      if (snv_tlast) begin
        snv_frames++;
        check(snv_beats == 2 * nb, $sformatf("supernova length %0d", snv_beats));
      end
    end
  end

  // ---------------- compressor beside the buffer manager ----------------
  // Packets of n constant samples v: the first sample codes the value 2v+1
  // (difference v to 0, zigzag, plus one), every further sample codes
  // difference 0 as '11', so the payload is
  // ceil((len(2v+1) + 2 * (n - 1)) / 16) words.
  logic [15:0] raw_tdata = 0; logic raw_tvalid = 0, raw_tlast = 0, raw_tready;
  logic [15:0] comp_tdata; logic comp_tvalid, comp_tlast, comp_tready;
  assign comp_tready = 1'b1;
  int n_comp = 0, comp_words = 0, craw_i = 0;
  int cn[3] = '{1, 20, 77};
  logic [11:0] cv[3] = '{12'd0, 12'd7, 12'd2000};
  function automatic int fib_len(input int v);   // code length of v >= 1
    longint a = 1, b = 2, t;
    int i = 0;
    while (a <= v) begin i++; t = a + b; a = b; b = t; end
    return i + 1;
  endfunction
  always @(posedge clk_s) if (!rst_s) begin
    automatic int i = craw_i, p = 0, w = 0;
    if (raw_tvalid && raw_tready) i++;
    craw_i <= i;
    // word i of the three packets, 5 header words each
    w = i;
    while (p < 3 && w >= 5 + cn[p]) begin w -= 5 + cn[p]; p++; end
    raw_tvalid <= (p < 3);
    raw_tlast  <= (p < 3) && (w == 4 + cn[p]);
    raw_tdata  <= (p >= 3) ? 16'h0 : (w == 0) ? 16'h0 : (w < 5) ? 16'(16'hA0 + w) : {4'h0, cv[p]};
    if (comp_tvalid && comp_tready) begin
      if (comp_words < 5) check(comp_tdata == ((comp_words == 0) ? 16'h0 : 16'(16'hA0 + comp_words)), "compressor header");
      comp_words++;
      if (comp_tlast) begin
        automatic int exp_w = 5 + (fib_len(2 * int'(cv[n_comp]) + 1) + 2 * (cn[n_comp] - 1) + 15) / 16;
        check(comp_words == exp_w, $sformatf("compressed packet %0d: %0d words, expected %0d", n_comp, comp_words, exp_w));
        n_comp++; comp_words = 0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_full_wr = 0, n_part_wr = 0, n_wrap = 0, n_stall = 0, n_flow = 0, n_rwrap = 0, n_alt = 0, n_split = 0;
  logic last_src;
  always @(posedge clk_m) if (!rst_m) begin
    if (m_awvalid && m_awready) begin
      if (m_awlen == 8'd63) n_full_wr++; else n_part_wr++;
    end
    if (m_awvalid && m_awready && dut.u_wr.left != dut.u_wr.n) n_split++;
    if (dut.u_wr.m_bvalid && dut.u_wr.m_bready && dut.u_wr.ptr_next == 0) n_wrap++;
    if (dut.u_idx.state == 3'd1 && dut.u_idx.ei >= dut.u_idx.runs_written) n_stall++;
    if (dut.u_rd.active[0] && !dut.u_rd.evt_space_ok) n_flow++;
    if (dut.u_rd.evt_req_valid && dut.u_rd.evt_req_ready && dut.u_rd.evt_end < dut.u_rd.evt_start) n_rwrap++;
    if (m_arvalid && m_arready) begin
      if (dut.u_rd.active == 2'b11 && m_arid[0] != last_src) n_alt++;
      last_src <= m_arid[0];
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    ipb_in = '0;
    repeat (10) @(posedge clk_s);
    rst_s = 0; rst_m = 0;
    repeat (10) @(posedge clk_s);
    // with the input FIFOs disabled a packet is discarded
    for (int l = 0; l < N; l++) queue_packet(l, 0, 1'b1);
    wait (lp[0] == lq[0].size() && lp[N-1] == lq[N-1].size());
    repeat (20) @(posedge clk_s);
    check(dut.u_fmt.g_in[0].u_in.pkt_valid == 1'b0, "disabled link stores nothing");
    ipb_write(32'h1, 32'h1);
    // a command for data that does not exist yet: the indexer waits
    send_cmd(32'hA001, 64 * 5 + 3, 64 * 6 + 10);
    for (int r = 0; r < RUNS; r++) for (int l = 0; l < N; l++) queue_packet(l, r, 1'b0);
    wait (frags == 1);
    wait (lp[0] == lq[0].size() && lp[1] == lq[1].size() && lp[2] == lq[2].size() && lp[3] == lq[3].size());
    wait (dut.u_idx.runs_written == RUNS);
    repeat (50) @(posedge clk_m);
    // out-of-step packet of link 1 in run SKEW_RUN: dropped here, kept below
    send_cmd(32'hB002, 64 * SKEW_RUN, 64 * SKEW_RUN + 63);
    send_cmd(32'hC003, 64 * (SKEW_RUN - 1), 64 * (SKEW_RUN + 1) + 5);
    // runs that have left the index
    send_cmd(32'hD004, 64 * 10, 64 * 12);
    wait (frags == 4);
    // a long fragment while the output is held: read flow control
    hold_low = 1'b1;
    send_cmd(32'hE005, 64 * 80, 64 * 99 + 63);
    ipb_write(32'h8, snv_words_req);
    ipb_write(32'h0, 32'h4);
    repeat (4000) @(posedge clk_m);
    hold_low = 1'b0;
    for (int k = 0; k < 6; k++) send_cmd(32'hF000 + k, 64 * (82 + 3 * k), 64 * (84 + 3 * k) + 17);
    wait (frags == 11 && snv_frames == 1);
    repeat (100) @(posedge clk_m);
    // status over IPBus
    ipb_read(32'h11, d); check(d == RUNS, $sformatf("runs written %0d", d));
    ipb_read(32'h14, d); check(d == 11, $sformatf("fragment count %0d", d));
    ipb_read(32'h13, d); check(d >= 1, "lost command count");
    ipb_read(32'h15, d); check(d == kept_ref, $sformatf("kept %0d vs %0d", d, kept_ref));
    ipb_read(32'h16, d); check(d == dropped_ref, $sformatf("dropped %0d vs %0d", d, dropped_ref));
    // snapshot sink: clear it, take one more fragment, read it back over IPBus
    ipb_write(32'h0, 32'h8);
    repeat (20) @(posedge clk_m);
    last_frag = {};
    send_cmd(32'h6006, 64 * 95, 64 * 95 + 1);
    wait (frags == 12);
    repeat (20) @(posedge clk_s);
    ipb_read(32'h1C, d); check(d == 1, $sformatf("sink saw %0d fragment ends", d));
    ipb_read(32'h1B, d); check(d == last_frag.size(), $sformatf("sink stored %0d beats, sent %0d", d, last_frag.size()));
    for (int b = 0; b < last_frag.size(); b++)
      for (int k = 0; k < 4; k++) begin
        ipb_read(32'h10000 + 4 * b + k, d);
        check(d == last_frag[b][127 - 32*k -: 32], $sformatf("sink beat %0d word %0d", b, k));
      end
    check(ddr.cross_4k == 0, "no burst crosses 4 KByte");
    check(ddr.strobe_errors == 0, "full write strobes");
    // mechanisms
    $display("full_wr=%0d part_wr=%0d split=%0d wrap=%0d stall=%0d flow=%0d rwrap=%0d alt=%0d evt_bp=%0d snv_bp=%0d kept=%0d dropped=%0d hdr_only=%0d",
             n_full_wr, n_part_wr, n_split, n_wrap, n_stall, n_flow, n_rwrap, n_alt, bp_cycles, snv_bp, kept_ref, dropped_ref, hdr_only);
    check(n_full_wr > 0, "4 KByte write bursts");
    check(n_part_wr > 0, "short write burst at write-run end");
    check(n_wrap > 0, "circular buffer wrap");
    check(n_stall > 0, "indexer waits for data");
    check(n_flow > 0, "read flow control");
    check(n_rwrap > 0, "read range across the wrap");
    check(n_alt > 0, "event and supernova reads interleaved");
    check(bp_cycles > 0 && snv_bp > 0, "output back-pressure");
    check(dropped_ref > 0 && kept_ref > 0, "timestamp selection keeps and drops");
    check(hdr_only > 0, "fragment with no data");
    check(n_comp == 3, "compressed packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
