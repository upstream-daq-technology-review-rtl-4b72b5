// tb_evt_selector: builds DDR4 read data the way the formatter writes it
// (runs of super-packets, each with its BEEF CAFE header row, padded to a
// 512-bit word) for a set of commands, feeds it in 64-word bursts that start
// only when space_ok is high, with random gaps, and takes the output with a
// random TREADY. A reference model applies the selection rule
// (ts + 64 > t_start and ts <= t_end) and packs the expected fragment:
// header beat, kept rows two per beat, TKEEP FF00 on a half last beat, TLAST.
// Also checks a header-only fragment, the counters and that space_ok drops.
`timescale 1ns/1ps
module tb_evt_selector;
  import bm_pkg::*;
  logic clk = 0, rst = 1;
  always #1.667 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  trig_cmd_t cmd_in; logic cmd_push = 0, cmd_full;
  logic [511:0] rd_data = '0; logic rd_valid = 0, rd_last = 0, space_ok;
  logic [127:0] m_tdata; logic [15:0] m_tkeep; logic m_tlast, m_tvalid, m_tready;
  logic [31:0] frag_count, pkt_kept, pkt_dropped;
  evt_selector dut (.*);

  // memory words {last, data} and expected beats {last, keep, data}
  logic [512:0] mw[$];
  logic [144:0] eb[$];
  trig_cmd_t cmds[$];
  int n_keep = 0, n_drop = 0;

  task automatic make_region(input int id, input int nruns, input longint tbase, input bit empty_sel);
    logic [63:0] rows[$], kept[$];
    trig_cmd_t c;
    longint ts;
    int len, nrow;
    c.id = 32'(id);
    c.t_start = 64'(tbase + 64 * $urandom_range(0, nruns - 1) + $urandom_range(0, 63));
    c.t_end   = c.t_start + 64'($urandom_range(0, 150));
    if (empty_sel) begin c.t_start = 64'(tbase - 1000); c.t_end = 64'(tbase - 900); end
    for (int r = 0; r < nruns; r++) begin
      for (int l = 0; l < 3; l++) begin
        ts = tbase + 64 * r + ((l == 2 && r == 1) ? 64 : 0);  // one late packet
        len = 5 + $urandom_range(0, 60);
        nrow = (len + 3) / 4;
        begin
          logic [15:0] wq[$];
          logic [63:0] prow[$];
          wq.push_back(16'h0);
          for (int k = 3; k >= 0; k--) wq.push_back(16'(ts >> (16 * k)));
          for (int k = 5; k <= len; k++) wq.push_back(16'($urandom));
          while (wq.size() < 4 * nrow + 4) wq.push_back(16'h0);
          prow.push_back({MAGIC0, MAGIC1, 16'(len), 16'(l)});
          for (int k = 0; k < nrow; k++) prow.push_back({wq[4*k], wq[4*k+1], wq[4*k+2], wq[4*k+3]});
          foreach (prow[k]) rows.push_back(prow[k]);
          if (64'(ts) + 64 > c.t_start && 64'(ts) <= c.t_end) begin
            foreach (prow[k]) kept.push_back(prow[k]); n_keep++;
          end else n_drop++;
        end
      end
      while (rows.size() % 8 != 0) rows.push_back(64'h0);
    end
    for (int w = 0; w < rows.size() / 8; w++) begin
      logic [511:0] d;
      for (int k = 0; k < 8; k++) d[511 - 64 * k -: 64] = rows[8 * w + k];
      mw.push_back({w == rows.size() / 8 - 1, d});
    end
    if (empty_sel) mw[mw.size() - 1][512] = 1'b1;
    eb.push_back({kept.size() == 0, 16'hFFFF, c.id, c.t_start, c.t_end[31:0]});
    for (int k = 0; k < kept.size(); k += 2) begin
      if (k + 1 < kept.size()) eb.push_back({k + 2 == kept.size(), 16'hFFFF, kept[k], kept[k + 1]});
      else eb.push_back({1'b1, 16'hFF00, kept[k], 64'h0});
    end
    cmds.push_back(c);
  endtask

  // read-side driver: bursts of up to 64 words, started only with space_ok
  int mw_i = 0, burst_left = 0;
  always @(posedge clk) if (!rst) begin
    automatic int i = mw_i, bl = burst_left;
    rd_valid <= 0; rd_last <= 0;
    if (bl == 0 && i < mw.size() && space_ok && started) bl = 64;
    if (bl > 0 && i < mw.size() && $urandom_range(0, 7) != 0) begin
      rd_valid <= 1; {rd_last, rd_data} <= mw[i];
      i++; bl--;
    end
    if (i >= mw.size()) bl = 0;
    mw_i <= i; burst_left <= bl;
  end

  function automatic logic [127:0] kmask(input logic [15:0] k);
    for (int i = 0; i < 16; i++) kmask[8 * i +: 8] = {8{k[i]}};
  endfunction

  int eb_i = 0, space_low = 0, beats = 0;
  bit started = 0, slow = 0;
  logic rdy = 0;
  always @(posedge clk) rdy <= slow ? ($urandom_range(0, 15) == 0) : ($urandom_range(0, 3) != 0);
  assign m_tready = rdy;
  always @(posedge clk) if (!rst) begin
    if (!space_ok) space_low++;
    if (m_tvalid && m_tready) begin
      beats++;
      if (eb_i < eb.size()) begin
        automatic logic [144:0] e = eb[eb_i];
        check(m_tlast == e[144] && m_tkeep == e[143:128] &&
              (m_tdata & kmask(e[143:128])) == e[127:0],
              $sformatf("beat %0d: %h %h %b vs %h", eb_i, m_tdata, m_tkeep, m_tlast, e));
      end else check(0, "extra beat");
      eb_i <= eb_i + 1;
    end
  end

  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (5) @(posedge clk); rst = 0;
    for (int i = 0; i < 12; i++) make_region(32'hE000 + i, 2 + $urandom_range(0, 6), 64'd100000 + 5000 * i, i == 4);
    make_region(32'hEFFF, 60, 64'd900000, 0);    // a long range for back-pressure
    foreach (cmds[i]) begin
      @(posedge clk); cmd_push <= 1; cmd_in <= cmds[i];
      @(posedge clk); cmd_push <= 0;
      check(!cmd_full || i >= 15, "command queue not full");
    end
    started = 1;
    slow = 1;
    repeat (20000) @(posedge clk);
    slow = 0;
    for (int t = 0; t < 200000 && eb_i < eb.size(); t++) @(posedge clk);
    repeat (50) @(posedge clk);
    check(eb_i == eb.size(), $sformatf("beats out %0d of %0d", eb_i, eb.size()));
    check(frag_count == 32'(cmds.size()), $sformatf("fragments %0d", frag_count));
    check(pkt_kept == 32'(n_keep) && pkt_dropped == 32'(n_drop),
          $sformatf("kept %0d/%0d dropped %0d/%0d", pkt_kept, n_keep, pkt_dropped, n_drop));
    check(space_low > 0, "space_ok dropped under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
