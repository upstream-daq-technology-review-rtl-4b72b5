// tb_sp_formatter: three links send super-packets of varying length with
// different start delays; the testbench rebuilds the expected memory image
// (per write-run: link 0, 1, 2, each with its BEEF CAFE/length/link header row,
// the run padded to a 512-bit word) and checks every 512-bit word, the burst
// descriptors (cut at every BURST_BEATS-word boundary and at run ends, with
// run_last on the last descriptor of each run) and the initial timestamp.
`timescale 1ns/1ps
module tb_sp_formatter;
  import bm_pkg::*;
  localparam int N = 3, RUNS = 6, BB = 4;
  logic s_clk = 0, m_clk = 0, s_rst = 1, m_rst = 1;
  always #2.0 s_clk = !s_clk;
  always #1.667 m_clk = !m_clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic enable = 1;
  logic [N-1:0][15:0] s_tdata; logic [N-1:0] s_tvalid, s_tlast, s_tready;
  logic [511:0] wdata; logic wdata_valid, wdata_pop;
  logic desc_valid, desc_run_last, desc_pop; logic [2:0] desc_beats;
  logic [63:0] init_ts; logic init_ts_valid;

  sp_formatter #(.N_LINKS(N), .IN_DEPTH(256), .STREAM_DEPTH(16), .BURST_BEATS(BB)) dut (.*);

  function automatic int plen(int l, int r); return 3 + (l * 7 + r * 5) % 23; endfunction
  localparam longint T0 = 64'h0123_4567_89AB_0000;

  logic [16:0] lq[N][$];
  int lp[N] = '{default: 0};
  always_comb for (int l = 0; l < N; l++) begin
    s_tvalid[l] = lq[l].size() > lp[l];
    s_tdata[l]  = s_tvalid[l] ? lq[l][lp[l]][15:0] : 16'h0;
    s_tlast[l]  = s_tvalid[l] ? lq[l][lp[l]][16] : 1'b0;
  end
  always_ff @(posedge s_clk) for (int l = 0; l < N; l++) if (s_tvalid[l] && s_tready[l]) lp[l] <= lp[l] + 1;

  // expected rows
  logic [63:0] exp_rows[$];
  int run_words[RUNS];
  initial begin
    for (int r = 0; r < RUNS; r++) begin
      automatic int n0 = exp_rows.size();
      for (int l = 0; l < N; l++) begin
        automatic logic [15:0] w[$];
        automatic longint t = T0 + 64 * r;
        automatic int n = 5 + plen(l, r);
        w = '{16'h0F0F, t[63:48], t[47:32], t[31:16], t[15:0]};
        for (int j = 0; j < plen(l, r); j++) w.push_back(16'(l * 1000 + r * 50 + j));
        exp_rows.push_back({MAGIC0, MAGIC1, 16'(n), 16'(l)});
        while (w.size() % 4) w.push_back(16'h0);
        for (int k = 0; k < w.size(); k += 4) exp_rows.push_back({w[k], w[k+1], w[k+2], w[k+3]});
      end
      while ((exp_rows.size() - n0) % 8) exp_rows.push_back(64'h0);
      run_words[r] = (exp_rows.size() - n0) / 8;
    end
  end

  // consumers
  logic rnd;
  always @(posedge m_clk) rnd <= $urandom_range(0, 1);
  assign wdata_pop = wdata_valid && rnd;
  assign desc_pop  = desc_valid && rnd;
  int wcount = 0, dcount = 0, dwords = 0, run_no = 0, run_acc = 0;
  always @(posedge m_clk) if (!m_rst) begin
    if (wdata_pop) begin
      for (int k = 0; k < 8; k++)
        check(wdata[511 - 64*k -: 64] == exp_rows[wcount*8 + k], $sformatf("word %0d row %0d", wcount, k));
      wcount++;
    end
    if (desc_pop) begin
      dwords += desc_beats;
      run_acc += desc_beats;
      check(desc_beats >= 1 && desc_beats <= BB, "descriptor length");
      if (desc_run_last) begin
        check(run_acc == run_words[run_no], $sformatf("run %0d words %0d vs %0d", run_no, run_acc, run_words[run_no]));
        run_no++; run_acc = 0;
      end else begin
        check(dwords % BB == 0, "descriptor ends on a burst boundary");
      end
      dcount++;
    end
  end

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (5) @(posedge s_clk); s_rst = 0; m_rst = 0;
    for (int l = N - 1; l >= 0; l--) begin
      repeat (30) @(posedge s_clk);
      for (int r = 0; r < RUNS; r++) begin
        automatic longint t = T0 + 64 * r;
        lq[l].push_back({1'b0, 16'h0F0F});
        lq[l].push_back({1'b0, t[63:48]}); lq[l].push_back({1'b0, t[47:32]});
        lq[l].push_back({1'b0, t[31:16]}); lq[l].push_back({1'b0, t[15:0]});
        for (int j = 0; j < plen(l, r); j++) lq[l].push_back({(j == plen(l, r) - 1), 16'(l * 1000 + r * 50 + j)});
      end
    end
    wait (run_no == RUNS);
    repeat (20) @(posedge m_clk);
    check(wcount == exp_rows.size() / 8, $sformatf("word count %0d", wcount));
    check(dwords == wcount, "descriptors cover all words");
    check(init_ts_valid && init_ts == T0, "initial timestamp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
