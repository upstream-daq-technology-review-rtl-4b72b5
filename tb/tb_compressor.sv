// tb_compressor: sends raw super-packets (5 header words, then 12-bit samples
// as a random walk with occasional large jumps and full-scale steps) with
// random TVALID and TREADY, and decodes the output independently: header
// words unchanged, payload bits read first bit in bit 0 of each word, a code
// word ends at the first '11', its value is the sum of its Fibonacci weights
// (1, 2, 3, 5, ...), minus one, un-zigzagged, added to the previous sample.
// Checks every sample, the padding bits, TLAST only on the last word, and
// prints the compression factor reached on this data.
`timescale 1ns/1ps
module tb_compressor;
  logic clk = 0, rst = 1;
  always #2.0 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [15:0] s_tdata = 0; logic s_tvalid = 0, s_tlast = 0, s_tready;
  logic [15:0] m_tdata; logic m_tvalid, m_tlast, m_tready;
  logic [31:0] words_in, words_out;
  compressor dut (.*);

  localparam int NPKT = 40;
  logic [16:0] words[$];       // {last, data} to send
  logic [15:0] pkts[NPKT][$];  // words of each packet
  int wr_i = 0;
  always @(posedge clk) if (!rst) begin
    automatic int i = wr_i;
    if (s_tvalid && s_tready) i++;
    wr_i <= i;
    if (i < words.size() && (!(s_tvalid && !s_tready) ? $urandom_range(0, 5) != 0 : 1'b1)) begin
      s_tvalid <= 1; {s_tlast, s_tdata} <= words[i];
    end else s_tvalid <= 0;
  end

  logic rdy = 0;
  always @(posedge clk) rdy <= ($urandom_range(0, 4) != 0);
  assign m_tready = rdy;

  // collect output packets
  logic [15:0] cur[$];
  int n_out = 0;
  longint fibw[24];
  always @(posedge clk) if (!rst && m_tvalid && m_tready) begin
    cur.push_back(m_tdata);
    if (m_tlast) begin
      if (n_out < NPKT) check_packet(n_out, cur);
      else check(0, "extra packet");
      n_out++;
      cur = {};
    end
  end

  task automatic check_packet(input int p, input logic [15:0] o[$]);
    int nbits, pos, si, bad;
    longint val;
    int prev, s, d, k;
    bit lastbit;
    bad = 0;
    for (int h = 0; h < 5; h++) if (o[h] != pkts[p][h]) bad++;
    check(bad == 0, $sformatf("packet %0d header", p));
    nbits = 16 * (o.size() - 5);
    pos = 0; prev = 0; si = 5; bad = 0;
    while (si < pkts[p].size()) begin
      val = 0; k = 0; lastbit = 0;
      while (pos < nbits) begin
        automatic bit b = o[5 + pos / 16][pos % 16];
        pos++;
        if (b && lastbit) break;
        if (b) val += fibw[k];
        lastbit = b; k++;
      end
      val -= 1;
      d = (val % 2) ? -int'((val + 1) / 2) : int'(val / 2);
      s = prev + d;
      if (s != int'(pkts[p][si][11:0])) bad++;
      prev = s; si++;
    end
    check(bad == 0, $sformatf("packet %0d: %0d samples wrong", p, bad));
    check(nbits - pos < 16, $sformatf("packet %0d: %0d spare bits (padding only at the end)", p, nbits - pos));
    while (pos < nbits) begin check(o[5 + pos / 16][pos % 16] == 0, "padding zero"); pos++; end
  endtask

  initial begin #4000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int smp, nsamp;
    fibw[0] = 1; fibw[1] = 2;
    for (int k = 2; k < 24; k++) fibw[k] = fibw[k - 1] + fibw[k - 2];
    for (int p = 0; p < NPKT; p++) begin
      nsamp = (p < 3) ? p + 1 : 64 + $urandom_range(0, 300);
      pkts[p].push_back(16'h0001);
      for (int k = 0; k < 4; k++) pkts[p].push_back(16'($urandom));
      smp = 2048;
      for (int j = 0; j < nsamp; j++) begin
        case ($urandom_range(0, 19))
          0: smp = $urandom_range(0, 4095);
          1: smp = (smp < 2048) ? 4095 : 0;
          default: smp = smp + $urandom_range(0, 8) - 4;
        endcase
        if (smp < 0) smp = 0;
        if (smp > 4095) smp = 4095;
        pkts[p].push_back(16'(smp));
      end
      foreach (pkts[p][j]) words.push_back({j == pkts[p].size() - 1, pkts[p][j]});
    end
    repeat (5) @(posedge clk); rst = 0;
    for (int t = 0; t < 400000 && n_out < NPKT; t++) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_out == NPKT, $sformatf("%0d packets out", n_out));
    check(words_in == 32'(words.size()), "input word count");
    $display("compression factor on this data: %0.2f (payload words in / out)",
             real'(words_in - 5 * NPKT) / real'(words_out - 5 * NPKT));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
