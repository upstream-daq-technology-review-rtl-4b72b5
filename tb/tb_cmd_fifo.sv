// tb_cmd_fifo: sends random 10-word event selection commands on the 16-bit
// stream (clk_s, random valid gaps) with a few malformed ones (TLAST too early
// or too late) in between, and pops them on the unrelated clk_m with random
// pauses. Checks that every well-formed command comes out whole and in order,
// that the malformed ones are dropped and counted, and that TREADY drops when
// the 32-entry FIFO is full.
`timescale 1ns/1ps
module tb_cmd_fifo;
  import bm_pkg::*;
  logic s_clk = 0, m_clk = 0, s_rst = 1, m_rst = 1;
  always #2.0 s_clk = !s_clk;
  always #1.667 m_clk = !m_clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [15:0] s_tdata = 0; logic s_tvalid = 0, s_tlast = 0, s_tready;
  logic [31:0] bad_cmds; trig_cmd_t cmd; logic cmd_valid, cmd_pop;
  cmd_fifo dut (.*);

  trig_cmd_t sent[$];
  int rd_i = 0, n_bad = 0, full_seen = 0;
  bit hold_pop = 1;

  // Words to send, {tlast, tdata}; a clocked driver walks through them.
  logic [16:0] words[$];
  int wr_i = 0;
  task automatic send(input trig_cmd_t c, input int nwords);
    logic [159:0] v;
    v = c;
    for (int w = 0; w < nwords; w++)
      words.push_back({w == nwords - 1, (w < 10) ? v[159 - 16 * w -: 16] : 16'h5555});
  endtask

  always @(posedge s_clk) if (!s_rst) begin
    automatic int i = wr_i;
    if (s_tvalid && s_tready) i++;
    wr_i <= i;
    if (i < words.size() && $urandom_range(0, 3) != 0) begin
      s_tvalid <= 1; {s_tlast, s_tdata} <= words[i];
    end else if (!(s_tvalid && !s_tready)) begin
      s_tvalid <= 0;
    end else begin
      s_tvalid <= 1; {s_tlast, s_tdata} <= words[i];
    end
  end

  always @(posedge s_clk) if (!s_rst && s_tvalid && !s_tready) full_seen++;

  logic pop_en = 0;
  always @(posedge m_clk) pop_en <= ($urandom_range(0, 2) != 0);
  assign cmd_pop = cmd_valid && !hold_pop && pop_en;
  always @(posedge m_clk) if (!m_rst && cmd_pop) begin
    if (rd_i < sent.size()) check(cmd == sent[rd_i], $sformatf("command %0d: %h vs %h", rd_i, cmd, sent[rd_i]));
    else check(0, "extra command");
    rd_i <= rd_i + 1;
  end

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    trig_cmd_t c;
    repeat (5) @(posedge s_clk); s_rst = 0; m_rst = 0;
    repeat (5) @(posedge s_clk);
    // Fill beyond the FIFO depth while nothing is popped.
    for (int i = 0; i < 40; i++) begin
      c.id = 32'hA000_0000 + i; c.t_start = {$urandom, $urandom}; c.t_end = {$urandom, $urandom};
      sent.push_back(c); send(c, 10);
    end
    repeat (3000) @(posedge s_clk);
    hold_pop = 0;
    for (int i = 0; i < 60; i++) begin
      c.id = 32'hB000_0000 + i; c.t_start = {$urandom, $urandom}; c.t_end = {$urandom, $urandom};
      if (i % 7 == 3) begin send(c, (i % 2) ? 6 : 13); n_bad++; end
      else begin sent.push_back(c); send(c, 10); end
    end
    repeat (2000) @(posedge s_clk);
    check(rd_i == sent.size(), $sformatf("commands out %0d of %0d", rd_i, sent.size()));
    check(bad_cmds == 32'(n_bad), $sformatf("bad commands %0d vs %0d", bad_cmds, n_bad));
    check(full_seen > 0, "back-pressure when full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
