// tb_trig_cmd_gen: issues random commands, stalls TREADY at random and
// reassembles the 16-bit words. Checks word order (ID, start, end, most
// significant word first), TLAST on the tenth word only, that TDATA/TVALID
// hold while TREADY is low, and that an issue while busy is ignored.
`timescale 1ns/1ps
module tb_trig_cmd_gen;
  import bm_pkg::*;
  logic clk = 0, rst = 1;
  always #2.0 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic issue = 0; trig_cmd_t cmd; logic [15:0] m_tdata; logic m_tvalid, m_tlast, m_tready, busy;
  trig_cmd_gen dut (.*);

  trig_cmd_t exp_q[$];
  int ex_i = 0, nw = 0, ncmd = 0;
  logic [159:0] acc;
  logic [15:0] last_d; logic last_v = 0, last_r = 1;
  logic rdy_rand = 1;
  always @(posedge clk) rdy_rand <= ($urandom_range(0, 2) != 0);
  assign m_tready = rdy_rand;

  always @(posedge clk) if (!rst) begin
    if (last_v && !last_r) check(m_tvalid && m_tdata == last_d, "output held while stalled");
    last_v <= m_tvalid; last_r <= m_tready; last_d <= m_tdata;
    if (m_tvalid && m_tready) begin
      acc = {acc[143:0], m_tdata};
      check(m_tlast == (nw == 9), $sformatf("TLAST at word %0d", nw));
      if (nw == 9) begin
        check(ex_i < exp_q.size() && acc == exp_q[ex_i], $sformatf("command %0d", ex_i));
        ex_i <= ex_i + 1; nw <= 0;
      end else nw <= nw + 1;
    end
  end

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    trig_cmd_t c;
    repeat (5) @(posedge clk); rst = 0;
    for (int i = 0; i < 200; i++) begin
      c.id = $urandom; c.t_start = {$urandom, $urandom}; c.t_end = {$urandom, $urandom};
      @(posedge clk); issue <= 1; cmd <= c; exp_q.push_back(c);
      @(posedge clk); issue <= 0;
      // an issue while busy with another value must be ignored
      @(posedge clk); issue <= 1; cmd <= ~c;
      @(posedge clk); issue <= 0;
      while (busy) @(posedge clk);
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    repeat (20) @(posedge clk);
    check(ex_i == 200, $sformatf("%0d commands out", ex_i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
