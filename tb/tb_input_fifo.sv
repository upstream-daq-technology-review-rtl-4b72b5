// tb_input_fifo: checks one input link: 16-bit words packed into 64-bit rows
// (first word in the top bits, last row zero-padded), the packet length
// counted at TLAST, the crossing to the second clock, back-pressure while the
// read side is idle, and that a packet started while disabled is discarded.
`timescale 1ns/1ps
module tb_input_fifo;
  logic s_clk = 0, m_clk = 0, s_rst = 1, m_rst = 1;
  always #2.0 s_clk = !s_clk;
  always #1.667 m_clk = !m_clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic enable = 0;
  logic [15:0] s_tdata; logic s_tvalid, s_tlast, s_tready;
  logic pkt_valid, pkt_pop, row_valid, row_pop;
  logic [15:0] pkt_len; logic [63:0] row;

  input_fifo #(.DEPTH_WORDS(64), .LEN_DEPTH(8)) dut (.*);

  logic [16:0] q[$];
  int qp = 0;
  assign s_tvalid = q.size() > qp;
  assign s_tdata  = s_tvalid ? q[qp][15:0] : 16'h0;
  assign s_tlast  = s_tvalid ? q[qp][16] : 1'b0;
  always_ff @(posedge s_clk) if (s_tvalid && s_tready) qp <= qp + 1;

  function automatic logic [15:0] wv(int p, int j); return 16'(p * 256 + j + 1); endfunction
  int lens[6] = '{5, 6, 7, 8, 9, 40};
  int bp = 0;
  always @(posedge s_clk) if (s_tvalid && !s_tready) bp++;

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    pkt_pop = 0; row_pop = 0;
    repeat (5) @(posedge s_clk); s_rst = 0; m_rst = 0;
    // disabled: discarded
    for (int j = 0; j < 7; j++) q.push_back({(j == 6), 16'hBAD0});
    wait (qp == q.size());
    repeat (20) @(posedge m_clk);
    check(!pkt_valid && !row_valid, "disabled packet discarded");
    enable = 1;
    for (int p = 0; p < 6; p++) for (int j = 0; j < lens[p]; j++) q.push_back({(j == lens[p] - 1), wv(p, j)});
    repeat (300) @(posedge s_clk);     // read side idle: FIFO fills, tready drops
    check(bp > 0, "back-pressure when full");
    for (int p = 0; p < 6; p++) begin
      int nrows;
      while (!pkt_valid) @(posedge m_clk);
      #0.1;
      check(pkt_len == 16'(lens[p]), $sformatf("packet %0d length %0d", p, pkt_len));
      nrows = (lens[p] + 3) / 4;
      for (int r = 0; r < nrows; r++) begin
        logic [63:0] e;
        while (!row_valid) @(posedge m_clk);
        #0.1;
        for (int k = 0; k < 4; k++) e[63 - 16*k -: 16] = (4*r + k < lens[p]) ? wv(p, 4*r + k) : 16'h0;
        check(row == e, $sformatf("packet %0d row %0d %h vs %h", p, r, row, e));
        row_pop = 1; if (r == nrows - 1) pkt_pop = 1;
        @(posedge m_clk); #0.1; row_pop = 0; pkt_pop = 0;
      end
    end
    repeat (10) @(posedge m_clk);
    check(!pkt_valid && !row_valid, "all consumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
