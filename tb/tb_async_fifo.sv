// tb_async_fifo: writes a counting sequence on one clock and reads it on an
// unrelated faster and slower clock with random enables; checks that every
// word arrives once and in order, that full stops the writer, that wr_count
// never exceeds the depth, and that the FIFO drains to empty.
`timescale 1ns/1ps
module tb_async_fifo;
  localparam int W = 16, D = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst = 1, rd_rst = 1;
  real rd_half = 1.3;
  always #2.0 wr_clk = !wr_clk;
  always #(rd_half) rd_clk = !rd_clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic wr_en = 0, rd_en = 0; logic [W-1:0] wr_data = 0, rd_data;
  logic full, empty; logic [$clog2(D):0] wr_count;
  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int n_wr = 0, n_rd = 0, fulls = 0, wbias = 70, rbias = 70;
  bit go = 0;
  always @(posedge wr_clk) if (!wr_rst) begin
    check(wr_count <= D, "wr_count within depth");
    if (full) fulls++;
    if (wr_en && !full) n_wr <= n_wr + 1;
    wr_en <= go && ($urandom_range(0, 99) < wbias);
    wr_data <= W'((wr_en && !full) ? n_wr + 1 : n_wr);
  end
  always @(posedge rd_clk) if (!rd_rst) begin
    if (rd_en && !empty) begin
      check(rd_data == W'(n_rd), $sformatf("word %0d: %0d", n_rd, rd_data));
      n_rd <= n_rd + 1;
    end
    rd_en <= ($urandom_range(0, 99) < rbias);
  end

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (5) @(posedge wr_clk); wr_rst = 0; rd_rst = 0;
    go = 1;
    repeat (3000) @(posedge wr_clk);
    rd_half = 3.1; rbias = 40;
    repeat (3000) @(posedge wr_clk);
    go = 0;
    rbias = 100;
    repeat (200) @(posedge wr_clk);
    check(n_rd == n_wr && n_wr > 1000, $sformatf("read %0d of %0d", n_rd, n_wr));
    check(empty, "empty after draining");
    check(fulls > 0, "writer saw full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
