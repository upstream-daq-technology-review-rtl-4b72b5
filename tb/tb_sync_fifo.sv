// tb_sync_fifo: random pushes and pops (including pushes when full and pops
// when empty, which must be ignored) against a reference queue; checks the
// first-word-fall-through data, full, empty and count every cycle.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 12, D = 16;
  logic clk = 0, rst = 1;
  always #2.0 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic wr_en = 0, rd_en = 0; logic [W-1:0] wr_data = 0, rd_data;
  logic full, empty; logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  logic [W-1:0] ref_q[$];
  int fulls = 0, empties = 0, bias = 50;
  always @(posedge clk) if (!rst) begin
    check(count == ($clog2(D+1))'(ref_q.size()), $sformatf("count %0d vs %0d", count, ref_q.size()));
    check(full == (ref_q.size() == D) && empty == (ref_q.size() == 0), "flags");
    if (!empty) check(rd_data == ref_q[0], "head data");
    if (full) fulls++;
    if (empty) empties++;
    if (rd_en && ref_q.size() > 0) void'(ref_q.pop_front());
    if (wr_en && !full) ref_q.push_back(wr_data);
    wr_en <= ($urandom_range(0, 99) < bias); wr_data <= W'($urandom);
    rd_en <= ($urandom_range(0, 99) >= bias);
  end

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (5) @(posedge clk); rst = 0;
    for (int ph = 0; ph < 6; ph++) begin
      bias = (ph % 3 == 0) ? 80 : (ph % 3 == 1) ? 20 : 50;
      repeat (2000) @(posedge clk);
    end
    check(fulls > 0 && empties > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
