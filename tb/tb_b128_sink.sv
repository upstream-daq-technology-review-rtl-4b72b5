// tb_b128_sink: writes fragments of random 128-bit beats (random TVALID and
// TREADY on the write clock) into a 64-beat sink and reads the snapshot back
// on an unrelated read clock: checks each 32-bit word (word 0 = bits
// [127:96]), the synchronised stored count, that capture stops when full,
// the TLAST counter, and that clear (from the read clock) restarts capture.
`timescale 1ns/1ps
module tb_b128_sink;
  localparam int D = 64;
  logic clk = 0, rd_clk = 0, rst = 1, rd_rst = 1;
  always #1.667 clk = !clk;
  always #2.0 rd_clk = !rd_clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [127:0] s_tdata = 0; logic s_tvalid = 0, s_tready = 0, s_tlast = 0;
  logic clear = 0; logic [$clog2(D)+1:0] rd_addr = 0; logic [31:0] rd_data;
  logic [$clog2(D):0] stored; logic [31:0] lasts_seen;
  b128_sink #(.DEPTH(D)) dut (.*);

  logic [128:0] beats[$];
  int sent = 0, lasts = 0;
  bit run = 0;
  always @(posedge clk) if (!rst) begin
    if (s_tvalid && s_tready) begin
      if (sent < D && s_tlast) lasts++;
      sent++;
    end
    s_tready <= ($urandom_range(0, 3) != 0);
    if (run && (!s_tvalid || s_tready)) begin
      automatic logic [128:0] b = {$urandom_range(0, 9) == 0, $urandom, $urandom, $urandom, $urandom};
      s_tvalid <= ($urandom_range(0, 1) != 0);
      {s_tlast, s_tdata} <= b;
    end else if (!run && s_tready) s_tvalid <= 0;
  end
  always @(posedge clk) if (!rst && s_tvalid && s_tready) beats.push_back({s_tlast, s_tdata});

  task automatic read_word(input int a, output logic [31:0] d);
    @(posedge rd_clk); rd_addr <= ($clog2(D) + 2)'(a);
    @(posedge rd_clk); @(posedge rd_clk);
    d = rd_data;
  endtask

  task automatic check_snapshot(input string tag);
    logic [31:0] d;
    for (int i = 0; i < D; i++)
      for (int w = 0; w < 4; w++) begin
        read_word(4 * i + w, d);
        check(i < beats.size() && d == beats[i][127 - 32 * w -: 32], $sformatf("%s beat %0d word %0d", tag, i, w));
      end
  endtask

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (5) @(posedge clk); rst = 0; rd_rst = 0;
    repeat (5) @(posedge clk);
    run = 1;
    repeat (600) @(posedge clk);
    run = 0;
    repeat (20) @(posedge rd_clk);
    check(sent > D, "more beats sent than the sink holds");
    check(stored == ($clog2(D) + 1)'(D), $sformatf("stored %0d", stored));
    check(lasts_seen == 32'(lasts), $sformatf("lasts %0d vs %0d", lasts_seen, lasts));
    check_snapshot("first");
    // clear from the read clock, then capture a short burst
    @(posedge rd_clk); clear <= 1; @(posedge rd_clk); clear <= 0;
    repeat (10) @(posedge rd_clk);
    check(stored == 0 && lasts_seen == 0, "clear empties the sink");
    beats = {}; sent = 0; lasts = 0;
    @(posedge clk); run = 1;
    repeat (40) @(posedge clk);
    run = 0;
    repeat (20) @(posedge rd_clk);
    check(stored == ($clog2(D) + 1)'(beats.size()) && beats.size() < D, $sformatf("stored %0d after clear", stored));
    for (int i = 0; i < beats.size(); i++) begin
      logic [31:0] d;
      read_word(4 * i + 3, d);
      check(d == beats[i][31:0], $sformatf("after clear beat %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
