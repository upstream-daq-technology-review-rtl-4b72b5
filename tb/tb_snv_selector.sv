// tb_snv_selector: feeds two supernova requests of random 512-bit words in
// bursts that start only when space_ok is high, takes the 256-bit output with
// a random (partly very slow) TREADY and checks the beat order (upper half
// first), TLAST on the second beat of each request's last word, the frame
// counter and that space_ok drops under back-pressure.
`timescale 1ns/1ps
module tb_snv_selector;
  logic clk = 0, rst = 1;
  always #1.667 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [511:0] rd_data = '0; logic rd_valid = 0, rd_last = 0, space_ok;
  logic [255:0] m_tdata; logic m_tlast, m_tvalid, m_tready; logic [31:0] frame_count;
  snv_selector dut (.*);

  logic [512:0] mw[$];
  logic [256:0] eb[$];
  int mw_i = 0, burst_left = 0, eb_i = 0, space_low = 0;
  bit started = 0, slow = 1;

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

  logic rdy = 0;
  always @(posedge clk) rdy <= slow ? ($urandom_range(0, 15) == 0) : ($urandom_range(0, 3) != 0);
  assign m_tready = rdy;
  always @(posedge clk) if (!rst) begin
    if (!space_ok) space_low++;
    if (m_tvalid && m_tready) begin
      if (eb_i < eb.size()) check({m_tlast, m_tdata} == eb[eb_i], $sformatf("beat %0d", eb_i));
      else check(0, "extra beat");
      eb_i <= eb_i + 1;
    end
  end

  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (5) @(posedge clk); rst = 0;
    for (int r = 0; r < 2; r++) begin
      automatic int n = (r == 0) ? 700 : 37;
      for (int w = 0; w < n; w++) begin
        logic [511:0] d;
        for (int k = 0; k < 16; k++) d[32 * k +: 32] = $urandom;
        mw.push_back({w == n - 1, d});
        eb.push_back({1'b0, d[511:256]});
        eb.push_back({w == n - 1, d[255:0]});
      end
    end
    started = 1;
    repeat (30000) @(posedge clk);
    slow = 0;
    for (int t = 0; t < 100000 && eb_i < eb.size(); t++) @(posedge clk);
    repeat (20) @(posedge clk);
    check(eb_i == eb.size(), $sformatf("beats out %0d of %0d", eb_i, eb.size()));
    check(frame_count == 2, $sformatf("frames %0d", frame_count));
    check(space_low > 0, "space_ok dropped under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
