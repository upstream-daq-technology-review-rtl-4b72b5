// tb_mem_wr_if: feeds descriptors and numbered 512-bit words to the write
// interface in front of the DDR4 model (16 KByte, 15-cycle write latency).
// Checks every burst's address and length against a reference cut (4 KByte
// bursts, split at 4 KByte boundaries, wrap at the memory end), the memory
// contents, the write-run addresses reported to the indexer, and the time of
// a full 4 KByte write (about 83 cycles in the document).
`timescale 1ns/1ps
module tb_mem_wr_if;
  localparam longint MEMB = 16384;
  logic clk = 0, rst = 1;
  always #1.667 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [511:0] wdata; logic wdata_valid, wdata_pop;
  logic desc_valid, desc_run_last, desc_pop; logic [6:0] desc_beats;
  logic [31:0] m_awaddr; logic [7:0] m_awlen; logic [2:0] m_awsize; logic [1:0] m_awburst;
  logic m_awvalid, m_awready; logic [511:0] m_wdata; logic [63:0] m_wstrb;
  logic m_wlast, m_wvalid, m_wready; logic [1:0] m_bresp; logic m_bvalid, m_bready;
  logic run_done; logic [31:0] run_addr, next_addr, wr_ptr, resp_errors;

  mem_wr_if #(.MEM_BYTES(MEMB)) dut (.*);

  ddr4_axi_model ddr (.clk, .rst, .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .araddr('0), .arlen('0), .arid('0), .arvalid(1'b0), .arready(), .rdata(), .rresp(), .rid(), .rlast(), .rvalid(), .rready(1'b0));

  // descriptors: {beats, run_last}
  int dq_beats[$], dq_last[$];
  int nwords = 0, popped = 0;
  int dptr = 0;
  assign desc_valid    = dq_beats.size() > dptr;
  assign desc_beats    = desc_valid ? 7'(dq_beats[dptr]) : 7'd0;
  assign desc_run_last = desc_valid ? dq_last[dptr][0] : 1'b0;
  assign wdata_valid   = popped < nwords;
  assign wdata         = {16{popped}};
  always_ff @(posedge clk) if (!rst) begin
    if (desc_pop) dptr <= dptr + 1;
    if (wdata_pop) popped <= popped + 1;
  end

  // reference bursts
  longint exp_addr[$]; int exp_len[$];
  longint exp_run[$];
  initial begin
    automatic longint p = 0, rs = 0;
    automatic int d[8] = '{64, 10, 64, 64, 33, 64, 64, 1};
    automatic int l[8] = '{0, 1, 0, 0, 1, 0, 0, 1};
    for (int i = 0; i < 8; i++) begin
      automatic int left = d[i];
      while (left > 0) begin
        automatic int n = 64 - int'((p % 4096) / 64);
        if (left < n) n = left;
        exp_addr.push_back(p); exp_len.push_back(n);
        p = (p + n * 64) % MEMB; left -= n;
      end
      if (l[i]) begin exp_run.push_back(rs); exp_run.push_back(p); rs = p; end
    end
  end

  int bursts = 0, t_aw = 0, cyc = 0, t4k = 0, runs_seen = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (m_awvalid && m_awready) begin
      check(m_awaddr == 32'(exp_addr[bursts]) && int'(m_awlen) + 1 == exp_len[bursts],
            $sformatf("burst %0d addr %h len %0d", bursts, m_awaddr, m_awlen));
      check(m_awsize == 3'd6 && m_awburst == 2'b01, "burst size and type");
      t_aw = cyc;
      bursts++;
    end
    if (m_bvalid && m_bready && exp_len[bursts-1] == 64 && t4k == 0) t4k = cyc - t_aw;
    if (run_done) begin
      check(run_addr == 32'(exp_run[2*runs_seen]) && next_addr == 32'(exp_run[2*runs_seen+1]),
            $sformatf("run %0d at %h next %h", runs_seen, run_addr, next_addr));
      runs_seen++;
    end
  end

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    automatic int d[8] = '{64, 10, 64, 64, 33, 64, 64, 1};
    automatic int l[8] = '{0, 1, 0, 0, 1, 0, 0, 1};
    repeat (5) @(posedge clk); rst = 0;
    for (int i = 0; i < 8; i++) begin dq_beats.push_back(d[i]); dq_last.push_back(l[i]); nwords += d[i]; end
    wait (popped == nwords && dut.state == 0);
    repeat (5) @(posedge clk);
    check(bursts == exp_addr.size(), $sformatf("burst count %0d vs %0d", bursts, exp_addr.size()));
    check(runs_seen == 3, "write-runs reported");
    // memory holds the last words written at each address (wrap overwrote the start)
    for (int w = 0; w < nwords; w++) begin
      automatic longint b = w % (MEMB / 64);
      if (w + MEMB / 64 >= nwords) check(ddr.peek(b) == {16{32'(w)}}, $sformatf("memory word %0d", w));
    end
    $display("4KB write took %0d cycles", t4k);
    check(t4k >= 78 && t4k <= 88, "4 KByte write time near 83 cycles");
    check(resp_errors == 0, "no response errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
