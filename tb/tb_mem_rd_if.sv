// tb_mem_rd_if: preloads the DDR4 model (16 KByte, 30-cycle read latency)
// with numbered beats and checks the read interface: an event range that
// wraps past the memory end, a supernova read of the latest words before the
// write pointer, both at once (bursts alternate between them), flow control
// (no event burst while evt_space_ok is low), bursts that never exceed
// 4 KByte or cross a 4 KByte boundary, rd_src/rd_last, and the time of a full
// 4 KByte read (about 98 cycles in the document).
`timescale 1ns/1ps
module tb_mem_rd_if;
  localparam longint MEMB = 16384;
  logic clk = 0, rst = 1;
  always #1.667 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic evt_req_valid = 0, evt_req_ready; logic [31:0] evt_start, evt_end;
  logic snv_trig = 0; logic [31:0] snv_words = 0; logic [31:0] wr_ptr = 0;
  logic evt_space_ok = 1, snv_space_ok = 1;
  logic [31:0] m_araddr; logic [7:0] m_arlen; logic [2:0] m_arsize; logic [1:0] m_arburst;
  logic [0:0] m_arid, m_rid; logic m_arvalid, m_arready; logic [511:0] m_rdata; logic [1:0] m_rresp;
  logic m_rlast, m_rvalid, m_rready;
  logic [511:0] rd_data; logic rd_valid, rd_src, rd_last, snv_busy; logic [31:0] resp_errors;

  mem_rd_if #(.MEM_BYTES(MEMB)) dut (.*);

  ddr4_axi_model ddr (.clk, .rst, .awaddr('0), .awlen('0), .awvalid(1'b0), .awready(),
    .wdata('0), .wstrb('0), .wlast(1'b0), .wvalid(1'b0), .wready(), .bresp(), .bvalid(), .bready(1'b0),
    .araddr(m_araddr), .arlen(m_arlen), .arid(m_arid), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rid(m_rid), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready));

  longint exp_evt[$], exp_snv[$];
  int evt_lasts = 0, snv_lasts = 0, evt_ar_blocked = 0, alternations = 0, t_ar = 0, cyc = 0, t4k = 0;
  logic prev_id;
  logic [7:0] cur_len;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (m_arvalid && m_arready) begin
      check(int'(m_araddr[11:0]) + (int'(m_arlen) + 1) * 64 <= 4096, "burst within 4 KByte");
      if (!evt_space_ok && m_arid == 1'b0) evt_ar_blocked++;
      if (dut.active == 2'b11 && m_arid[0] != prev_id) alternations++;
      prev_id <= m_arid[0];
      t_ar = cyc; cur_len = m_arlen;
    end
    if (m_rvalid && m_rready && m_rlast && cur_len == 8'd63 && t4k == 0) t4k = cyc - t_ar;
    if (rd_valid) begin
      if (!rd_src) begin
        check(exp_evt.size() > 0 && rd_data == {8{exp_evt.pop_front()}}, "event read data");
        if (rd_last) begin evt_lasts++; check(exp_evt.size() == 0, "event rd_last on final beat"); end
      end else begin
        check(exp_snv.size() > 0 && rd_data == {8{exp_snv.pop_front()}}, "supernova read data");
        if (rd_last) begin snv_lasts++; check(exp_snv.size() == 0, "supernova rd_last on final beat"); end
      end
    end
  end

  task automatic evt_req(input longint s, input longint e);
    longint n = ((e - s) / 64 + MEMB / 64) % (MEMB / 64);
    if (n == 0) n = MEMB / 64;
    for (longint k = 0; k < n; k++) exp_evt.push_back(((s / 64) + k) % (MEMB / 64));
    @(posedge clk); evt_req_valid <= 1; evt_start <= 32'(s); evt_end <= 32'(e);
    do @(posedge clk); while (!evt_req_ready);
    evt_req_valid <= 0;
  endtask

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (longint b = 0; b < MEMB / 64; b++) ddr.mem[b] = {8{b}};
    repeat (5) @(posedge clk); rst = 0;
    // wrapping event range
    evt_req(64'h3000, 64'h1000);
    wait (evt_lasts == 1);
    $display("4KB read took %0d cycles", t4k);
    check(t4k >= 93 && t4k <= 103, "4 KByte read time near 98 cycles");
    // flow control: event range waits while space is low, supernova proceeds
    evt_space_ok <= 0;
    wr_ptr = 32'h0800; snv_words = 32'd3000;   // 6000 bytes -> 94 beats before 0x800, wraps
    for (longint k = 0; k < 94; k++) exp_snv.push_back(((32 - 94 + k) + MEMB / 64) % (MEMB / 64));
    @(posedge clk); snv_trig <= 1; @(posedge clk); snv_trig <= 0;
    evt_req(64'h1040, 64'h2040);
    repeat (400) @(posedge clk);
    evt_space_ok <= 1;
    wait (evt_lasts == 2 && snv_lasts == 1);
    // both at once: bursts alternate
    for (longint k = 0; k < 94; k++) exp_snv.push_back(((32 - 94 + k) + MEMB / 64) % (MEMB / 64));
    @(posedge clk); snv_trig <= 1; @(posedge clk); snv_trig <= 0;
    evt_req(64'h2000, 64'h2000);               // zero length: whole memory
    wait (evt_lasts == 3 && snv_lasts == 2);
    repeat (5) @(posedge clk);
    check(evt_ar_blocked == 0, "no event burst without space");
    check(alternations > 0, "event and supernova bursts alternate");
    check(exp_evt.size() == 0 && exp_snv.size() == 0, "all data delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
