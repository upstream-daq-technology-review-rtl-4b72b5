// tb_bm_csr: IPBus master model against the register block. Writes and reads
// back every read/write register with random values, checks that the control
// pulses last one cycle, reads the 16 status words and B128 sink words (a
// model of the sink's one-cycle read latency), and checks err for unknown
// addresses on read and write and the one-cycle acknowledge.
`timescale 1ns/1ps
module tb_bm_csr;
  import bm_pkg::*;
  logic clk = 0, rst = 1;
  always #2.0 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  ipb_wbus_t ipb_in = '0; ipb_rbus_t ipb_out;
  logic init_send, cmd_issue, snv_trig, sink_clear, fifo_en;
  logic [31:0] n_packets, snv_samples; trig_cmd_t cmd;
  logic [15:0][31:0] stat;
  logic [13:0] sink_addr; logic [31:0] sink_data = 0;
  bm_csr dut (.*);

  always @(posedge clk) sink_data <= {18'h2A5A5, sink_addr} ^ 32'h0F0F_0000;
  for (genvar i = 0; i < 16; i++) assign stat[i] = 32'hC0DE_0000 + 32'(i * 17);

  int wait_cyc;
  logic got_err;
  task automatic ipb(input logic [31:0] a, input logic [31:0] d, input bit wr, output logic [31:0] q);
    @(posedge clk); ipb_in <= '{addr: a, wdata: d, strobe: 1'b1, write: wr};
    wait_cyc = 0;
    do begin @(posedge clk); wait_cyc++; end while (!ipb_out.ack && !ipb_out.err && wait_cyc < 10);
    q = ipb_out.rdata; got_err = ipb_out.err;
    ipb_in <= '0;
  endtask

  int pulses[4], pulse_len[4];
  always @(posedge clk) if (!rst) begin
    automatic logic [3:0] p = {sink_clear, snv_trig, cmd_issue, init_send};
    for (int b = 0; b < 4; b++) if (p[b]) pulses[b]++;
  end

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [31:0] q, v[9];
    repeat (5) @(posedge clk); rst = 0;
    for (int rep = 0; rep < 20; rep++) begin
      for (int a = 1; a <= 8; a++) begin
        v[a] = (a == 1) ? 32'($urandom_range(0, 1)) : $urandom;
        ipb(32'(a), v[a], 1, q);
        check(!got_err && wait_cyc == 2, $sformatf("write %0d acknowledged the cycle after the strobe", a));
      end
      for (int a = 1; a <= 8; a++) begin
        ipb(32'(a), 0, 0, q);
        check(!got_err && q == v[a], $sformatf("read back %0d: %h vs %h", a, q, v[a]));
      end
      check(fifo_en == v[1][0] && n_packets == v[2] && cmd.id == v[3] &&
            cmd.t_start == {v[4], v[5]} && cmd.t_end == {v[6], v[7]} && snv_samples == v[8], "register outputs");
    end
    for (int b = 0; b < 4; b++) begin
      ipb(0, 32'(1 << b), 1, q);
      repeat (3) @(posedge clk);
      check(pulses[b] == 1, $sformatf("pulse %0d lasted %0d cycles", b, pulses[b]));
      check(pulses[(b + 1) % 4] == 0 || b == 3, "other pulses quiet");
      for (int k = 0; k < 4; k++) pulses[k] = 0;
    end
    for (int i = 0; i < 16; i++) begin
      ipb(32'h10 + 32'(i), 0, 0, q);
      check(!got_err && q == stat[i], $sformatf("status %0d", i));
    end
    for (int i = 0; i < 100; i++) begin
      automatic logic [13:0] a = 14'($urandom);
      ipb(32'h10000 + 32'(a), 0, 0, q);
      check(!got_err && q == ({18'h2A5A5, a} ^ 32'h0F0F_0000), $sformatf("sink word %0d", a));
    end
    ipb(32'h9, 1, 1, q);   check(got_err, "write to unknown address");
    ipb(32'h20, 0, 0, q);  check(got_err, "read of unknown address");
    ipb(32'h10, 5, 1, q);  check(got_err, "write to a status word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
