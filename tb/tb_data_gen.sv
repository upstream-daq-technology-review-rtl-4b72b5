// tb_data_gen: runs the generator with 5 links and short packets under random
// per-link TREADY and checks every link's super-packets: flags word 0, the
// 64-bit timestamp INIT_TS + 64 * run (most significant word first), the
// payload counter, TLAST on the last word, the number of runs, TDATA held
// while stalled, and that busy falls at the end and a second start works.
`timescale 1ns/1ps
module tb_data_gen;
  localparam int N = 5, PL = 37;
  localparam longint T0 = 64'h0000_1234_0000_0100;
  logic clk = 0, rst = 1;
  always #2.0 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic start = 0; logic [31:0] n_runs = 0;
  logic [N-1:0][15:0] m_tdata; logic [N-1:0] m_tvalid, m_tlast, m_tready; logic busy;
  data_gen #(.N_LINKS(N), .PAYLOAD_WORDS(PL), .INIT_TS(T0)) dut (.*);

  int widx[N], runs[N];
  logic [N-1:0] rdy = 0, pv = 0, pr = 0;
  logic [N-1:0][15:0] pd;
  always @(posedge clk) for (int i = 0; i < N; i++) rdy[i] <= ($urandom_range(0, 2) != 0);
  assign m_tready = rdy;

  always @(posedge clk) if (!rst) for (int i = 0; i < N; i++) begin
    automatic longint ts = T0 + 64 * runs[i];
    automatic logic [15:0] e;
    if (pv[i] && !pr[i]) check(m_tvalid[i] && m_tdata[i] == pd[i], "held while stalled");
    pv[i] <= m_tvalid[i]; pr[i] <= m_tready[i]; pd[i] <= m_tdata[i];
    if (m_tvalid[i] && m_tready[i]) begin
      case (widx[i])
        0: e = 16'h0;
        1, 2, 3, 4: e = 16'(ts >> (16 * (4 - widx[i])));
        default: e = 16'(widx[i] - 5);
      endcase
      check(m_tdata[i] == e, $sformatf("link %0d run %0d word %0d: %h vs %h", i, runs[i], widx[i], m_tdata[i], e));
      check(m_tlast[i] == (widx[i] == PL + 4), "TLAST position");
      if (m_tlast[i]) begin widx[i] = 0; runs[i]++; end else widx[i]++;
    end
  end

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (5) @(posedge clk); rst = 0;
    for (int i = 0; i < N; i++) begin widx[i] = 0; runs[i] = 0; end
    @(posedge clk); start <= 1; n_runs <= 7;
    @(posedge clk); start <= 0;
    @(posedge clk);
    check(busy, "busy after start");
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) check(runs[i] == 7, $sformatf("link %0d sent %0d runs", i, runs[i]));
    @(posedge clk); start <= 1; n_runs <= 2;
    @(posedge clk); start <= 0;
    for (int i = 0; i < N; i++) runs[i] = 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int i = 0; i < N; i++) check(runs[i] == 2, $sformatf("second start: link %0d sent %0d runs", i, runs[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
