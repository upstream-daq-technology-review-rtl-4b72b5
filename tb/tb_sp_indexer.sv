// tb_sp_indexer: reports write-runs with known addresses and sends commands;
// checks the address range returned for each (start of the first run, start
// of the run after the last), the wait for a run not yet written, the use of
// next_addr for the newest run, the clamp of a range that has left an
// 8-entry index, and the counters; then 300 random commands, with new runs
// arriving in between, against a reference model of the index.
`timescale 1ns/1ps
module tb_sp_indexer;
  logic clk = 0, rst = 1;
  always #1.667 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask
  localparam longint T0 = 1000;
  function automatic logic [31:0] A(int k); return 32'(k * 32'h1340 + 32'h40); endfunction

  logic [63:0] init_ts = T0; logic init_ts_valid = 0;
  logic run_done = 0; logic [31:0] run_addr, next_addr;
  logic cmd_valid = 0, cmd_ready; logic [63:0] cmd_start, cmd_end;
  logic req_valid, req_ready = 0; logic [31:0] req_start, req_end;
  logic [47:0] runs_written; logic [31:0] wait_cycles, lost_cmds;

  sp_indexer #(.INDEX_DEPTH(8), .TS_PER_RUN(64)) dut (.*);

  int nruns = 0;
  task automatic add_run();
    @(posedge clk); run_done <= 1; run_addr <= A(nruns); next_addr <= A(nruns + 1);
    @(posedge clk); run_done <= 0;
    nruns++;
  endtask

  task automatic cmd(input int s_run, input int s_off, input int e_run, input int e_off,
                     input logic [31:0] es, input logic [31:0] ee, input string what);
    @(posedge clk); cmd_valid <= 1; cmd_start <= T0 + 64 * s_run + s_off; cmd_end <= T0 + 64 * e_run + e_off;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 0;
    req_ready <= 1;
    do @(posedge clk); while (!req_valid);
    check(req_start == es && req_end == ee, $sformatf("%s: %h..%h vs %h..%h", what, req_start, req_end, es, ee));
    req_ready <= 0;
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int waits0;
    repeat (5) @(posedge clk); rst = 0;
    @(posedge clk); init_ts_valid <= 1;
    fork
      cmd(2, 3, 3, 5, A(2), A(4), "waits for run 3");
      begin repeat (50) @(posedge clk); for (int k = 0; k < 4; k++) begin add_run(); repeat (20) @(posedge clk); end end
    join
    check(wait_cycles > 50, "indexer waited for data");
    for (int k = 0; k < 8; k++) add_run();        // 12 runs
    @(posedge clk);
    check(runs_written == 12, "runs counted");
    cmd(6, 0, 9, 63, A(6), A(10), "range inside the index");
    cmd(5, 10, 11, 0, A(5), A(12), "newest run uses next_addr");
    waits0 = int'(lost_cmds);
    cmd(1, 0, 2, 0, A(4), A(5), "range that left the index");
    check(lost_cmds == 32'(waits0 + 1), "lost command counted");
    cmd(3, 0, 6, 0, A(4), A(7), "start clamped to the oldest run");
    cmd(-10, 0, 4, 0, A(4), A(5), "start before the initial timestamp");
    // random commands against a reference model of the index
    for (int n = 0; n < 300; n++) begin
      int s_run, e_run, oldest, es, ee;
      if ($urandom_range(0, 2) == 0) add_run();
      @(posedge clk);
      oldest = (nruns > 8) ? nruns - 8 : 0;
      s_run = nruns - 1 - int'($urandom_range(0, 10));
      if (s_run < 0) s_run = 0;
      e_run = s_run + int'($urandom_range(0, 4));
      if (e_run > nruns - 1) e_run = nruns - 1;
      es = (s_run < oldest) ? oldest : s_run;
      ee = (e_run < es) ? es : e_run;
      cmd(s_run, int'($urandom_range(0, 63)), e_run, int'($urandom_range(0, 63)), A(es), A(ee + 1),
          $sformatf("random command runs %0d..%0d of %0d", s_run, e_run, nruns));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
