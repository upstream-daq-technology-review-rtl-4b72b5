// tb_pulse_sync: sends single-cycle pulses, spaced at least six destination
// cycles apart, from a slow to a fast clock and back, and checks that each
// gives exactly one single-cycle pulse on the other side.
`timescale 1ns/1ps
module tb_pulse_sync;
  logic ca = 0, cb = 0, rst = 1;
  always #2.0 ca = !ca;
  always #1.667 cb = !cb;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic pa = 0, pb = 0, ab, ba;
  pulse_sync u_ab (.src_clk(ca), .src_rst(rst), .src_pulse(pa), .dst_clk(cb), .dst_rst(rst), .dst_pulse(ab));
  pulse_sync u_ba (.src_clk(cb), .src_rst(rst), .src_pulse(pb), .dst_clk(ca), .dst_rst(rst), .dst_pulse(ba));

  int n_ab = 0, n_ba = 0, long_ab = 0, long_ba = 0;
  logic ab_q = 0, ba_q = 0;
  always @(posedge cb) if (!rst) begin if (ab) n_ab++; if (ab && ab_q) long_ab++; ab_q <= ab; end
  always @(posedge ca) if (!rst) begin if (ba) n_ba++; if (ba && ba_q) long_ba++; ba_q <= ba; end

  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (5) @(posedge ca); rst = 0;
    fork
      for (int i = 0; i < 100; i++) begin
        @(posedge ca); pa <= 1; @(posedge ca); pa <= 0; repeat ($urandom_range(6, 20)) @(posedge ca);
      end
      for (int i = 0; i < 80; i++) begin
        @(posedge cb); pb <= 1; @(posedge cb); pb <= 0; repeat ($urandom_range(8, 20)) @(posedge cb);
      end
    join
    repeat (20) @(posedge ca);
    check(n_ab == 100, $sformatf("slow to fast: %0d pulses", n_ab));
    check(n_ba == 80, $sformatf("fast to slow: %0d pulses", n_ba));
    check(long_ab == 0 && long_ba == 0, "single-cycle output pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
