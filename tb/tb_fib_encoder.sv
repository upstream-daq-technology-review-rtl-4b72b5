// tb_fib_encoder: encodes the document's example (12 -> "101011"), every
// value 0..65535 in turn and checks each code against an independent
// decoder: the bits before the terminator sum (as Fibonacci weights) to the
// input, no two adjacent bits are set before the terminator, the code ends in
// '11' at bit len-1, and len = i+1 for the largest Fibonacci number F(i) <= N.
`timescale 1ns/1ps
module tb_fib_encoder;
  logic clk = 0, rst = 1;
  always #2.0 clk = !clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic in_valid = 0; logic [15:0] in_value = 0;
  logic out_valid; logic [23:0] out_code; logic [4:0] out_len; logic out_err;
  fib_encoder dut (.*);

  longint fibs[24];
  logic [15:0] sent_q[$];
  int rd_i = 0;
  always @(posedge clk) if (!rst && in_valid) sent_q.push_back(in_value);
  always @(posedge clk) if (!rst && out_valid) begin
    automatic longint v = sent_q[rd_i], sum = 0, largest = 0;
    automatic bit adj = 0;
    for (int k = 0; k < 23; k++) if (fibs[k] <= v) largest = k + 1;
    if (v == 0) check(out_err && out_len == 0, "zero flagged");
    else begin
      for (int k = 0; k < int'(out_len) - 1; k++) begin
        if (out_code[k]) sum += fibs[k];
        if (k > 0 && out_code[k] && out_code[k - 1]) adj = 1;
      end
      check(!out_err && sum == v && !adj && out_len == 5'(largest + 1) &&
            out_code[out_len - 1] && out_code[out_len - 2] && (out_code >> out_len) == 0,
            $sformatf("value %0d: code %b len %0d", v, out_code, out_len));
    end
    // "101011" is written first bit first, i.e. bit 0 on the left
    if (v == 12) check(out_code == 24'b110101 && out_len == 6, "document example 12 -> 101011");
    rd_i <= rd_i + 1;
  end

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    fibs[0] = 1; fibs[1] = 2;
    for (int k = 2; k < 24; k++) fibs[k] = fibs[k - 1] + fibs[k - 2];
    repeat (5) @(posedge clk); rst = 0;
    for (int v = 0; v < 65536; v++) begin
      @(posedge clk); in_valid <= ($urandom_range(0, 7) != 0) || v == 12;
      in_value <= 16'(v);
    end
    @(posedge clk); in_valid <= 0;
    repeat (5) @(posedge clk);
    check(rd_i == sent_q.size() && rd_i > 50000, $sformatf("%0d codes checked", rd_i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
