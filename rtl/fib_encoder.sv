// fib_encoder: Fibonacci (Zeckendorf) encoder for the compression block.
//
// Encodes a positive integer N as the sum of non-consecutive Fibonacci
// numbers 1, 2, 3, 5, 8, ... Bit k of code (k = 0 first on the wire) is set
// when Fibonacci number k+1 is used; a further '1' is appended after the
// highest used bit, so every code word ends in '11' and can be found in a
// bit stream without a length field. The code is len = i+1 bits long, where
// i is the index of the largest Fibonacci number not above N.
// Example from the document: 12 = 1 + 3 + 8 -> code bits 1,0,1,0,1 then the
// terminating 1, i.e. "101011" in wire order (out_code = 6'b110101), len 6.
//
// Interface: in_valid/in_value are registered; out_valid, out_code (unused
// high bits zero), out_len and out_err follow one clock later. N = 0 has no
// code: it gives out_err = 1 and len 0. With VALUE_W = 16 the code is at most
// 24 bits (23 Fibonacci numbers up to 46368, plus the terminator).
// The greedy conversion runs in one cycle as a chain of compare/subtract
// steps; a pipeline of several steps per stage would be needed to reach the
// stream clock frequency, which the document does not discuss.
// The code itself follows the document; the interface, the handling of
// zero and the one-cycle structure are this design's choices. The document's
// compressor reads the codes from a lookup table; this module computes the
// same table entries with logic. Sample mapping and packing are in compressor.
module fib_encoder #(
  parameter int unsigned VALUE_W = 16,
  parameter int unsigned CODE_W  = 24
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic [VALUE_W-1:0]        in_value,
  output logic                      out_valid,
  output logic [CODE_W-1:0]         out_code,
  output logic [$clog2(CODE_W+1)-1:0] out_len,
  output logic                      out_err
);
  localparam int unsigned NF = CODE_W - 1;   // Fibonacci numbers used
  localparam int unsigned LW = $clog2(CODE_W + 1);

  function automatic logic [VALUE_W:0] fib(input int unsigned k);  // k = 0 -> 1, 1 -> 2, ...
    logic [VALUE_W+1:0] a, b, t;
    a = 1; b = 2;
    for (int unsigned j = 0; j < k; j++) begin t = a + b; a = b; b = t; end
    return (VALUE_W+1)'(a);
  endfunction

  logic [CODE_W-1:0] code_c;
  logic [LW-1:0]     len_c;

  always_comb begin
    logic [VALUE_W:0] rest;
    logic             found;
    rest   = {1'b0, in_value};
    code_c = '0;
    len_c  = '0;
    found  = 1'b0;
    for (int k = int'(NF) - 1; k >= 0; k--) begin
      if (rest >= fib(k)) begin
        rest      = rest - fib(k);
        code_c[k] = 1'b1;
        if (!found) begin
          code_c[k+1] = 1'b1;
          len_c       = LW'(k + 2);
          found       = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_code <= '0; out_len <= '0; out_err <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_code  <= code_c;
      out_len   <= len_c;
      out_err   <= in_valid && (in_value == '0);
    end
  end
endmodule
