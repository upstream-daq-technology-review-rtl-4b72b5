// b128_sink: snapshot RAM for the 128-bit event fragment stream.
//
// Watches the event fragment AXI4-stream (it never back-pressures it) and
// stores the first DEPTH beats seen after a clear, in arrival order, in a
// RAM written on the stream clock. The RAM is read on the register-bus clock:
// rd_addr selects a 32-bit word, word 0 of a beat being bits [127:96];
// rd_data follows one cycle after rd_addr. The number of stored beats is
// passed to the register side as a Gray-coded count through two flip-flops,
// and a clear pulse from the register side empties the snapshot.
// The snapshot RAM read over IPBus follows the document; the depth (inferred
// from the sink's block-RAM count) and the word order are this design's.
module b128_sink #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [127:0]  s_tdata,
  input  logic          s_tvalid,
  input  logic          s_tready,
  input  logic          s_tlast,

  input  logic          rd_clk,
  input  logic          rd_rst,
  input  logic          clear,
  input  logic [$clog2(DEPTH)+1:0] rd_addr,
  output logic [31:0]   rd_data,
  output logic [$clog2(DEPTH):0]   stored,
  output logic [31:0]   lasts_seen
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [127:0] ram [DEPTH];
  logic [AW:0]  wcnt, wgray, g1, g2;
  logic         clr_m;

  pulse_sync u_clr (.src_clk(rd_clk), .src_rst(rd_rst), .src_pulse(clear),
                    .dst_clk(clk), .dst_rst(rst), .dst_pulse(clr_m));

  always_ff @(posedge clk) begin
    if (s_tvalid && s_tready && !wcnt[AW]) ram[wcnt[AW-1:0]] <= s_tdata;
  end

  always_ff @(posedge clk) begin
    if (rst || clr_m) begin
      wcnt <= '0; wgray <= '0; lasts_seen <= '0;
    end else if (s_tvalid && s_tready && !wcnt[AW]) begin
      wcnt  <= wcnt + 1'b1;
      wgray <= (wcnt + 1'b1) ^ ((wcnt + 1'b1) >> 1);
      if (s_tlast) lasts_seen <= lasts_seen + 1'b1;
    end
  end

  // read side
  logic [127:0] q;
  logic [1:0]   wsel;
  always_ff @(posedge rd_clk) begin
    q    <= ram[rd_addr[AW+1:2]];
    wsel <= rd_addr[1:0];
  end
  assign rd_data = q[127 - 32*wsel -: 32];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin g1 <= '0; g2 <= '0; end
    else begin g1 <= wgray; g2 <= g1; end
  end
  always_comb begin
    stored[AW] = g2[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) stored[i] = stored[i+1] ^ g2[i];
  end
endmodule
