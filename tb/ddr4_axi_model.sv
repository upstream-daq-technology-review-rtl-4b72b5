// ddr4_axi_model: behavioural model of the DDR4 memory behind the memory
// controller, seen as an AXI4 slave with a 512-bit data bus (not
// synthesizable; for testbenches only).
//
// Memory is a sparse associative array of 64-byte beats, so any address
// width can be modelled. One write burst and one read burst are handled at a
// time. The write response comes WR_LAT cycles after the last write beat;
// the first read beat RD_LAT cycles after the read address. With STALL set,
// WREADY and RVALID are withheld on random cycles. The model counts bursts
// and flags any burst that crosses a 4 KByte boundary.
module ddr4_axi_model #(
  parameter int ADDR_W = 32,
  parameter int WR_LAT = 15,
  parameter int RD_LAT = 30,
  parameter bit STALL  = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic              awvalid,
  output logic              awready,
  input  logic [511:0]      wdata,
  input  logic [63:0]       wstrb,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [0:0]        arid,
  input  logic              arvalid,
  output logic              arready,
  output logic [511:0]      rdata,
  output logic [1:0]        rresp,
  output logic [0:0]        rid,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready
);
  logic [511:0] mem [longint];
  int  w_state, w_cnt, w_wait;
  longint w_addr;
  int  r_state, r_cnt, r_wait, r_len;
  longint r_addr;
  logic [0:0] r_id;
  int  wr_bursts, wr_full_bursts, rd_bursts, rd_full_bursts, cross_4k, strobe_errors;
  logic stall_w, stall_r;

  function automatic logic [511:0] peek(input longint beat);
    if (mem.exists(beat)) return mem[beat];
    return '0;
  endfunction

  assign awready = (w_state == 0);
  assign wready  = (w_state == 1) && !stall_w;
  assign bvalid  = (w_state == 3);
  assign bresp   = 2'b00;
  assign arready = (r_state == 0);
  assign rvalid  = (r_state == 2) && !stall_r;
  assign rdata   = peek(r_addr + longint'(r_cnt));
  assign rlast   = (r_cnt == r_len);
  assign rid     = r_id;
  assign rresp   = 2'b00;

  always_ff @(posedge clk) begin
    stall_w <= STALL ? ($urandom_range(0, 3) == 0) : 1'b0;
    stall_r <= STALL ? ($urandom_range(0, 3) == 0) : 1'b0;
    if (rst) begin
      w_state <= 0; r_state <= 0; w_cnt <= 0; r_cnt <= 0; w_wait <= 0; r_wait <= 0;
      wr_bursts <= 0; wr_full_bursts <= 0; rd_bursts <= 0; rd_full_bursts <= 0;
      cross_4k <= 0; strobe_errors <= 0; r_len <= 0; r_id <= '0; w_addr <= 0; r_addr <= 0;
    end else begin
      // write channel
      case (w_state)
        0: if (awvalid) begin
          w_addr <= longint'(awaddr) >> 6;
          w_cnt  <= 0;
          w_state <= 1;
          wr_bursts <= wr_bursts + 1;
          if (awlen == 8'd63) wr_full_bursts <= wr_full_bursts + 1;
          if ((int'(awaddr[11:0]) + (int'(awlen) + 1) * 64) > 4096) cross_4k <= cross_4k + 1;
        end
        1: if (wvalid && wready) begin
          mem[w_addr + longint'(w_cnt)] = wdata;
          if (wstrb != '1) strobe_errors <= strobe_errors + 1;
          w_cnt <= w_cnt + 1;
          if (wlast) begin w_state <= 2; w_wait <= WR_LAT; end
        end
        2: if (w_wait <= 1) w_state <= 3; else w_wait <= w_wait - 1;
        3: if (bready) w_state <= 0;
        default: w_state <= 0;
      endcase
      // read channel
      case (r_state)
        0: if (arvalid) begin
          r_addr <= longint'(araddr) >> 6;
          r_len  <= int'(arlen);
          r_id   <= arid;
          r_cnt  <= 0;
          r_wait <= RD_LAT;
          r_state <= 1;
          rd_bursts <= rd_bursts + 1;
          if (arlen == 8'd63) rd_full_bursts <= rd_full_bursts + 1;
          if ((int'(araddr[11:0]) + (int'(arlen) + 1) * 64) > 4096) cross_4k <= cross_4k + 1;
        end
        1: if (r_wait <= 1) r_state <= 2; else r_wait <= r_wait - 1;
        2: if (rvalid && rready) begin
          r_cnt <= r_cnt + 1;
          if (rlast) r_state <= 0;
        end
        default: r_state <= 0;
      endcase
    end
  end
endmodule
