// bm_csr: IPBus debug registers of the buffer manager.
//
// An IPBus slave (word addresses) holding the test and debug controls:
//   0x00 W  control pulses: bit0 initialise data send, bit1 event selection
//           command issue, bit2 supernova trigger, bit3 clear the B128 sink
//   0x01 RW input FIFOs enable (bit 0)
//   0x02 RW number of super-packets (runs) to send
//   0x03 RW event selection command ID
//   0x04 RW trigger start time [63:32]   0x05 RW trigger start time [31:0]
//   0x06 RW trigger end time [63:32]     0x07 RW trigger end time [31:0]
//   0x08 RW supernova trigger number of samples (16-bit words)
//   0x10-0x1F R status words (stat inputs)
//   0x10000 + n  R  word n of the B128 sink snapshot
// Each access is acknowledged one cycle after the strobe; read data comes
// with the acknowledge. Unknown addresses read 0 and set err.
// The list of registers follows the document; the address map and the
// bit assignment are this design's choices.
module bm_csr
  import bm_pkg::*;
#(
  parameter int unsigned SINK_AW = 14
) (
  input  logic               clk,
  input  logic               rst,
  input  ipb_wbus_t          ipb_in,
  output ipb_rbus_t          ipb_out,
  output logic               init_send,
  output logic               cmd_issue,
  output logic               snv_trig,
  output logic               sink_clear,
  output logic               fifo_en,
  output logic [31:0]        n_packets,
  output trig_cmd_t          cmd,
  output logic [31:0]        snv_samples,
  input  logic [15:0][31:0]  stat,
  output logic [SINK_AW-1:0] sink_addr,
  input  logic [31:0]        sink_data
);
  logic        ack;
  logic        first;
  logic        is_sink, is_sink_q;
  logic [31:0] rdata;
  logic        err;

  assign first     = ipb_in.strobe && !ack;
  assign is_sink   = ipb_in.addr[31:16] == 16'h0001;
  assign sink_addr = ipb_in.addr[SINK_AW-1:0];
  assign ipb_out   = '{rdata: is_sink_q ? sink_data : rdata, ack: ack && !err, err: ack && err};

  always_ff @(posedge clk) begin
    if (rst) begin
      ack <= 1'b0; rdata <= '0; err <= 1'b0; is_sink_q <= 1'b0;
      init_send <= 1'b0; cmd_issue <= 1'b0; snv_trig <= 1'b0; sink_clear <= 1'b0;
      fifo_en <= 1'b0; n_packets <= '0; cmd <= '0; snv_samples <= '0;
    end else begin
      init_send <= 1'b0; cmd_issue <= 1'b0; snv_trig <= 1'b0; sink_clear <= 1'b0;
      ack       <= first;
      is_sink_q <= is_sink;
      err       <= 1'b0;
      rdata     <= '0;
      if (first && !is_sink) begin
        if (ipb_in.write) begin
          unique case (ipb_in.addr)
            32'h00: begin
              init_send  <= ipb_in.wdata[0];
              cmd_issue  <= ipb_in.wdata[1];
              snv_trig   <= ipb_in.wdata[2];
              sink_clear <= ipb_in.wdata[3];
            end
            32'h01: fifo_en            <= ipb_in.wdata[0];
            32'h02: n_packets          <= ipb_in.wdata;
            32'h03: cmd.id             <= ipb_in.wdata;
            32'h04: cmd.t_start[63:32] <= ipb_in.wdata;
            32'h05: cmd.t_start[31:0]  <= ipb_in.wdata;
            32'h06: cmd.t_end[63:32]   <= ipb_in.wdata;
            32'h07: cmd.t_end[31:0]    <= ipb_in.wdata;
            32'h08: snv_samples        <= ipb_in.wdata;
            default: err <= 1'b1;
          endcase
        end else begin
          if (ipb_in.addr[31:4] == 28'h1) rdata <= stat[ipb_in.addr[3:0]];
          else begin
            unique case (ipb_in.addr)
              32'h01: rdata <= {31'd0, fifo_en};
              32'h02: rdata <= n_packets;
              32'h03: rdata <= cmd.id;
              32'h04: rdata <= cmd.t_start[63:32];
              32'h05: rdata <= cmd.t_start[31:0];
              32'h06: rdata <= cmd.t_end[63:32];
              32'h07: rdata <= cmd.t_end[31:0];
              32'h08: rdata <= snv_samples;
              default: err <= 1'b1;
            endcase
          end
        end
      end
    end
  end
endmodule
