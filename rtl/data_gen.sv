// data_gen: input data generator (test and debug source).
//
// Stands in for the compression block: N_LINKS 16-bit AXI4-stream links, each
// sending n_runs super-packets after a start pulse. Super-packet r of every
// link is: a flags word (zero), the 64-bit timestamp INIT_TS + 64*r in four
// words (most significant first), then PAYLOAD_WORDS payload words counting
// 0, 1, ..., PAYLOAD_WORDS-1, with TLAST on the last. Each link advances on
// its own TREADY, so a slow link only holds itself back; the formatter lines
// the links up into write-runs. busy is high until every link has sent all.
// The timestamp step of 64 and the counter payload follow the document; the
// flags value, INIT_TS and PAYLOAD_WORDS are this design's choices.
module data_gen #(
  parameter int unsigned N_LINKS       = 40,
  parameter int unsigned PAYLOAD_WORDS = 1024,
  parameter longint unsigned INIT_TS   = 64'd0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [31:0]              n_runs,
  output logic [N_LINKS-1:0][15:0] m_tdata,
  output logic [N_LINKS-1:0]       m_tvalid,
  output logic [N_LINKS-1:0]       m_tlast,
  input  logic [N_LINKS-1:0]       m_tready,
  output logic                     busy
);
  localparam int unsigned PKT_WORDS = 5 + PAYLOAD_WORDS;

  logic [N_LINKS-1:0]       run_en;
  logic [N_LINKS-1:0][15:0] widx;
  logic [N_LINKS-1:0][31:0] runs_sent;
  logic [31:0]              n_runs_q;

  assign busy = |run_en;

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    logic [63:0] ts;
    assign ts = 64'(INIT_TS) + 64'({runs_sent[i], 6'b0});

    always_comb begin
      unique case (widx[i])
        16'd0:   m_tdata[i] = 16'h0000;
        16'd1:   m_tdata[i] = ts[63:48];
        16'd2:   m_tdata[i] = ts[47:32];
        16'd3:   m_tdata[i] = ts[31:16];
        16'd4:   m_tdata[i] = ts[15:0];
        default: m_tdata[i] = widx[i] - 16'd5;
      endcase
    end
    assign m_tvalid[i] = run_en[i];
    assign m_tlast[i]  = (widx[i] == 16'(PKT_WORDS - 1));

    always_ff @(posedge clk) begin
      if (rst) begin
        run_en[i] <= 1'b0; widx[i] <= '0; runs_sent[i] <= '0;
      end else if (start && !busy) begin
        run_en[i]    <= (n_runs != 0);
        widx[i]      <= '0;
        runs_sent[i] <= '0;
      end else if (m_tvalid[i] && m_tready[i]) begin
        if (m_tlast[i]) begin
          widx[i]      <= '0;
          runs_sent[i] <= runs_sent[i] + 1'b1;
          if (runs_sent[i] + 1 == n_runs_q) run_en[i] <= 1'b0;
        end else begin
          widx[i] <= widx[i] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) n_runs_q <= '0;
    else if (start && !busy) n_runs_q <= n_runs;
  end
endmodule
