// pulse_sync: carries single-cycle pulses from one clock domain to another.
//
// A pulse toggles a flag in the source domain; the flag passes two
// flip-flops in the destination domain and each change there becomes one
// destination-cycle pulse. Source pulses must be at least three destination
// cycles apart.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic tgl;
  logic [2:0] s;

  always_ff @(posedge src_clk) begin
    if (src_rst) tgl <= 1'b0;
    else if (src_pulse) tgl <= !tgl;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) s <= '0;
    else s <= {s[1:0], tgl};
  end

  assign dst_pulse = s[2] ^ s[1];
endmodule
