// Carries one-clock pulses from one clock domain to another.
//
// Each source pulse flips a toggle flip-flop; the toggle is synchronised into
// the destination clock by two flip-flops and every change of it gives one
// destination pulse. Source pulses must be at least three destination clocks
// apart. The destination pulse comes two to three destination clocks after
// the source pulse. A helper of this design for its two clock domains.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);

  logic       tog;
  logic [2:0] sync;

  always_ff @(posedge src_clk) begin
    if (src_rst)        tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) sync <= '0;
    else         sync <= {sync[1:0], tog};
  end

  assign dst_pulse = sync[2] ^ sync[1];

endmodule
