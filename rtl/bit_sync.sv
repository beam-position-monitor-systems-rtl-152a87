// Two-flip-flop synchroniser for level signals (and Gray-coded buses, whose
// bits change one at a time) entering a clock domain. Output follows the
// input two clocks later; reset clears both stages. A helper of this design
// for its two clock domains (ADC clock and PCI clock).
module bit_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
