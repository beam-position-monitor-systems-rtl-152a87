// One of the eight sample FIFOs of the PCI card (256 kB each, one per array).
//
// Written on the 40 MHz ADC clock, read on the PCI clock. It is a dual-clock
// FIFO with binary pointers one bit wider than the address, exchanged between
// the two clock domains in Gray code through two-flip-flop synchronisers.
// The read side is first-word-fall-through: `rd_data` shows the oldest word
// whenever `empty` is low, and `rd_en` removes it, as discrete FIFO chips of
// this kind offer. A write into a full FIFO is dropped and sets the sticky
// `overflow` flag (cleared by `ovf_clr`).
//
// The size (256 kB = 131072 words of 16 bits, about 3.2 ms of 40 MS/s) is
// from the hardware description; the dual-clock structure, the 16-bit word,
// the fall-through read and the overflow flag are this design's choices.
//
// Timing: a written word can be read three to four read clocks later; the
// flags are conservative (full and empty may stay set a little longer than
// needed, never too short). `wr_rst` and `rd_rst` must both be held while
// the FIFO is reset.
module sample_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 131072   // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  input  logic             ovf_clr,

  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer in the write domain
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write side ----
  logic [AW:0] wr_bin_nxt;
  assign wr_bin_nxt = wr_bin + 1'b1;
  assign full = (wr_gray == {~rd_gray_w2[AW:AW-1], rd_gray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
      overflow   <= 1'b0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (wr_en && !full) begin
        wr_bin  <= wr_bin_nxt;
        wr_gray <= bin2gray(wr_bin_nxt);
      end
      if (wr_en && full) overflow <= 1'b1;
      else if (ovf_clr)  overflow <= 1'b0;
    end
  end

  // ---- read side ----
  logic [AW:0] rd_bin_nxt;
  assign rd_bin_nxt = rd_bin + 1'b1;
  assign empty   = (rd_gray == wr_gray_r2);
  assign rd_data = mem[rd_bin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (rd_en && !empty) begin
        rd_bin  <= rd_bin_nxt;
        rd_gray <= bin2gray(rd_bin_nxt);
      end
    end
  end

  a_no_underflow: assert property (@(posedge rd_clk) disable iff (rd_rst) rd_en |-> !empty);

endmodule
