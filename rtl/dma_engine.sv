// DMA engine: moves the eight FIFOs' data into host (PC) memory.
//
// After `start`, the engine empties the FIFOs one after the other, array 0
// first. From each it takes 2*`npairs` samples, packs two consecutive 16-bit
// samples into one 32-bit word (earlier sample in bits 15:0) and issues one
// memory write per word, at consecutive word addresses from `base`. So array
// k lands at byte address base + 4*npairs*k. The engine waits whenever the
// current FIFO is empty, which lets it start while the capture still runs.
//
// The hardware description says only that the gate array does DMA from the
// FIFOs to PC memory. The order, the packing, the address layout and the
// write interface are this design's choices. The write interface is a plain
// valid/ready port standing for the bus master side of the PCI interface.
//
// Timing: PCI clock. At most one word every two clocks (one sample per
// clock taken from a FIFO); `done` pulses for one clock at the end.
module dma_engine
  import bpm_pkg::*;
#(
  parameter int unsigned NFIFO = 8
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  input  logic [31:0]                   base,
  input  logic [NPAIRS_W-1:0]           npairs,    // >= 1
  // FIFO read side (first-word-fall-through)
  input  logic [NFIFO-1:0]              fifo_empty,
  input  logic [NFIFO-1:0][SAMPLE_W-1:0] fifo_data,
  output logic [NFIFO-1:0]              fifo_rd,
  // memory writes
  output logic                          mw_valid,
  output logic [31:0]                   mw_addr,
  output logic [31:0]                   mw_data,
  input  logic                          mw_ready,
  output logic                          busy,
  output logic                          done
);

  localparam int unsigned FW = (NFIFO > 1) ? $clog2(NFIFO) : 1;

  logic [FW-1:0]         cur;        // FIFO being drained
  logic [NPAIRS_W-1:0]   words_left; // words still to take from it
  logic                  have_lo;
  logic [SAMPLE_W-1:0]   lo;
  logic [31:0]           next_addr;
  logic                  out_free;
  logic                  take;

  assign out_free = !mw_valid || mw_ready;
  // take a sample: a low half any time, a high half only if the output
  // register is free to receive the packed word
  assign take = busy && (words_left != 0) && !fifo_empty[cur] && (!have_lo || out_free);

  always_comb begin
    fifo_rd      = '0;
    fifo_rd[cur] = take;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      cur        <= '0;
      words_left <= '0;
      have_lo    <= 1'b0;
      lo         <= '0;
      next_addr  <= '0;
      mw_valid   <= 1'b0;
      mw_addr    <= '0;
      mw_data    <= '0;
    end else begin
      done <= 1'b0;
      if (mw_valid && mw_ready) mw_valid <= 1'b0;

      if (start && !busy) begin
        busy       <= 1'b1;
        cur        <= '0;
        words_left <= npairs;
        have_lo    <= 1'b0;
        next_addr  <= base;
      end else if (busy) begin
        if (take) begin
          if (!have_lo) begin
            lo      <= fifo_data[cur];
            have_lo <= 1'b1;
          end else begin
            have_lo    <= 1'b0;
            mw_valid   <= 1'b1;
            mw_addr    <= next_addr;
            mw_data    <= {fifo_data[cur], lo};
            next_addr  <= next_addr + 32'd4;
            words_left <= words_left - 1'b1;
          end
        end else if (words_left == 0 && out_free) begin
          if (cur == FW'(NFIFO - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            cur        <= cur + 1'b1;
            words_left <= npairs;
          end
        end
      end
    end
  end

endmodule
