// Host-visible registers of the PCI card's gate array.
//
// A simple word-addressed register port (write strobe, read strobe, 8-bit
// word address, 32-bit data) stands for the target side of the PCI
// interface. The map (bpm_pkg REG_*):
//
//   REG_CTRL     W  bit0 arm acquisition, bit1 start DMA, bit2 clear the
//                   FIFO overflow flags (each a one-clock pulse)
//   REG_STATUS   R  bit0 capture done, bit1 capture armed, bit2 capture busy,
//                   bit3 DMA busy, bit4 any FIFO overflow, bit5 L-bus busy
//   REG_NPAIRS   RW sample pairs per array and trigger (reset 20000 = 1 ms;
//                   limited to 1..65536, the FIFO size)
//   REG_TRIG_DLY RW ADC clocks from trigger to first sample (reset 0)
//   REG_DMA_BASE RW host byte address for array 0 (reset 0)
//   REG_LBUS     W  L-bus write: bits 27:16 DFE register address, 11:0 data;
//                   ignored while the L-bus is busy
//   REG_TRIG_CNT R  triggers seen since reset
//
// The hardware description gives only the gate array's duties (PCI
// interface, DMA, timing controls, L-bus); this register map and its reset
// values are this design's choices.
//
// Timing: PCI clock; writes take effect on the next clock, read data is
// registered and valid the clock after `rd`.
module host_regs
  import bpm_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                wr,
  input  logic                rd,
  input  logic [7:0]          addr,
  input  logic [31:0]         wdata,
  output logic [31:0]         rdata,
  // controls
  output logic                arm_pulse,
  output logic                dma_start,
  output logic                ovf_clr,
  output logic [NPAIRS_W-1:0] npairs,
  output logic [15:0]         trig_dly,
  output logic [31:0]         dma_base,
  output logic                lb_req,
  output logic [LBUS_W-1:0]   lb_req_addr,
  output logic [LBUS_W-1:0]   lb_req_data,
  // status
  input  logic                acq_done,
  input  logic                acq_armed,
  input  logic                acq_busy,
  input  logic                dma_busy,
  input  logic                fifo_ovf,
  input  logic                lb_ready,
  input  logic [15:0]         trig_cnt
);

  logic [31:0] status;
  assign status = {26'd0, !lb_ready, fifo_ovf, dma_busy, acq_busy, acq_armed, acq_done};

  always_ff @(posedge clk) begin
    if (rst) begin
      arm_pulse   <= 1'b0;
      dma_start   <= 1'b0;
      ovf_clr     <= 1'b0;
      npairs      <= NPAIRS_W'(20000);
      trig_dly    <= '0;
      dma_base    <= '0;
      lb_req      <= 1'b0;
      lb_req_addr <= '0;
      lb_req_data <= '0;
      rdata       <= '0;
    end else begin
      arm_pulse <= 1'b0;
      dma_start <= 1'b0;
      ovf_clr   <= 1'b0;
      if (lb_req && lb_ready) lb_req <= 1'b0;
      if (wr) begin
        unique case (addr)
          REG_CTRL: begin
            arm_pulse <= wdata[0];
            dma_start <= wdata[1];
            ovf_clr   <= wdata[2];
          end
          REG_NPAIRS:
            if (wdata == 0)                   npairs <= NPAIRS_W'(1);
            else if (wdata > FIFO_DEPTH / 2)  npairs <= NPAIRS_W'(FIFO_DEPTH / 2);
            else                              npairs <= wdata[NPAIRS_W-1:0];
          REG_TRIG_DLY: trig_dly <= wdata[15:0];
          REG_DMA_BASE: dma_base <= {wdata[31:2], 2'b00};
          REG_LBUS: if (lb_ready && !lb_req) begin
            lb_req      <= 1'b1;
            lb_req_addr <= wdata[16 +: LBUS_W];
            lb_req_data <= wdata[LBUS_W-1:0];
          end
          default: ;
        endcase
      end
      if (rd) begin
        unique case (addr)
          REG_STATUS:   rdata <= status;
          REG_NPAIRS:   rdata <= 32'(npairs);
          REG_TRIG_DLY: rdata <= 32'(trig_dly);
          REG_DMA_BASE: rdata <= dma_base;
          REG_TRIG_CNT: rdata <= 32'(trig_cnt);
          default:      rdata <= '0;
        endcase
      end
    end
  end

endmodule
