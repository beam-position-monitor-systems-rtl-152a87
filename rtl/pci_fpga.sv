// The PCI card's gate array together with the card's eight sample FIFOs.
//
// The gate array provides the host interface (host_regs, standing for the
// PCI target), the acquisition timing control (acq_ctrl), the DMA from the
// FIFOs to PC memory (dma_engine) and the L-bus master that configures the
// DFE (lbus_master). The eight FIFOs (sample_fifo, 256 kB each) take one
// array each from the DFE.
//
// Two clocks meet here: the 40 MHz ADC clock, on which the DFE data arrive
// and the FIFOs are written, and the PCI clock, on which the host registers,
// the DMA and the L-bus master run. The arm and overflow-clear commands
// cross as toggle pulses, status bits through two-flip-flop synchronisers,
// the trigger count in Gray code. The capture length and trigger delay are
// used in the ADC domain directly: they must only be changed while no
// capture is armed or running.
//
// The duties of the gate array and the eight 256 kB FIFOs follow the
// hardware description; how they are split into blocks and how the clock
// domains are crossed are this design's choices.
module pci_fpga
  import bpm_pkg::*;
#(
  parameter int unsigned FIFO_WORDS = FIFO_DEPTH
) (
  input  logic                        pci_clk,
  input  logic                        pci_rst,
  input  logic                        adc_clk,
  input  logic                        adc_rst,
  // host register port
  input  logic                        reg_wr,
  input  logic                        reg_rd,
  input  logic [7:0]                  reg_addr,
  input  logic [31:0]                 reg_wdata,
  output logic [31:0]                 reg_rdata,
  // DMA writes to host memory
  output logic                        mw_valid,
  output logic [31:0]                 mw_addr,
  output logic [31:0]                 mw_data,
  input  logic                        mw_ready,
  // front panel trigger
  input  logic                        trigger,
  // arrays from the DFE (ADC clock)
  input  sample_t [N_ARRAY-1:0]       arr,
  input  logic                        arr_valid,
  // L-bus to the DFE
  output logic [LBUS_W-1:0]           lb_data,
  output logic                        lb_addr,
  output logic                        lb_stb,
  input  logic                        lb_ack,
  output logic [N_ARRAY-1:0]          fifo_overflow,
  output logic                        dma_done      // one PCI clock at the end of a DMA
);

  // ---------------- PCI clock domain ----------------
  logic                arm_p, dma_start, ovf_clr_p;
  logic [NPAIRS_W-1:0] npairs;
  logic [15:0]         trig_dly;
  logic [31:0]         dma_base;
  logic                lb_req, lb_ready;
  logic [LBUS_W-1:0]   lb_req_addr, lb_req_data;
  logic                dma_busy;
  logic [2:0]          acq_status_p;      // done, armed, busy in PCI domain
  logic [N_ARRAY-1:0]  ovf_p;
  logic [15:0]         trig_gray_p, trig_cnt_p;

  host_regs u_regs (
    .clk         (pci_clk),
    .rst         (pci_rst),
    .wr          (reg_wr),
    .rd          (reg_rd),
    .addr        (reg_addr),
    .wdata       (reg_wdata),
    .rdata       (reg_rdata),
    .arm_pulse   (arm_p),
    .dma_start   (dma_start),
    .ovf_clr     (ovf_clr_p),
    .npairs      (npairs),
    .trig_dly    (trig_dly),
    .dma_base    (dma_base),
    .lb_req      (lb_req),
    .lb_req_addr (lb_req_addr),
    .lb_req_data (lb_req_data),
    .acq_done    (acq_status_p[0]),
    .acq_armed   (acq_status_p[1]),
    .acq_busy    (acq_status_p[2]),
    .dma_busy    (dma_busy),
    .fifo_ovf    (|ovf_p),
    .lb_ready    (lb_ready),
    .trig_cnt    (trig_cnt_p)
  );

  lbus_master u_lbm (
    .clk      (pci_clk),
    .rst      (pci_rst),
    .req      (lb_req),
    .req_addr (lb_req_addr),
    .req_data (lb_req_data),
    .ready    (lb_ready),
    .lb_data  (lb_data),
    .lb_addr  (lb_addr),
    .lb_stb   (lb_stb),
    .lb_ack   (lb_ack)
  );

  // ---------------- ADC clock domain ----------------
  logic        arm_a, ovf_clr_a, fifo_wr;
  logic        acq_armed, acq_busy, acq_done;
  logic [15:0] trig_cnt_a, trig_gray_a;

  pulse_sync u_arm_sync (
    .src_clk (pci_clk), .src_rst (pci_rst), .src_pulse (arm_p),
    .dst_clk (adc_clk), .dst_rst (adc_rst), .dst_pulse (arm_a)
  );

  pulse_sync u_ovf_sync (
    .src_clk (pci_clk), .src_rst (pci_rst), .src_pulse (ovf_clr_p),
    .dst_clk (adc_clk), .dst_rst (adc_rst), .dst_pulse (ovf_clr_a)
  );

  acq_ctrl u_acq (
    .clk        (adc_clk),
    .rst        (adc_rst),
    .arm        (arm_a),
    .trigger    (trigger),
    .npairs     (npairs),
    .trig_dly   (trig_dly),
    .data_valid (arr_valid),
    .fifo_wr    (fifo_wr),
    .armed      (acq_armed),
    .busy       (acq_busy),
    .done       (acq_done),
    .trig_cnt   (trig_cnt_a)
  );

  always_ff @(posedge adc_clk) begin
    if (adc_rst) trig_gray_a <= '0;
    else         trig_gray_a <= trig_cnt_a ^ (trig_cnt_a >> 1);
  end

  bit_sync #(.W(3)) u_stat_sync (
    .clk (pci_clk), .rst (pci_rst),
    .d   ({acq_busy, acq_armed, acq_done}),
    .q   (acq_status_p)
  );

  bit_sync #(.W(16)) u_trig_sync (
    .clk (pci_clk), .rst (pci_rst), .d (trig_gray_a), .q (trig_gray_p)
  );

  function automatic logic [15:0] gray2bin(input logic [15:0] g);
    logic [15:0] b;
    b[15] = g[15];
    for (int i = 14; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  assign trig_cnt_p = gray2bin(trig_gray_p);

  bit_sync #(.W(N_ARRAY)) u_ovf_stat (
    .clk (pci_clk), .rst (pci_rst), .d (fifo_overflow), .q (ovf_p)
  );

  // ---------------- FIFOs ----------------
  logic [N_ARRAY-1:0]               f_empty, f_rd;
  logic [N_ARRAY-1:0][SAMPLE_W-1:0] f_data;

  for (genvar k = 0; k < N_ARRAY; k++) begin : g_fifo
    sample_fifo #(.WIDTH(SAMPLE_W), .DEPTH(FIFO_WORDS)) u_fifo (
      .wr_clk   (adc_clk),
      .wr_rst   (adc_rst),
      .wr_en    (fifo_wr),
      .wr_data  (arr[k]),
      .full     (),
      .overflow (fifo_overflow[k]),
      .ovf_clr  (ovf_clr_a),
      .rd_clk   (pci_clk),
      .rd_rst   (pci_rst),
      .rd_en    (f_rd[k]),
      .rd_data  (f_data[k]),
      .empty    (f_empty[k])
    );
  end

  dma_engine #(.NFIFO(N_ARRAY)) u_dma (
    .clk        (pci_clk),
    .rst        (pci_rst),
    .start      (dma_start),
    .base       (dma_base),
    .npairs     (npairs),
    .fifo_empty (f_empty),
    .fifo_data  (f_data),
    .fifo_rd    (f_rd),
    .mw_valid   (mw_valid),
    .mw_addr    (mw_addr),
    .mw_data    (mw_data),
    .mw_ready   (mw_ready),
    .busy       (dma_busy),
    .done       (dma_done)
  );

endmodule
