// Digital part of a four-lobe beam position and phase monitor.
//
// Four pickup-lobe signals at 402.5 or 805 MHz are down converted in the
// analog front end to a 50 MHz IF and sampled at 40 MHz by four 14-bit ADCs.
// This module takes those samples and holds the two digital cards:
//
//   dfe       the digital front end: I/Q de-convolution of each ADC stream
//             into an I array and a Q array (eight arrays), test
//             multiplexers (raw ADC data, ramp), the AFE calibration switch
//             timing and gain select, and the L-bus register file.
//   pci_fpga  the PCI carrier card: host registers, trigger-driven capture
//             into eight 256 kB FIFOs, DMA of the FIFOs into host memory,
//             and the L-bus master that configures the DFE.
//
// What lies outside, and is brought out as ports: the ADCs and the analog
// front end (adc, afe_*, cal_rf_on, gain_4x), the clock multiplier that
// makes the 40 MHz ADC clock from the 2.5 MHz phase reference (adc_clk and
// the ref_sync pulse), the PCI bus interface (the register port and the
// memory-write port), and the front panel trigger. Position and phase are
// computed from the arrays by host software, not here.
//
// Timing: two clocks, adc_clk (40 MHz) and pci_clk (the PCI bus clock); the
// single reset `rst` must be held for a few cycles of both. Host register
// accesses and DMA writes are on pci_clk; ADC samples, ref_sync, cal_trig and
// the AFE controls on adc_clk; trigger may be asynchronous.
module bpm_top
  import bpm_pkg::*;
(
  input  logic                    adc_clk,
  input  logic                    pci_clk,
  input  logic                    rst,
  // ADCs and phase reference
  input  adc_sample_t [N_ADC-1:0] adc,
  input  logic                    ref_sync,
  // front panel trigger, calibration trigger
  input  logic                    trigger,
  input  logic                    cal_trig,
  // host register port
  input  logic                    reg_wr,
  input  logic                    reg_rd,
  input  logic [7:0]              reg_addr,
  input  logic [31:0]             reg_wdata,
  output logic [31:0]             reg_rdata,
  // DMA writes to host memory
  output logic                    mw_valid,
  output logic [31:0]             mw_addr,
  output logic [31:0]             mw_data,
  input  logic                    mw_ready,
  output logic                    dma_done,
  // AFE controls
  output afe_sw_e [N_ADC-1:0]     afe_sw,
  output logic                    cal_rf_on,
  output logic                    gain_4x,
  // calibration measurement windows and status (ADC clock)
  output logic                    meas_direct,
  output logic                    meas_refl,
  output logic                    cal_busy,
  output logic [N_ARRAY-1:0]      fifo_overflow
);

  logic                      rst_adc, rst_pci;
  sample_t [N_ARRAY-1:0]     arr;
  logic                      arr_valid;
  logic [LBUS_W-1:0]         lb_data;
  logic                      lb_addr, lb_stb, lb_ack;

  // reset released synchronously in each clock domain
  bit_sync u_rst_adc (.clk (adc_clk), .rst (1'b0), .d (rst), .q (rst_adc));
  bit_sync u_rst_pci (.clk (pci_clk), .rst (1'b0), .d (rst), .q (rst_pci));

  dfe u_dfe (
    .clk         (adc_clk),
    .rst         (rst_adc),
    .adc         (adc),
    .ref_sync    (ref_sync),
    .cal_start   (cal_trig),
    .lb_data     (lb_data),
    .lb_addr     (lb_addr),
    .lb_stb      (lb_stb),
    .lb_ack      (lb_ack),
    .arr         (arr),
    .arr_valid   (arr_valid),
    .afe_sw      (afe_sw),
    .cal_rf_on   (cal_rf_on),
    .gain_4x     (gain_4x),
    .meas_direct (meas_direct),
    .meas_refl   (meas_refl),
    .cal_busy    (cal_busy),
    .cfg         ()
  );

  pci_fpga u_pci (
    .pci_clk       (pci_clk),
    .pci_rst       (rst_pci),
    .adc_clk       (adc_clk),
    .adc_rst       (rst_adc),
    .reg_wr        (reg_wr),
    .reg_rd        (reg_rd),
    .reg_addr      (reg_addr),
    .reg_wdata     (reg_wdata),
    .reg_rdata     (reg_rdata),
    .mw_valid      (mw_valid),
    .mw_addr       (mw_addr),
    .mw_data       (mw_data),
    .mw_ready      (mw_ready),
    .trigger       (trigger),
    .arr           (arr),
    .arr_valid     (arr_valid),
    .lb_data       (lb_data),
    .lb_addr       (lb_addr),
    .lb_stb        (lb_stb),
    .lb_ack        (lb_ack),
    .fifo_overflow (fifo_overflow),
    .dma_done      (dma_done)
  );

endmodule
