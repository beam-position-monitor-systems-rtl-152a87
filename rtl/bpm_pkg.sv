// Shared types and constants of the beam position monitor digitizer.
//
// The BPM digitizer samples four 50 MHz IF signals (one per pickup lobe) at
// 40 MSPS with 14-bit ADCs, turns each ADC stream into an I array and a Q
// array (eight arrays in all), buffers the arrays in eight FIFOs and moves
// them into host memory by DMA. The widths below that come from the hardware
// description are the ADC width (14 bits), the L-bus width (12 bits), the
// number of ADC channels (4) and arrays (8), and the FIFO size (256 kB, held
// here as 131072 16-bit words). The register maps, the encodings of the
// multiplexer modes and of the AFE switch positions, and the calibration
// timing defaults in clock cycles are choices of this design.
package bpm_pkg;

  localparam int unsigned ADC_W      = 14;  // ADC resolution
  localparam int unsigned SAMPLE_W   = 16;  // word stored per sample in a FIFO
  localparam int unsigned N_ADC      = 4;   // BPM lobes / ADC channels
  localparam int unsigned N_ARRAY    = 2 * N_ADC;  // I and Q per channel
  localparam int unsigned LBUS_W     = 12;  // width of the DFE control bus
  localparam int unsigned CAL_CNT_W  = 12;  // width of calibration timing counts

  // 256 kB per FIFO, 2 bytes per sample
  localparam int unsigned FIFO_DEPTH = 256 * 1024 / 2;

  // 300 ns cable round trip at 25 ns per ADC clock
  localparam int unsigned CAL_ROUND_TRIP_CYC = 12;

  typedef logic signed [ADC_W-1:0]    adc_sample_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // What a DFE processing FPGA passes to the two arrays of a channel.
  typedef enum logic [1:0] {
    MODE_IQ   = 2'd0,   // de-convolved I and Q streams
    MODE_RAW  = 2'd1,   // raw ADC samples
    MODE_RAMP = 2'd2    // preset ramp test pattern
  } dfe_mode_e;

  // Position of the calibration switch network in front of one down converter.
  typedef enum logic [1:0] {
    SW_NORMAL       = 2'd0,  // AFE input (pickup cable) -> down converter
    SW_CAL_TO_DC    = 2'd1,  // calibration source -> down converter input
    SW_CAL_TO_CABLE = 2'd2   // calibration source -> pickup cable
  } afe_sw_e;

  // L-bus register addresses (DFE side).
  localparam logic [LBUS_W-1:0] LB_MODE       = 12'h000; // 2 bits per channel
  localparam logic [LBUS_W-1:0] LB_GAIN       = 12'h001; // bit0: 1 = 4X gain
  localparam logic [LBUS_W-1:0] LB_CAL_BURST  = 12'h002; // burst length, cycles
  localparam logic [LBUS_W-1:0] LB_CAL_REFL   = 12'h003; // launch-to-reflection delay, cycles
  localparam logic [LBUS_W-1:0] LB_CAL_GAP    = 12'h004; // gap between step 1 and step 2, cycles
  localparam logic [LBUS_W-1:0] LB_CAL_ENABLE = 12'h005; // bit0: run a cycle on each cal trigger

  // Configuration held in the DFE, written over the L-bus.
  typedef struct packed {
    dfe_mode_e [N_ADC-1:0]  mode;
    logic                   gain_4x;
    logic [CAL_CNT_W-1:0]   cal_burst;
    logic [CAL_CNT_W-1:0]   cal_refl;
    logic [CAL_CNT_W-1:0]   cal_gap;
    logic                   cal_enable;
  } dfe_cfg_t;

  // Host register word addresses (PCI card gate array).
  localparam logic [7:0] REG_CTRL     = 8'h00; // W: bit0 arm acquisition, bit1 start DMA, bit2 clear overflow
  localparam logic [7:0] REG_STATUS   = 8'h01; // R: see host_regs
  localparam logic [7:0] REG_NPAIRS   = 8'h02; // sample pairs captured per array and trigger
  localparam logic [7:0] REG_TRIG_DLY = 8'h03; // ADC cycles from trigger to first sample
  localparam logic [7:0] REG_DMA_BASE = 8'h04; // host byte address of array 0
  localparam logic [7:0] REG_LBUS     = 8'h05; // W: [27:16] L-bus address, [11:0] data
  localparam logic [7:0] REG_TRIG_CNT = 8'h06; // R: triggers seen since reset

  localparam int unsigned NPAIRS_W = $clog2(FIFO_DEPTH / 2) + 1;

endpackage
