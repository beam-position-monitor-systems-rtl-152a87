// Digital front end (DFE) card.
//
// Holds the four 14-bit ADC data paths and the three FPGAs of the card: two
// processing FPGAs (dfe_iq_fpga), each turning two ADC streams into four
// arrays, and a timing FPGA (cal_timing) that drives the AFE calibration
// switches and the AFE gain. The card is controlled over the 12-bit L-bus:
// lbus_slave receives register writes, and the register file here holds the
// per-channel multiplexer modes, the gain and the calibration timing.
//
// The card's make-up follows the hardware description. The register map
// (bpm_pkg LB_*), the register reset values (IQ mode, 1X gain, 12-cycle
// burst and round trip = 300 ns, 40-cycle gap, calibration enabled) and the
// single register file for all three FPGAs are this design's choices.
//
// Timing: everything runs on the 40 MHz ADC clock. `ref_sync` is a one-clock
// pulse derived from the phase reference (2.5 MHz = every 16th ADC clock, a
// multiple of the four-sample I/Q pattern); it marks an I/Q phase-0 sample.
// `cal_start` starts a calibration cycle. Arrays appear two clocks after
// their ADC samples; `arr_valid` is high when all four channels are valid.
module dfe
  import bpm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  input  adc_sample_t [N_ADC-1:0]     adc,
  input  logic                        ref_sync,
  input  logic                        cal_start,
  // L-bus
  input  logic [LBUS_W-1:0]           lb_data,
  input  logic                        lb_addr,
  input  logic                        lb_stb,
  output logic                        lb_ack,
  // arrays to the FIFOs
  output sample_t     [N_ARRAY-1:0]   arr,
  output logic                        arr_valid,
  // AFE controls
  output afe_sw_e     [N_ADC-1:0]     afe_sw,
  output logic                        cal_rf_on,
  output logic                        gain_4x,
  output logic                        meas_direct,
  output logic                        meas_refl,
  output logic                        cal_busy,
  output dfe_cfg_t                    cfg
);

  logic              wr_en;
  logic [LBUS_W-1:0] wr_addr, wr_data;
  logic [3:0]        ch_valid;
  afe_sw_e           sw;

  lbus_slave u_lbus (
    .clk     (clk),
    .rst     (rst),
    .lb_data (lb_data),
    .lb_addr (lb_addr),
    .lb_stb  (lb_stb),
    .lb_ack  (lb_ack),
    .wr_en   (wr_en),
    .wr_addr (wr_addr),
    .wr_data (wr_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.mode       <= {N_ADC{MODE_IQ}};
      cfg.gain_4x    <= 1'b0;
      cfg.cal_burst  <= CAL_CNT_W'(CAL_ROUND_TRIP_CYC);
      cfg.cal_refl   <= CAL_CNT_W'(CAL_ROUND_TRIP_CYC);
      cfg.cal_gap    <= CAL_CNT_W'(40);
      cfg.cal_enable <= 1'b1;
    end else if (wr_en) begin
      unique case (wr_addr)
        LB_MODE:
          for (int c = 0; c < N_ADC; c++) cfg.mode[c] <= dfe_mode_e'(wr_data[2*c +: 2]);
        LB_GAIN:       cfg.gain_4x    <= wr_data[0];
        LB_CAL_BURST:  cfg.cal_burst  <= (wr_data == 0) ? CAL_CNT_W'(1) : wr_data;
        LB_CAL_REFL:   cfg.cal_refl   <= (wr_data == 0) ? CAL_CNT_W'(1) : wr_data;
        LB_CAL_GAP:    cfg.cal_gap    <= wr_data;
        LB_CAL_ENABLE: cfg.cal_enable <= wr_data[0];
        default: ;
      endcase
    end
  end

  for (genvar f = 0; f < 2; f++) begin : g_fpga
    dfe_iq_fpga u_fpga (
      .clk      (clk),
      .rst      (rst),
      .sync     (ref_sync),
      .adc      (adc[2*f +: 2]),
      .mode     (cfg.mode[2*f +: 2]),
      .arr      (arr[4*f +: 4]),
      .ch_valid (ch_valid[2*f +: 2])
    );
  end

  assign arr_valid = &ch_valid;

  cal_timing u_cal (
    .clk         (clk),
    .rst         (rst),
    .start       (cal_start),
    .enable      (cfg.cal_enable),
    .gain_4x_in  (cfg.gain_4x),
    .burst       (cfg.cal_burst),
    .refl        (cfg.cal_refl),
    .gap         (cfg.cal_gap),
    .sw          (sw),
    .cal_rf_on   (cal_rf_on),
    .gain_4x     (gain_4x),
    .meas_direct (meas_direct),
    .meas_refl   (meas_refl),
    .busy        (cal_busy),
    .step        ()
  );

  // The calibrator feeds all four channels through a matched splitter, so
  // all four switch networks move together.
  assign afe_sw = {N_ADC{sw}};

endmodule
