// Calibration switch timing for the analog front end (the DFE timing FPGA).
//
// The AFE can put each down converter's input in one of three positions:
// normal (pickup cable to down converter), calibration source to down
// converter, or calibration source to the pickup cable. A calibration cycle
// has three steps, all channels switched together:
//
//   step 1  switch = CAL_TO_DC, rf burst on for `burst` cycles; the burst goes
//           straight into the down converter and is measured (meas_direct).
//   gap     switch = NORMAL for `gap` cycles.
//   step 2  switch = CAL_TO_CABLE, rf burst on for `burst` cycles: the burst is
//           launched down the cable towards the shorted pickup.
//   step 3  `refl` cycles after the launch began, when the reflection arrives,
//           the switch goes back to NORMAL and the reflected burst is measured
//           (meas_refl) for `burst` cycles.
//
// The burst can be no longer than the cable round trip, so a `burst` above
// `refl` is cut to `refl`. The same block drives the AFE gain select (1X or
// 4X). The three steps, the three switch positions and the 300 ns limit come
// from the hardware description; the gap between steps, the measurement
// windows, the start on a trigger pulse and the defaults in cycles (12 cycles
// = 300 ns at 40 MHz) are this design's choices.
//
// Timing: `start` is a one-clock pulse, ignored while a cycle runs or when
// `enable` is low. Outputs are registered. `busy` covers the whole cycle.
module cal_timing
  import bpm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 enable,
  input  logic                 gain_4x_in,
  input  logic [CAL_CNT_W-1:0] burst,   // burst length, cycles (>= 1)
  input  logic [CAL_CNT_W-1:0] refl,    // launch to reflection arrival, cycles (>= 1)
  input  logic [CAL_CNT_W-1:0] gap,     // cycles between step 1 and step 2
  output afe_sw_e              sw,
  output logic                 cal_rf_on,
  output logic                 gain_4x,
  output logic                 meas_direct,
  output logic                 meas_refl,
  output logic                 busy,
  output logic [1:0]           step      // 0 idle, 1..3 calibration step
);

  typedef enum logic [2:0] {S_IDLE, S_DIRECT, S_GAP, S_LAUNCH, S_REFL} state_e;

  state_e               state;
  logic [CAL_CNT_W-1:0] cnt;       // cycles left in the current state
  logic [CAL_CNT_W-1:0] burst_eff; // burst length limited to the round trip
  logic [CAL_CNT_W-1:0] since_launch;

  assign burst_eff = (burst > refl) ? refl : burst;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      cnt          <= '0;
      since_launch <= '0;
      sw           <= SW_NORMAL;
      cal_rf_on    <= 1'b0;
      meas_direct  <= 1'b0;
      meas_refl    <= 1'b0;
      step         <= 2'd0;
    end else begin
      unique case (state)
        S_IDLE: if (start && enable) begin
          state       <= S_DIRECT;
          cnt         <= burst_eff - 1'b1;
          sw          <= SW_CAL_TO_DC;
          cal_rf_on   <= 1'b1;
          meas_direct <= 1'b1;
          step        <= 2'd1;
        end
        S_DIRECT: begin
          if (cnt == 0) begin
            cal_rf_on   <= 1'b0;
            meas_direct <= 1'b0;
            sw          <= SW_NORMAL;
            if (gap == 0) begin
              state        <= S_LAUNCH;
              cnt          <= refl - 1'b1;
              since_launch <= '0;
              sw           <= SW_CAL_TO_CABLE;
              cal_rf_on    <= 1'b1;
              step         <= 2'd2;
            end else begin
              state <= S_GAP;
              cnt   <= gap - 1'b1;
            end
          end else cnt <= cnt - 1'b1;
        end
        S_GAP: begin
          if (cnt == 0) begin
            state        <= S_LAUNCH;
            cnt          <= refl - 1'b1;
            since_launch <= '0;
            sw           <= SW_CAL_TO_CABLE;
            cal_rf_on    <= 1'b1;
            step         <= 2'd2;
          end else cnt <= cnt - 1'b1;
        end
        S_LAUNCH: begin
          // rf burst for burst_eff cycles, switch held on the cable until
          // the reflection comes back after refl cycles
          since_launch <= since_launch + 1'b1;
          if (since_launch + 1'b1 >= burst_eff) cal_rf_on <= 1'b0;
          if (cnt == 0) begin
            state     <= S_REFL;
            cnt       <= burst_eff - 1'b1;
            sw        <= SW_NORMAL;
            cal_rf_on <= 1'b0;
            meas_refl <= 1'b1;
            step      <= 2'd3;
          end else cnt <= cnt - 1'b1;
        end
        default: begin  // S_REFL
          if (cnt == 0) begin
            state     <= S_IDLE;
            meas_refl <= 1'b0;
            step      <= 2'd0;
          end else cnt <= cnt - 1'b1;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) gain_4x <= 1'b0;
    else     gain_4x <= gain_4x_in;
  end

endmodule
