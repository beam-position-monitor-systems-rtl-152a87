// One of the two DFE processing FPGAs.
//
// Each processing FPGA serves two of the four ADCs: per ADC it de-convolves
// the quadrature-multiplexed stream into I and Q (iq_demux) and passes either
// those, the raw samples or a ramp to the channel's two arrays
// (dfe_data_mux). Its four output arrays are, in order, I and Q of its first
// channel, then I and Q of its second channel.
//
// The split of the four channels over two FPGAs and the functions inside
// follow the hardware description; the array order is this design's choice.
//
// Timing: two clocks from an ADC sample to the arrays. All four arrays share
// `arr_valid` only when both channels are in the same mode; each channel's
// valid is therefore given separately.
module dfe_iq_fpga
  import bpm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  sync,
  input  adc_sample_t [1:0]     adc,
  input  dfe_mode_e   [1:0]     mode,
  output sample_t     [3:0]     arr,
  output logic        [1:0]     ch_valid
);

  for (genvar c = 0; c < 2; c++) begin : g_ch
    sample_t i_s, q_s;
    logic    iq_v;

    iq_demux u_demux (
      .clk       (clk),
      .rst       (rst),
      .sync      (sync),
      .adc       (adc[c]),
      .i_out     (i_s),
      .q_out     (q_s),
      .out_valid (iq_v)
    );

    dfe_data_mux u_mux (
      .clk       (clk),
      .rst       (rst),
      .sync      (sync),
      .mode      (mode[c]),
      .i_in      (i_s),
      .q_in      (q_s),
      .iq_valid  (iq_v),
      .raw       (adc[c]),
      .a_out     (arr[2*c]),
      .b_out     (arr[2*c+1]),
      .out_valid (ch_valid[c])
    );
  end

endmodule
