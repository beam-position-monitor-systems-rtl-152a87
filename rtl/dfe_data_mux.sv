// Test multiplexer of one DFE channel.
//
// Besides the de-convolved I and Q streams, the DFE processing FPGAs can pass
// raw ADC data or a preset ramp to the FIFOs, for testing and debugging. This
// block selects, per channel, what goes to the channel's two arrays (A, which
// carries I, and B, which carries Q):
//
//   MODE_IQ   A = I,           B = Q
//   MODE_RAW  A = raw sample,  B = raw sample  (sign-extended to 16 bits)
//   MODE_RAMP A = ramp,        B = ~ramp       (ramp counts up by one per clock)
//
// The three sources are from the hardware description; what exactly the ramp
// and the raw mode put on each array is this design's choice. The ramp
// restarts at zero on reset and on `sync` (the phase-reference pulse), so a
// capture of a ramp can be checked sample by sample.
//
// Timing: outputs registered, one clock after the inputs. `out_valid` follows
// `iq_valid` in IQ mode and is high in the other modes.
module dfe_data_mux
  import bpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sync,
  input  dfe_mode_e   mode,
  input  sample_t     i_in,
  input  sample_t     q_in,
  input  logic        iq_valid,
  input  adc_sample_t raw,
  output sample_t     a_out,
  output sample_t     b_out,
  output logic        out_valid
);

  logic [SAMPLE_W-1:0] ramp;

  always_ff @(posedge clk) begin
    if (rst || sync) ramp <= '0;
    else             ramp <= ramp + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_out     <= '0;
      b_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      unique case (mode)
        MODE_RAW: begin
          a_out     <= sample_t'(raw);
          b_out     <= sample_t'(raw);
          out_valid <= 1'b1;
        end
        MODE_RAMP: begin
          a_out     <= sample_t'(ramp);
          b_out     <= sample_t'(~ramp);
          out_valid <= 1'b1;
        end
        default: begin
          a_out     <= i_in;
          b_out     <= q_in;
          out_valid <= iq_valid;
        end
      endcase
    end
  end

endmodule
