// I/Q de-convolution of one ADC channel.
//
// The 50 MHz IF is sampled at 40 MHz, i.e. once every 1.25 IF periods, so
// consecutive samples are 450 degrees (90 degrees modulo one period) apart on
// the IF carrier. With I = A*cos(phi) and Q = A*sin(phi) the sample stream
// repeats the pattern I, Q, -I, -Q. Each clock this block takes the current
// and the previous sample and, depending on the position in that four-sample
// pattern, produces one I value and one Q value with the signs undone:
//
//   phase 0: I =  x[n],   Q = -x[n-1]
//   phase 1: I =  x[n-1], Q =  x[n]
//   phase 2: I = -x[n],   Q =  x[n-1]
//   phase 3: I = -x[n-1], Q = -x[n]
//
// So each of the two arrays carries 40 MS/s, which is what makes a 256 kB
// FIFO of 16-bit words hold about 3.2 ms. The under-sampling ratio and the
// I/Q split come from the hardware description; the sign convention of Q, the
// pairing of current and previous sample, and the use of a phase-reference
// pulse (`sync`, which marks a phase-0 sample) to align the pattern are this
// design's choices.
//
// Timing: one sample in per clock, outputs registered, one clock of latency.
// `out_valid` rises on the second sample after reset, once x[n-1] is real.
module iq_demux
  import bpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sync,      // current sample is phase 0 of the pattern
  input  adc_sample_t adc,       // ADC sample, two's complement
  output sample_t     i_out,
  output sample_t     q_out,
  output logic        out_valid
);

  logic [1:0] phase_q;   // phase of the previous sample
  logic [1:0] phase;     // phase of the current sample
  sample_t    cur, prev;
  logic       have_prev;

  assign phase = sync ? 2'd0 : phase_q + 2'd1;
  assign cur   = sample_t'(adc);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase_q   <= 2'd3;
      prev      <= '0;
      have_prev <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      phase_q   <= phase;
      prev      <= cur;
      have_prev <= 1'b1;
      out_valid <= have_prev;
      unique case (phase)
        2'd0: begin i_out <=  cur;  q_out <= -prev; end
        2'd1: begin i_out <=  prev; q_out <=  cur;  end
        2'd2: begin i_out <= -cur;  q_out <=  prev; end
        default: begin i_out <= -prev; q_out <= -cur; end
      endcase
    end
  end

endmodule
