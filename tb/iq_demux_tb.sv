// Self-checking test of iq_demux.
//
// Builds the ADC stream a 50 MHz IF sampled at 40 MHz produces: for a held
// amplitude and phase (I, Q) the samples run I, Q, -I, -Q. I and Q change
// every eight samples, and sometimes the pattern restarts at an arbitrary
// point with a sync pulse. From the second sample of each block on, the
// outputs one clock later must equal the block's I and Q.
module iq_demux_tb;
  import bpm_pkg::*;

  logic        clk = 0;
  logic        rst, sync;
  adc_sample_t adc;
  sample_t     i_out, q_out;
  logic        out_valid;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  iq_demux dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic adc_sample_t pattern(int ph, int i, int q);
    case (ph)
      0: return adc_sample_t'(i);
      1: return adc_sample_t'(q);
      2: return adc_sample_t'(-i);
      default: return adc_sample_t'(-q);
    endcase
  endfunction

  initial begin
    int n, iv, qv, resync;
    rst = 1; sync = 0; adc = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    n = 0;
    for (int blk = 0; blk < 400; blk++) begin
      iv = int'($urandom_range(16382)) - 8191;
      qv = int'($urandom_range(16382)) - 8191;
      if (blk == 3) begin iv = -8191; qv = 8191; end
      resync = ($urandom_range(4) == 0);
      if (resync) n = int'($urandom_range(3)) * 4 + 0;  // restart the pattern at phase 0
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        adc  = pattern(n % 4, iv, qv);
        sync = (blk == 0 && s == 0) || (resync && s == 0);
        @(posedge clk); #1;
        if (s >= 1) begin
          checks++;
          if (i_out !== sample_t'(iv) || q_out !== sample_t'(qv) || !out_valid) begin
            failures++;
            if (failures < 10)
              $display("blk %0d s %0d: got I=%0d Q=%0d v=%b, want I=%0d Q=%0d",
                       blk, s, i_out, q_out, out_valid, iv, qv);
          end
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
