// Self-checking test of dfe_iq_fpga: two channels with I/Q patterns, run in
// the same and in different multiplexer modes. Checks the array order (I and
// Q of channel 0, then of channel 1) and the latencies (one clock for raw
// samples, two for I/Q).
module dfe_iq_fpga_tb;
  import bpm_pkg::*;

  logic              clk = 0;
  logic              rst, sync;
  adc_sample_t [1:0] adc;
  dfe_mode_e   [1:0] mode;
  sample_t     [3:0] arr;
  logic        [1:0] ch_valid;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  dfe_iq_fpga dut (.*);

  initial begin
    #400000;
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
    int iv[2], qv[2];
    rst = 1; sync = 0; adc = '0; mode = {MODE_IQ, MODE_IQ};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int blk = 0; blk < 200; blk++) begin
      mode[0] = (blk % 3 == 1) ? MODE_RAW : MODE_IQ;
      mode[1] = (blk % 5 == 2) ? MODE_RAW : MODE_IQ;
      for (int c = 0; c < 2; c++) begin
        iv[c] = int'($urandom_range(16382)) - 8191;
        qv[c] = int'($urandom_range(16382)) - 8191;
      end
      for (int s = 0; s < 8; s++) begin
        @(negedge clk);
        // the raw path shows the sample driven one clock ago, the I/Q path
        // the pair driven two and three clocks ago: check from s = 3 on
        if (s >= 3) begin
          for (int c = 0; c < 2; c++) begin
            checks++;
            if (mode[c] == MODE_IQ) begin
              if (arr[2*c] !== sample_t'(iv[c]) || arr[2*c+1] !== sample_t'(qv[c]) || !ch_valid[c]) begin
                failures++;
                $display("blk %0d s %0d ch %0d IQ got %0d %0d", blk, s, c, arr[2*c], arr[2*c+1]);
              end
            end else begin
              if (arr[2*c] !== sample_t'(pattern((s - 1) % 4, iv[c], qv[c])) || arr[2*c+1] !== arr[2*c]) begin
                failures++;
                $display("blk %0d s %0d ch %0d RAW got %0d", blk, s, c, arr[2*c]);
              end
            end
          end
        end
        sync = (s == 0);
        for (int c = 0; c < 2; c++) adc[c] = pattern(s % 4, iv[c], qv[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
