// Self-checking test of dfe_data_mux: IQ, raw and ramp modes.
//
// Random inputs are applied each clock; one clock later the two outputs must
// be I/Q, the sign-extended raw sample twice, or the ramp and its complement.
// The ramp is checked against a count of clocks since the last sync pulse.
module dfe_data_mux_tb;
  import bpm_pkg::*;

  logic        clk = 0;
  logic        rst, sync, iq_valid, out_valid;
  dfe_mode_e   mode;
  sample_t     i_in, q_in, a_out, b_out;
  adc_sample_t raw;
  int          checks = 0, failures = 0;
  int          ramp_ref;
  int          seen[3];

  always #5 clk = ~clk;

  dfe_data_mux dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t ea, eb;
    logic    ev;
    rst = 1; sync = 0; iq_valid = 0; mode = MODE_IQ; i_in = 0; q_in = 0; raw = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    ramp_ref = 1;   // one clock has passed since reset was released
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      mode     = dfe_mode_e'($urandom_range(2));
      i_in     = sample_t'($urandom);
      q_in     = sample_t'($urandom);
      raw      = adc_sample_t'($urandom);
      iq_valid = $urandom_range(3) != 0;
      sync     = $urandom_range(50) == 0;
      case (mode)
        MODE_IQ:  begin ea = i_in; eb = q_in; ev = iq_valid; end
        MODE_RAW: begin ea = sample_t'(raw); eb = sample_t'(raw); ev = 1; end
        default:  begin ea = sample_t'(ramp_ref[15:0]); eb = ~sample_t'(ramp_ref[15:0]); ev = 1; end
      endcase
      seen[int'(mode)]++;
      @(posedge clk); #1;
      ramp_ref = sync ? 0 : (ramp_ref + 1) & 16'hffff;
      checks++;
      if (a_out !== ea || b_out !== eb || out_valid !== ev) begin
        failures++;
        if (failures < 10)
          $display("t %0d mode %0d: got %h %h %b want %h %h %b", t, mode, a_out, b_out, out_valid, ea, eb, ev);
      end
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (seen[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
