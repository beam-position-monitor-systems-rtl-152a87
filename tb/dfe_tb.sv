// Self-checking test of the dfe card.
//
// The testbench configures the card over the L-bus (four-phase handshake,
// address word then data word) and checks: the reset configuration; all
// eight arrays in I/Q mode against the I and Q used to build the four ADC
// streams; a mixed mode setting (channel 0 raw, channel 1 ramp, channels 2
// and 3 I/Q); the gain select; a calibration cycle with programmed burst,
// round trip and gap, timed on the AFE switch outputs of all four channels;
// and that no cycle starts once calibration is disabled.
module dfe_tb;
  import bpm_pkg::*;

  logic                    clk = 0;
  logic                    rst, ref_sync, cal_start;
  adc_sample_t [N_ADC-1:0] adc;
  logic [LBUS_W-1:0]       lb_data;
  logic                    lb_addr, lb_stb, lb_ack;
  sample_t [N_ARRAY-1:0]   arr;
  logic                    arr_valid;
  afe_sw_e [N_ADC-1:0]     afe_sw;
  logic                    cal_rf_on, gain_4x, meas_direct, meas_refl, cal_busy;
  dfe_cfg_t                cfg;
  int                      checks = 0, failures = 0;
  int                      iv[N_ADC], qv[N_ADC];
  int                      n = 0;    // sample index, phase = n % 4

  always #12.5 clk = ~clk;

  dfe dut (.*);

  initial begin
    #5000000;
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

  // ADC stream source: the IF pattern of each channel, with a phase
  // reference pulse every 16 samples (2.5 MHz at 40 MHz)
  always @(negedge clk) begin
    for (int c = 0; c < N_ADC; c++) adc[c] <= pattern(n % 4, iv[c], qv[c]);
    ref_sync <= (n % 16 == 0);
    n <= n + 1;
  end

  function automatic void check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  task automatic lb_word(logic is_addr, logic [LBUS_W-1:0] w);
    lb_data = w; lb_addr = is_addr; lb_stb = 1;
    while (!lb_ack) @(posedge clk);
    #3 lb_stb = 0;
    while (lb_ack) @(posedge clk);
    #3;
  endtask

  task automatic lb_write(logic [LBUS_W-1:0] a, logic [LBUS_W-1:0] d);
    lb_word(1'b1, a);
    lb_word(1'b0, d);
    repeat (2) @(posedge clk);
  endtask

  task automatic cal_cycle(int b, int r, int g);
    int t, be;
    be = (b > r) ? r : b;
    @(negedge clk) cal_start = 1;
    @(negedge clk) cal_start = 0;
    for (t = 0; t < be; t++) begin
      check("step 1 switch", afe_sw == {N_ADC{SW_CAL_TO_DC}} && cal_rf_on && meas_direct);
      @(negedge clk);
    end
    for (t = 0; t < g; t++) begin
      check("gap", afe_sw == {N_ADC{SW_NORMAL}} && !cal_rf_on && cal_busy);
      @(negedge clk);
    end
    for (t = 0; t < r; t++) begin
      check("step 2 switch", afe_sw == {N_ADC{SW_CAL_TO_CABLE}} && cal_rf_on == (t < be));
      @(negedge clk);
    end
    for (t = 0; t < be; t++) begin
      check("step 3 switch", afe_sw == {N_ADC{SW_NORMAL}} && meas_refl && !cal_rf_on);
      @(negedge clk);
    end
    check("cycle end", !cal_busy && !meas_refl);
  endtask

  initial begin
    logic [15:0] ramp0;
    rst = 1; cal_start = 0; lb_data = 0; lb_addr = 0; lb_stb = 0;
    for (int c = 0; c < N_ADC; c++) begin
      iv[c] = int'($urandom_range(16000)) - 8000;
      qv[c] = int'($urandom_range(16000)) - 8000;
    end
    repeat (4) @(posedge clk);
    #3 rst = 0;
    // reset configuration
    check("reset modes", cfg.mode == {N_ADC{MODE_IQ}});
    check("reset burst", cfg.cal_burst == 12 && cfg.cal_refl == 12 && cfg.cal_enable);
    repeat (20) @(negedge clk);
    // I/Q mode, all eight arrays
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      check("arr_valid", arr_valid);
      for (int c = 0; c < N_ADC; c++)
        check("iq arrays", arr[2*c] == sample_t'(iv[c]) && arr[2*c+1] == sample_t'(qv[c]));
    end
    // mixed modes: ch0 raw, ch1 ramp, ch2/3 IQ
    lb_write(LB_MODE, {4'b0, 2'(MODE_IQ), 2'(MODE_IQ), 2'(MODE_RAMP), 2'(MODE_RAW)});
    check("mode register", cfg.mode[0] == MODE_RAW && cfg.mode[1] == MODE_RAMP && cfg.mode[2] == MODE_IQ);
    @(negedge clk);
    ramp0 = arr[2];
    for (int k = 1; k < 30; k++) begin
      @(negedge clk);
      // raw: the sample driven at the previous falling edge; the ramp restarts on ref_sync
      check("raw array", arr[0] == sample_t'(pattern((n - 1) % 4, iv[0], qv[0])) && arr[1] == arr[0]);
      check("ramp array", arr[3] == ~arr[2] && (arr[2] == ramp0 + 16'(1) || arr[2] == 0));
      ramp0 = arr[2];
      check("iq ch2", arr[4] == sample_t'(iv[2]) && arr[5] == sample_t'(qv[2]));
    end
    // gain
    lb_write(LB_GAIN, 12'h001);
    @(negedge clk) check("gain 4x", gain_4x);
    lb_write(LB_GAIN, 12'h000);
    @(negedge clk) check("gain 1x", !gain_4x);
    // calibration with the default timing, then programmed
    cal_cycle(12, 12, 40);
    lb_write(LB_CAL_BURST, 12'd7);
    lb_write(LB_CAL_REFL,  12'd15);
    lb_write(LB_CAL_GAP,   12'd3);
    cal_cycle(7, 15, 3);
    lb_write(LB_CAL_BURST, 12'd30);   // longer than the round trip
    cal_cycle(30, 15, 3);
    lb_write(LB_CAL_ENABLE, 12'd0);
    @(negedge clk) cal_start = 1;
    @(negedge clk) cal_start = 0;
    repeat (3) @(negedge clk);
    check("disabled", !cal_busy && afe_sw == {N_ADC{SW_NORMAL}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
