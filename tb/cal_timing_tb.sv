// Self-checking test of cal_timing.
//
// Runs calibration cycles with random burst, round-trip and gap settings
// (including bursts longer than the round trip, which must be cut to it),
// records the switch position, rf gate and measurement windows on every
// clock, and compares them with the three-step sequence worked out here:
// burst into the down converter, gap, launch into the cable held until the
// reflection returns, then the reflected burst measured with the switch back
// in the normal position. Also checks that a start pulse is ignored while a
// cycle runs and while calibration is disabled, and that the gain follows
// its register.
module cal_timing_tb;
  import bpm_pkg::*;

  logic                 clk = 0;
  logic                 rst, start, enable, gain_4x_in;
  logic [CAL_CNT_W-1:0] burst, refl, gap;
  afe_sw_e              sw;
  logic                 cal_rf_on, gain_4x, meas_direct, meas_refl, busy;
  logic [1:0]           step;
  int                   checks = 0, failures = 0;
  int                   clamps = 0;

  always #5 clk = ~clk;

  cal_timing dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(int t, int be, int g, int r);
    afe_sw_e esw;
    logic    erf, emd, emr, eb;
    int      s2, s3, tot;
    s2  = be + g;
    s3  = s2 + r;
    tot = s3 + be;
    esw = SW_NORMAL; erf = 0; emd = 0; emr = 0; eb = (t < tot);
    if (t < be) begin esw = SW_CAL_TO_DC; erf = 1; emd = 1; end
    else if (t < s2) ;
    else if (t < s3) begin esw = SW_CAL_TO_CABLE; erf = (t - s2) < be; end
    else if (t < tot) emr = 1;
    checks++;
    if (sw !== esw || cal_rf_on !== erf || meas_direct !== emd || meas_refl !== emr || busy !== eb) begin
      failures++;
      if (failures < 10)
        $display("t=%0d (be %0d g %0d r %0d): sw %0d rf %b md %b mr %b busy %b, want %0d %b %b %b %b",
                 t, be, g, r, sw, cal_rf_on, meas_direct, meas_refl, busy, esw, erf, emd, emr, eb);
    end
  endtask

  initial begin
    int b, r, g, be;
    rst = 1; start = 0; enable = 1; gain_4x_in = 0; burst = 12; refl = 12; gap = 4;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int run = 0; run < 60; run++) begin
      if (run == 0) begin b = 12; r = 12; g = 40; end   // the 300 ns default
      else begin
        b = 1 + int'($urandom_range(20));
        r = 1 + int'($urandom_range(20));
        g = int'($urandom_range(10));
      end
      be = (b > r) ? r : b;
      if (b > r) clamps++;
      burst = CAL_CNT_W'(b); refl = CAL_CNT_W'(r); gap = CAL_CNT_W'(g);
      gain_4x_in = run[0];
      @(negedge clk);
      checks++;
      if (gain_4x !== gain_4x_in) failures++;
      // a start while disabled does nothing
      enable = 0; start = 1;
      @(negedge clk) start = 0; enable = 1;
      checks++;
      if (busy || sw != SW_NORMAL) failures++;
      start = 1;
      @(negedge clk) start = 0;
      for (int t = 0; t < be + g + r + be + 3; t++) begin
        expect_cycle(t, be, g, r);
        // a second start in the middle of a cycle is ignored
        start = (t == 2);
        @(negedge clk);
        start = 0;
      end
    end
    checks++;
    if (clamps == 0) failures++;
    $display("burst clamped to the round trip in %0d runs", clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
