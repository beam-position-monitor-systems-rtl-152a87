// End-to-end test of bpm_top at its default sizes (eight 131072-word FIFOs).
//
// The testbench stands in for the parts around the digital cards: the ADCs
// (each channel's samples follow the I, Q, -I, -Q pattern of a 50 MHz IF
// sampled at 40 MHz, with per-channel amplitude and phase), the phase
// reference pulse (every 16 ADC clocks), the host (register port) and host
// memory (memory-write port with random back-pressure). It runs:
//
//   1. a 1 ms capture (20000 pairs, the reset length) in I/Q mode, DMA to
//      memory, every word checked against the channel's I and Q;
//   2. an L-bus reconfiguration to raw / ramp / raw / I/Q modes and a short
//      capture with a trigger delay, checked sample by sample;
//   3. a full-FIFO capture (65536 pairs, 3.3 ms) and its DMA, then two more
//      captures without DMA, which must overflow the FIFOs;
//   4. calibration cycles at the default 300 ns timing, with a burst longer
//      than the round trip (cut to it), with the gain switched to 4X, and
//      with calibration disabled.
//
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module bpm_top_tb;
  import bpm_pkg::*;

  logic                    adc_clk = 0, pci_clk = 0;
  logic                    rst;
  adc_sample_t [N_ADC-1:0] adc;
  logic                    ref_sync, trigger, cal_trig;
  logic                    reg_wr, reg_rd;
  logic [7:0]              reg_addr;
  logic [31:0]             reg_wdata, reg_rdata;
  logic                    mw_valid, mw_ready, dma_done;
  logic [31:0]             mw_addr, mw_data;
  afe_sw_e [N_ADC-1:0]     afe_sw;
  logic                    cal_rf_on, gain_4x, meas_direct, meas_refl, cal_busy;
  logic [N_ARRAY-1:0]      fifo_overflow;

  int checks = 0, failures = 0;
  int iv[N_ADC], qv[N_ADC];
  int acyc = 0;
  logic [31:0] mem[int];

  // mechanism counters
  int m_iq = 0, m_raw = 0, m_ramp = 0, m_lbus = 0, m_unarmed = 0, m_delay = 0;
  int m_backpressure = 0, m_overflow = 0, m_full_fifo = 0;
  int m_step1 = 0, m_step2 = 0, m_step3 = 0, m_clamp = 0, m_gain = 0, m_cal_off = 0;

  always #12.5 adc_clk = ~adc_clk;
  always #15   pci_clk = ~pci_clk;

  bpm_top dut (.*);

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
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

  // ADCs and phase reference
  always @(negedge adc_clk) begin
    for (int c = 0; c < N_ADC; c++) adc[c] <= pattern(acyc % 4, iv[c], qv[c]);
    ref_sync <= (acyc % 16 == 0);
    acyc <= acyc + 1;
  end

  // host memory
  always @(negedge pci_clk) mw_ready <= ($urandom_range(7) != 0);
  always @(posedge pci_clk) if (mw_valid) begin
    if (!mw_ready) m_backpressure++;
    else mem[int'(mw_addr)] = mw_data;
  end

  // AFE monitor
  int rf_in_step2 = 0;
  always @(posedge adc_clk) if (!rst) begin
    if (afe_sw[0] == SW_CAL_TO_DC)    m_step1++;
    if (afe_sw[0] == SW_CAL_TO_CABLE) begin m_step2++; if (cal_rf_on) rf_in_step2++; end
    if (meas_refl)                    m_step3++;
  end

  function automatic void check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  task automatic wreg(logic [7:0] a, logic [31:0] d);
    @(negedge pci_clk) reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge pci_clk) reg_wr = 0;
  endtask

  task automatic rreg(logic [7:0] a, output logic [31:0] d);
    @(negedge pci_clk) reg_rd = 1; reg_addr = a;
    @(negedge pci_clk) reg_rd = 0; d = reg_rdata;
  endtask

  task automatic lbus(logic [LBUS_W-1:0] a, logic [LBUS_W-1:0] d);
    logic [31:0] v;
    wreg(REG_LBUS, {4'b0, a, 4'b0, d});
    do rreg(REG_STATUS, v); while (v[5]);
    repeat (4) @(negedge adc_clk);
    m_lbus++;
  endtask

  task automatic fire_trigger(output int at);
    @(negedge adc_clk) trigger = 1; at = acyc;
    repeat (4) @(negedge adc_clk);
    trigger = 0;
  endtask

  task automatic capture(int np, int dly, output int t_trig);
    logic [31:0] v;
    wreg(REG_NPAIRS, np);
    wreg(REG_TRIG_DLY, dly);
    wreg(REG_CTRL, 32'h1);
    repeat (10) @(negedge pci_clk);
    fire_trigger(t_trig);
    do begin
      repeat (200) @(negedge pci_clk);
      rreg(REG_STATUS, v);
    end while (v[0] == 0);
  endtask

  task automatic dma(logic [31:0] base, int np);
    wreg(REG_DMA_BASE, base);
    mem.delete();
    wreg(REG_CTRL, 32'h2);
    @(posedge dma_done);
    repeat (3) @(negedge pci_clk);
    check("DMA word count", mem.size() == N_ARRAY * np);
  endtask

  function automatic logic [15:0] sample_at(logic [31:0] base, int np, int k, int j);
    logic [31:0] w;
    int a;
    a = int'(base) + 4 * (k * np + j / 2);
    if (!mem.exists(a)) return 16'hxxxx;
    w = mem[a];
    return (j % 2) ? w[31:16] : w[15:0];
  endfunction

  task automatic check_iq(logic [31:0] base, int np);
    int bad = 0;
    for (int c = 0; c < N_ADC; c++)
      for (int j = 0; j < 2 * np; j++) begin
        if (sample_at(base, np, 2*c, j)   !== 16'(iv[c])) bad++;
        if (sample_at(base, np, 2*c+1, j) !== 16'(qv[c])) bad++;
      end
    check("I/Q data", bad == 0);
    if (bad) $display("%0d wrong I/Q samples", bad);
    m_iq++;
  endtask

  initial begin
    logic [31:0] v, base;
    int t_trig, np, bad;
    rst = 1; trigger = 0; cal_trig = 0; reg_wr = 0; reg_rd = 0; reg_addr = 0; reg_wdata = 0;
    for (int c = 0; c < N_ADC; c++) begin
      iv[c] = int'($urandom_range(16000)) - 8000;
      qv[c] = int'($urandom_range(16000)) - 8000;
    end
    repeat (6) @(posedge pci_clk);
    rst = 0;
    repeat (6) @(posedge pci_clk);

    // a trigger before arming captures nothing
    fire_trigger(t_trig);
    repeat (20) @(negedge pci_clk);
    rreg(REG_STATUS, v);
    check("unarmed trigger ignored", v[2:0] == 3'b000);
    rreg(REG_TRIG_CNT, v);
    if (v == 1) m_unarmed++;

    // 1. a 1 ms capture with the reset length, I/Q mode
    rreg(REG_NPAIRS, v);
    np = int'(v);
    check("reset length 20000 pairs", np == 20000);
    capture(np, 0, t_trig);
    base = 32'h1000_0000;
    dma(base, np);
    check_iq(base, np);

    // 2. raw / ramp / raw / I/Q, with a trigger delay
    lbus(LB_MODE, {4'b0, 2'(MODE_IQ), 2'(MODE_RAW), 2'(MODE_RAMP), 2'(MODE_RAW)});
    np = 200;
    capture(np, 37, t_trig);
    base = 32'h0040_0000;
    dma(base, np);
    begin
      int first_ph;
      logic [15:0] s, r, rp;
      bad = 0;
      // raw channel 0: find its pattern phase, then follow it
      s = sample_at(base, np, 0, 0);
      first_ph = -1;
      for (int p = 0; p < 4; p++) if (s == 16'(sample_t'(pattern(p, iv[0], qv[0])))) first_ph = p;
      if (first_ph < 0) bad++;
      for (int j = 0; j < 2 * np; j++) begin
        s = sample_at(base, np, 0, j);
        if (s !== 16'(sample_t'(pattern((first_ph + j) % 4, iv[0], qv[0])))) bad++;
        if (sample_at(base, np, 1, j) !== s) bad++;
        if (sample_at(base, np, 4, j) !== 16'(sample_t'(pattern((first_ph + j) % 4, iv[2], qv[2])))) bad++;
      end
      check("raw data", bad == 0);
      m_raw++;
      // ramp channel 1: counts up, restarts every 16 samples
      bad = 0;
      for (int j = 0; j < 2 * np; j++) begin
        r = sample_at(base, np, 2, j);
        if (sample_at(base, np, 3, j) !== ~r) bad++;
        if (j > 0 && !(r == rp + 1 || (r == 0 && rp == 15))) bad++;
        rp = r;
      end
      check("ramp data", bad == 0);
      m_ramp++;
      // I/Q channel 3
      bad = 0;
      for (int j = 0; j < 2 * np; j++)
        if (sample_at(base, np, 6, j) !== 16'(iv[3]) || sample_at(base, np, 7, j) !== 16'(qv[3])) bad++;
      check("I/Q channel 3", bad == 0);
      // the raw sample's position in the pattern tells when the capture
      // started: trigger + delay + 3 clocks, less the one clock the raw
      // sample spends in the test multiplexer
      check("trigger delay", (t_trig + 37 + 3 - 1) % 4 == first_ph);
      m_delay++;
    end
    lbus(LB_MODE, 12'h000);

    // 3. the full FIFO, then an overflow
    capture(FIFO_DEPTH / 2, 0, t_trig);
    rreg(REG_STATUS, v);
    check("full FIFO without overflow", v[4] == 0);
    base = 32'h0100_0000;
    dma(base, FIFO_DEPTH / 2);
    check_iq(base, FIFO_DEPTH / 2);
    m_full_fifo++;
    capture(FIFO_DEPTH / 2, 0, t_trig);
    capture(FIFO_DEPTH / 2, 0, t_trig);
    repeat (10) @(negedge pci_clk);
    rreg(REG_STATUS, v);
    check("overflow reported", v[4] == 1 && fifo_overflow == '1);
    if (v[4]) m_overflow++;
    wreg(REG_CTRL, 32'h4);
    repeat (20) @(negedge pci_clk);
    rreg(REG_STATUS, v);
    check("overflow cleared", v[4] == 0);

    // 4. calibration
    begin
      int s1, s2, s3;
      s1 = m_step1; s2 = m_step2; s3 = m_step3;
      @(negedge adc_clk) cal_trig = 1;
      @(negedge adc_clk) cal_trig = 0;
      repeat (120) @(negedge adc_clk);
      check("step 1 = 300 ns", m_step1 - s1 == 12);
      check("step 2 = 300 ns", m_step2 - s2 == 12);
      check("step 3 = 300 ns", m_step3 - s3 == 12);
      lbus(LB_CAL_BURST, 12'd20);
      lbus(LB_GAIN, 12'd1);
      check("gain 4X", gain_4x);
      if (gain_4x) m_gain++;
      s2 = m_step2; rf_in_step2 = 0;
      @(negedge adc_clk) cal_trig = 1;
      @(negedge adc_clk) cal_trig = 0;
      repeat (120) @(negedge adc_clk);
      check("burst cut to the round trip", rf_in_step2 == 12 && m_step2 - s2 == 12);
      if (rf_in_step2 == 12) m_clamp++;
      lbus(LB_CAL_ENABLE, 12'd0);
      s1 = m_step1;
      @(negedge adc_clk) cal_trig = 1;
      @(negedge adc_clk) cal_trig = 0;
      repeat (60) @(negedge adc_clk);
      check("calibration disabled", m_step1 == s1 && !cal_busy);
      if (m_step1 == s1) m_cal_off++;
    end

    $display("mechanisms: iq %0d raw %0d ramp %0d lbus %0d unarmed %0d delay %0d backpressure %0d",
             m_iq, m_raw, m_ramp, m_lbus, m_unarmed, m_delay, m_backpressure);
    $display("            full_fifo %0d overflow %0d step1 %0d step2 %0d step3 %0d clamp %0d gain %0d cal_off %0d",
             m_full_fifo, m_overflow, m_step1, m_step2, m_step3, m_clamp, m_gain, m_cal_off);
    check("mechanism iq", m_iq > 0);           check("mechanism raw", m_raw > 0);
    check("mechanism ramp", m_ramp > 0);       check("mechanism lbus", m_lbus > 0);
    check("mechanism unarmed", m_unarmed > 0); check("mechanism delay", m_delay > 0);
    check("mechanism backpressure", m_backpressure > 0);
    check("mechanism full fifo", m_full_fifo > 0);
    check("mechanism overflow", m_overflow > 0);
    check("mechanism cal steps", m_step1 > 0 && m_step2 > 0 && m_step3 > 0);
    check("mechanism clamp", m_clamp > 0);     check("mechanism gain", m_gain > 0);
    check("mechanism cal off", m_cal_off > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
