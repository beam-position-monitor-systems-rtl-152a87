// Operating scenarios on the full design (bpm_top at its default sizes).
//
// The testbench models the four lobe signals after down conversion: lobe c
// has amplitude A[c] and all lobes share the beam phase PHI, so ADC channel c
// sees round(A[c]*cos(PHI + n*90deg)) plus uniform noise of +/-NOISE LSB.
// Lobes 0 and 2 are right and left, 1 and 3 top and bottom, and the beam is
// off centre. Host memory is modelled by a monitor that sums, per array, the
// samples the DMA writes, so no capture has to be stored.
//
//   A. 1 ms captures (20000 pairs, one injection cycle) at the 60 Hz pulse
//      rate: the DMA of all eight arrays must end before the next pulse, i.e.
//      within 666667 ADC clocks (16.67 ms) of the trigger.
//   B. A train of NPULSE beam pulses of 50 us (1000 pairs each), each averaged
//      to a phase and an x/y position (difference over sum of lobe
//      amplitudes). Every pulse must give the drive phase within 0.1 degree
//      and the drive difference-over-sum position within 0.001; the spread
//      of the phase over the train is printed.
module bpm_workload_tb;
  import bpm_pkg::*;

  localparam int    NPULSE = 1000;
  localparam int    NOISE  = 24;
  localparam real   PI     = 3.14159265358979;
  localparam real   PHI    = 37.5 * PI / 180.0;

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

  int  checks = 0, failures = 0;
  real amp[N_ADC] = '{5200.0, 4700.0, 4400.0, 4900.0};
  int  iv[N_ADC], qv[N_ADC];
  longint acyc = 0;

  // DMA monitor state
  logic [31:0] base = 0;
  int          np = 1;
  longint      sum[N_ARRAY];
  int          nwords = 0;

  always #12.5 adc_clk = ~adc_clk;
  always #15   pci_clk = ~pci_clk;

  bpm_top dut (.*);

  initial begin
    // watchdog in ADC clocks
    wait (acyc == 64'd40_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pattern(int ph, int i, int q);
    case (ph)
      0: return i;
      1: return q;
      2: return -i;
      default: return -q;
    endcase
  endfunction

  always @(negedge adc_clk) begin
    for (int c = 0; c < N_ADC; c++)
      adc[c] <= adc_sample_t'(pattern(int'(acyc % 4), iv[c], qv[c]) + int'($urandom_range(2 * NOISE)) - NOISE);
    ref_sync <= (acyc % 16 == 0);
    acyc <= acyc + 1;
  end

  always @(negedge pci_clk) mw_ready <= ($urandom_range(9) != 0);
  always @(posedge pci_clk) if (mw_valid && mw_ready) begin
    int k;
    k = int'((mw_addr - base) / 4) / np;
    if (k >= 0 && k < N_ARRAY) begin
      sum[k] += longint'(signed'(mw_data[15:0])) + longint'(signed'(mw_data[31:16]));
      nwords++;
    end
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

  // one beam pulse: capture, then DMA; returns the ADC clocks from the
  // trigger to the end of the DMA
  task automatic pulse(int pairs, output longint took);
    logic [31:0] v;
    longint t0;
    np = pairs;
    for (int k = 0; k < N_ARRAY; k++) sum[k] = 0;
    nwords = 0;
    wreg(REG_NPAIRS, pairs);
    wreg(REG_DMA_BASE, base);
    wreg(REG_CTRL, 32'h1);
    repeat (8) @(negedge pci_clk);
    @(negedge adc_clk) trigger = 1; t0 = acyc;
    repeat (3) @(negedge adc_clk);
    trigger = 0;
    do rreg(REG_STATUS, v); while (v[0] == 0);
    wreg(REG_CTRL, 32'h2);
    @(posedge dma_done);
    took = acyc - t0;
    @(negedge pci_clk);
    check("DMA word count", nwords == N_ARRAY * pairs);
  endtask

  // average I/Q of each channel from the sums of the last pulse
  task automatic results(output real phase_deg, output real x, output real y);
    real mi[N_ADC], mq[N_ADC], a[N_ADC], ph;
    for (int c = 0; c < N_ADC; c++) begin
      mi[c] = real'(sum[2*c]) / (2.0 * np);
      mq[c] = real'(sum[2*c+1]) / (2.0 * np);
      a[c]  = $sqrt(mi[c] * mi[c] + mq[c] * mq[c]);
    end
    ph = $atan2(mq[0] + mq[1] + mq[2] + mq[3], mi[0] + mi[1] + mi[2] + mi[3]);
    phase_deg = ph * 180.0 / PI;
    x = (a[0] - a[2]) / (a[0] + a[2]);
    y = (a[1] - a[3]) / (a[1] + a[3]);
  endtask

  initial begin
    longint took, worst;
    real ph, x, y, ex, ey, ph_sum, ph_sq, rms, ar[N_ADC];
    rst = 1; trigger = 0; cal_trig = 0; reg_wr = 0; reg_rd = 0; reg_addr = 0; reg_wdata = 0;
    for (int c = 0; c < N_ADC; c++) begin
      iv[c] = int'($rtoi(amp[c] * $cos(PHI) + 0.5));
      qv[c] = int'($rtoi(amp[c] * $sin(PHI) + 0.5));
      ar[c] = $sqrt(real'(iv[c]) * iv[c] + real'(qv[c]) * qv[c]);
    end
    ex = (ar[0] - ar[2]) / (ar[0] + ar[2]);
    ey = (ar[1] - ar[3]) / (ar[1] + ar[3]);
    repeat (6) @(posedge pci_clk);
    rst = 0;
    repeat (6) @(posedge pci_clk);

    // A. 1 ms captures at 60 Hz
    worst = 0;
    for (int p = 0; p < 3; p++) begin
      base = 32'h1000_0000 + 32'(p) * 32'h0010_0000;
      pulse(20000, took);
      if (took > worst) worst = took;
      results(ph, x, y);
      check("1 ms pulse phase", (ph - 37.5) < 0.1 && (37.5 - ph) < 0.1);
    end
    $display("A: 1 ms capture + DMA of 8 arrays took at most %0d ADC clocks (%0.2f ms); 60 Hz allows 666667",
             worst, real'(worst) * 25.0e-6);
    check("1 ms capture and DMA within one 60 Hz period", worst < 666667);

    // B. 50 us pulse train
    ph_sum = 0; ph_sq = 0;
    for (int p = 0; p < NPULSE; p++) begin
      base = 32'h2000_0000;
      pulse(1000, took);
      results(ph, x, y);
      check("50 us pulse phase", (ph - 37.5) < 0.1 && (37.5 - ph) < 0.1);
      check("50 us pulse position", (x - ex) < 0.001 && (ex - x) < 0.001 && (y - ey) < 0.001 && (ey - y) < 0.001);
      ph_sum += ph;
      ph_sq  += ph * ph;
    end
    rms = $sqrt(ph_sq / NPULSE - (ph_sum / NPULSE) * (ph_sum / NPULSE));
    $display("B: %0d pulses of 50 us: mean phase %0.4f deg (drive 37.5), rms %0.4f deg; position x %0.4f y %0.4f (drive %0.4f %0.4f)",
             NPULSE, ph_sum / NPULSE, rms, x, y, ex, ey);
    check("no FIFO overflow", fifo_overflow == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
