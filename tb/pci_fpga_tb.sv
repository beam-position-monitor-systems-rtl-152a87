// Self-checking test of pci_fpga (the PCI card gate array with its FIFOs),
// run with 64-word FIFOs.
//
// Each array carries a counter tagged with its array number, so every
// sample says which array and which ADC clock it came from. The test writes
// the host registers, arms, fires the trigger, waits for the capture,
// starts the DMA and checks every memory write: address layout, packing,
// consecutive samples, the same start clock for all eight arrays, and the
// trigger delay. It also sends an L-bus write through to an L-bus receiver,
// reads the trigger count, and overfills the FIFOs to see the overflow flag
// set and cleared.
module pci_fpga_tb;
  import bpm_pkg::*;

  localparam int FW = 64;

  logic                  pci_clk = 0, adc_clk = 0;
  logic                  pci_rst, adc_rst;
  logic                  reg_wr, reg_rd;
  logic [7:0]            reg_addr;
  logic [31:0]           reg_wdata, reg_rdata;
  logic                  mw_valid, mw_ready;
  logic [31:0]           mw_addr, mw_data;
  logic                  trigger;
  sample_t [N_ARRAY-1:0] arr;
  logic                  arr_valid;
  logic [LBUS_W-1:0]     lb_data;
  logic                  lb_addr, lb_stb, lb_ack;
  logic [N_ARRAY-1:0]    fifo_overflow;
  logic                  dma_done;
  logic                  lw_en;
  logic [LBUS_W-1:0]     lw_addr, lw_data;
  int                    checks = 0, failures = 0;
  int                    acyc = 0;
  logic [31:0]           mem[int];

  always #12.5 adc_clk = ~adc_clk;
  always #15   pci_clk = ~pci_clk;

  pci_fpga #(.FIFO_WORDS(FW)) dut (.*);

  lbus_slave u_lbs (
    .clk (adc_clk), .rst (adc_rst), .lb_data (lb_data), .lb_addr (lb_addr), .lb_stb (lb_stb),
    .lb_ack (lb_ack), .wr_en (lw_en), .wr_addr (lw_addr), .wr_data (lw_data)
  );

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // array k carries {k, 12-bit ADC clock count}
  always @(negedge adc_clk) begin
    acyc <= acyc + 1;
    for (int k = 0; k < N_ARRAY; k++) arr[k] <= sample_t'({4'(k), 12'(acyc)});
    arr_valid <= 1'b1;
  end

  always @(negedge pci_clk) mw_ready <= ($urandom_range(4) != 0);
  always @(posedge pci_clk) if (mw_valid && mw_ready) mem[int'(mw_addr)] = mw_data;

  int n_lb = 0;
  always @(posedge adc_clk) if (lw_en) begin
    n_lb++;
    checks++;
    if (lw_addr != 12'h005 || lw_data != 12'h0a5) begin failures++; $display("L-bus got %h <= %h", lw_addr, lw_data); end
  end

  function automatic void check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction

  task automatic wreg(logic [7:0] a, logic [31:0] d);
    @(negedge pci_clk) reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge pci_clk) reg_wr = 0;
  endtask

  task automatic rreg(logic [7:0] a, output logic [31:0] d);
    @(negedge pci_clk) reg_rd = 1; reg_addr = a;
    @(negedge pci_clk) reg_rd = 0; d = reg_rdata;
  endtask

  initial begin
    logic [31:0] v, base;
    int np, dly, t_trig, first, lo, hi, w;
    pci_rst = 1; adc_rst = 1; reg_wr = 0; reg_rd = 0; reg_addr = 0; reg_wdata = 0; trigger = 0;
    repeat (5) @(posedge pci_clk);
    pci_rst = 0; adc_rst = 0;
    // L-bus
    wreg(REG_LBUS, 32'h0005_00a5);
    repeat (60) @(negedge pci_clk);
    check("L-bus write delivered once", n_lb == 1);
    rreg(REG_STATUS, v); check("L-bus idle", v[5] == 0);
    for (int run = 0; run < 3; run++) begin
      np = (run == 0) ? 5 : 8 + run * 7;
      dly = run * 4;
      base = 32'h2000_0000 + 32'(run) * 32'h1000;
      mem.delete();
      wreg(REG_NPAIRS, np);
      wreg(REG_TRIG_DLY, dly);
      wreg(REG_DMA_BASE, base);
      wreg(REG_CTRL, 32'h1);                       // arm
      repeat (10) @(negedge pci_clk);
      rreg(REG_STATUS, v); check("armed", v[1] == 1 && v[0] == 0);
      @(negedge adc_clk) trigger = 1; t_trig = acyc;
      repeat (4) @(negedge adc_clk) trigger = 0;
      do rreg(REG_STATUS, v); while (v[0] == 0);   // capture done
      wreg(REG_CTRL, 32'h2);                       // DMA
      while (!dma_done) @(posedge pci_clk);
      repeat (3) @(negedge pci_clk);
      check("write count", mem.size() == N_ARRAY * np);
      first = -1;
      for (int k = 0; k < N_ARRAY; k++)
        for (w = 0; w < np; w++) begin
          int a;
          a = int'(base) + 4 * (k * np + w);
          if (!mem.exists(a)) begin check("word present", 0); continue; end
          lo = int'(mem[a][11:0]); hi = int'(mem[a][27:16]);
          if (k == 0 && w == 0) first = lo;
          check("array tag", mem[a][15:12] == 4'(k) && mem[a][31:28] == 4'(k));
          check("consecutive samples", lo == ((first + 2 * w) & 12'hfff) && hi == ((first + 2 * w + 1) & 12'hfff));
        end
      $display("run %0d: trigger at clock %0d, first sample from clock %0d", run, t_trig, first);
      check("trigger delay", ((first - t_trig) & 12'hfff) == dly + 3);
    end
    rreg(REG_TRIG_CNT, v); check("trigger count", v == 3);
    rreg(REG_STATUS, v);   check("no overflow yet", v[4] == 0);
    // overfill: 40 pairs = 80 samples into 64-word FIFOs
    wreg(REG_NPAIRS, 40);
    wreg(REG_TRIG_DLY, 0);
    wreg(REG_CTRL, 32'h1);
    repeat (10) @(negedge pci_clk);
    @(negedge adc_clk) trigger = 1;
    repeat (4) @(negedge adc_clk) trigger = 0;
    do rreg(REG_STATUS, v); while (v[0] == 0);
    repeat (6) @(negedge pci_clk);
    rreg(REG_STATUS, v);  check("overflow reported", v[4] == 1 && fifo_overflow == '1);
    wreg(REG_CTRL, 32'h4);
    repeat (12) @(negedge pci_clk);
    rreg(REG_STATUS, v);  check("overflow cleared", v[4] == 0 && fifo_overflow == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
