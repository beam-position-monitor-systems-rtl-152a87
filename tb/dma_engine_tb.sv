// Self-checking test of dma_engine.
//
// Eight first-word-fall-through FIFOs are modelled here as queues that fill
// at random while the DMA runs. The memory port accepts writes with random
// back-pressure. Every write must land at base + 4*(k*npairs + w) for word w
// of array k, carry samples 2w and 2w+1 of that array (the earlier one in
// bits 15:0), and the engine must read nothing from an empty FIFO, report
// done once, and take at least two clocks per word.
module dma_engine_tb;
  import bpm_pkg::*;

  localparam int NF = 8;

  logic                          clk = 0;
  logic                          rst, start;
  logic [31:0]                   base;
  logic [NPAIRS_W-1:0]           npairs;
  logic [NF-1:0]                 fifo_empty, fifo_rd;
  logic [NF-1:0][SAMPLE_W-1:0]   fifo_data;
  logic                          mw_valid, mw_ready, busy, done;
  logic [31:0]                   mw_addr, mw_data;
  int                            checks = 0, failures = 0;
  logic [15:0]                   q[NF][$];
  int                            produced[NF];
  int                            nwrites = 0, ndone = 0, stalls = 0, cyc = 0;

  always #15 clk = ~clk;

  dma_engine #(.NFIFO(NF)) dut (.*);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample value j of array k
  function automatic logic [15:0] sval(int k, int j);
    return 16'(k * 4096 + j * 7 + 3);
  endfunction

  always_comb
    for (int k = 0; k < NF; k++) begin
      fifo_empty[k] = (q[k].size() == 0);
      fifo_data[k]  = fifo_empty[k] ? 16'h0 : q[k][0];
    end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int k = 0; k < NF; k++)
      if (fifo_rd[k]) begin
        if (q[k].size() == 0) begin failures++; $display("read of empty FIFO %0d", k); end
        else void'(q[k].pop_front());
      end
    if (mw_valid && !mw_ready) stalls <= stalls + 1;
    if (done) ndone <= ndone + 1;
  end

  // producer: FIFOs fill at random
  bit filling = 0;
  int target = 0;
  always @(negedge clk)
    if (filling)
      for (int k = 0; k < NF; k++)
        if (produced[k] < target && $urandom_range(1)) begin
          q[k].push_back(sval(k, produced[k]));
          produced[k]++;
        end

  always @(negedge clk) mw_ready <= ($urandom_range(3) != 0);

  // checker
  int exp_k = 0, exp_w = 0;
  always @(posedge clk)
    if (!rst && mw_valid && mw_ready) begin
      checks++;
      nwrites <= nwrites + 1;
      if (mw_addr !== base + 32'(4 * (exp_k * int'(npairs) + exp_w)) ||
          mw_data !== {sval(exp_k, 2*exp_w + 1), sval(exp_k, 2*exp_w)}) begin
        failures++;
        if (failures < 10)
          $display("array %0d word %0d: got @%h %h", exp_k, exp_w, mw_addr, mw_data);
      end
      if (exp_w + 1 == int'(npairs)) begin exp_w = 0; exp_k++; end
      else exp_w++;
    end

  initial begin
    int np, t0;
    rst = 1; start = 0; base = 0; npairs = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int run = 0; run < 4; run++) begin
      np = (run == 0) ? 1 : 1 + int'($urandom_range(60));
      npairs = NPAIRS_W'(np);
      base = 32'h1000_0000 + 32'($urandom_range(1000)) * 4;
      for (int k = 0; k < NF; k++) produced[k] = 0;
      target = 2 * np;
      exp_k = 0; exp_w = 0; nwrites = 0; ndone = 0;
      filling = 1;
      @(negedge clk) start = 1;
      t0 = cyc;
      @(negedge clk) start = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      filling = 0;
      checks++;
      if (nwrites != NF * np || ndone != 1) begin
        failures++;
        $display("run %0d: %0d writes, done %0d times", run, nwrites, ndone);
      end
      checks++;
      if (cyc - t0 < 2 * NF * np) failures++;
      for (int k = 0; k < NF; k++) begin
        checks++;
        if (q[k].size() != 0) failures++;
      end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("memory back-pressure cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
