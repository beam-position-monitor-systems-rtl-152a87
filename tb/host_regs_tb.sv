// Self-checking test of host_regs: reset values, read-back of the
// read/write registers, the limits on the pair count, the one-clock command
// pulses, the status word and the hand-off of L-bus writes (one request per
// register write, none while the L-bus is busy).
module host_regs_tb;
  import bpm_pkg::*;

  logic                clk = 0;
  logic                rst, wr, rd;
  logic [7:0]          addr;
  logic [31:0]         wdata, rdata;
  logic                arm_pulse, dma_start, ovf_clr;
  logic [NPAIRS_W-1:0] npairs;
  logic [15:0]         trig_dly;
  logic [31:0]         dma_base;
  logic                lb_req;
  logic [LBUS_W-1:0]   lb_req_addr, lb_req_data;
  logic                acq_done, acq_armed, acq_busy, dma_busy, fifo_ovf, lb_ready;
  logic [15:0]         trig_cnt;
  int                  checks = 0, failures = 0;
  int                  n_arm = 0, n_dma = 0, n_clr = 0, n_lb = 0;

  always #15 clk = ~clk;

  host_regs dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (arm_pulse) n_arm++;
    if (dma_start) n_dma++;
    if (ovf_clr)   n_clr++;
    if (lb_req && lb_ready) n_lb++;
  end

  function automatic void check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction

  task automatic wreg(logic [7:0] a, logic [31:0] d);
    @(negedge clk) wr = 1; addr = a; wdata = d;
    @(negedge clk) wr = 0;
  endtask

  task automatic rreg(logic [7:0] a, output logic [31:0] d);
    @(negedge clk) rd = 1; addr = a;
    @(negedge clk) rd = 0; d = rdata;
  endtask

  initial begin
    logic [31:0] v;
    rst = 1; wr = 0; rd = 0; addr = 0; wdata = 0;
    acq_done = 0; acq_armed = 0; acq_busy = 0; dma_busy = 0; fifo_ovf = 0; lb_ready = 1;
    trig_cnt = 16'd77;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    rreg(REG_NPAIRS, v);   check("npairs reset 20000", v == 20000);
    rreg(REG_TRIG_CNT, v); check("trigger count", v == 77);
    for (int k = 0; k < 50; k++) begin
      logic [31:0] d;
      d = $urandom;
      wreg(REG_TRIG_DLY, d); rreg(REG_TRIG_DLY, v); check("trig_dly", v == {16'd0, d[15:0]} && trig_dly == d[15:0]);
      d = $urandom;
      wreg(REG_DMA_BASE, d); rreg(REG_DMA_BASE, v); check("dma base", v == {d[31:2], 2'b00} && dma_base == v);
      d = 32'($urandom_range(65536, 1));
      wreg(REG_NPAIRS, d);   rreg(REG_NPAIRS, v);   check("npairs", v == d && npairs == d[NPAIRS_W-1:0]);
    end
    wreg(REG_NPAIRS, 0);       check("npairs min", npairs == 1);
    wreg(REG_NPAIRS, 100000);  check("npairs max", npairs == NPAIRS_W'(FIFO_DEPTH / 2));
    // command pulses
    wreg(REG_CTRL, 32'h1); wreg(REG_CTRL, 32'h2); wreg(REG_CTRL, 32'h4); wreg(REG_CTRL, 32'h7);
    repeat (2) @(negedge clk);
    check("pulses", n_arm == 2 && n_dma == 2 && n_clr == 2);
    // status
    {acq_done, acq_armed, acq_busy, dma_busy, fifo_ovf} = 5'b10101;
    rreg(REG_STATUS, v); check("status a", v == 32'b010101);
    {acq_done, acq_armed, acq_busy, dma_busy, fifo_ovf} = 5'b01010;
    lb_ready = 0;
    rreg(REG_STATUS, v); check("status b", v == 32'b101010);
    // L-bus request while busy is ignored
    wreg(REG_LBUS, 32'h0123_0456);
    repeat (3) @(negedge clk);
    check("no request while busy", !lb_req && n_lb == 0);
    lb_ready = 1;
    wreg(REG_LBUS, 32'h0abc_0def);
    check("request", lb_req && lb_req_addr == 12'habc && lb_req_data == 12'hdef);
    @(negedge clk);
    check("one request", !lb_req && n_lb == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
