// Self-checking test of acq_ctrl.
//
// Checks: a trigger while not armed writes nothing but is counted; after
// arming, a trigger edge starts exactly 2*npairs writes, the first one
// trig_dly + 3 clocks after the edge reaches the input; samples marked not
// valid are skipped and the window is stretched accordingly; `done` is set
// at the end and cleared by the next arm.
module acq_ctrl_tb;
  import bpm_pkg::*;

  logic                clk = 0;
  logic                rst, arm, trigger, data_valid;
  logic [NPAIRS_W-1:0] npairs;
  logic [15:0]         trig_dly;
  logic                fifo_wr, armed, busy, done;
  logic [15:0]         trig_cnt;
  int                  checks = 0, failures = 0;
  int                  cyc = 0;
  int                  nwr = 0, first_wr = -1;
  bit                  gaps = 0;

  always #12.5 clk = ~clk;

  acq_ctrl dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_wr) begin
      nwr <= nwr + 1;
      if (first_wr < 0) first_wr <= cyc;
    end
  end

  always @(negedge clk) data_valid <= gaps ? ($urandom_range(3) != 0) : 1'b1;

  function automatic void check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endfunction

  task automatic pulse_trigger(output int at);
    @(negedge clk) trigger = 1;
    at = cyc;       // the first rising clock edge that sees the trigger high
    repeat (3) @(negedge clk);
    trigger = 0;
  endtask

  initial begin
    int t0, np, dly, c0;
    rst = 1; arm = 0; trigger = 0; npairs = 4; trig_dly = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // unarmed trigger
    pulse_trigger(t0);
    repeat (10) @(negedge clk);
    check("unarmed: no writes", nwr == 0 && !busy && !armed);
    check("unarmed trigger counted", trig_cnt == 1);
    for (int run = 0; run < 12; run++) begin
      np  = 1 + int'($urandom_range(40));
      dly = (run == 0) ? 0 : int'($urandom_range(30));
      gaps = (run % 3 == 2);
      npairs = NPAIRS_W'(np); trig_dly = 16'(dly);
      nwr = 0; first_wr = -1;
      @(negedge clk) arm = 1;
      @(negedge clk) arm = 0;
      check("armed", armed && !done);
      repeat ($urandom_range(5)) @(negedge clk);
      c0 = trig_cnt;
      pulse_trigger(t0);
      while (!done) @(negedge clk);
      @(negedge clk);
      check("write count", nwr == 2 * np);
      if (!gaps) check("trigger to first write", first_wr - t0 == dly + 3);
      else       check("trigger to first write, gaps", first_wr - t0 >= dly + 3);
      check("trigger counted", trig_cnt == 16'(c0 + 1));
      // a second trigger after the window writes nothing
      nwr = 0;
      pulse_trigger(t0);
      repeat (dly + 8) @(negedge clk);
      check("after done: no writes", nwr == 0 && done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
