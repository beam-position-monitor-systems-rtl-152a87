// Self-checking test of lbus_slave. The testbench plays the bus master: it
// drives address and data words with the four-phase strobe/acknowledge
// handshake, on its own timing, and checks that each data word produces
// exactly one write strobe with the last address, that an address word
// alone writes nothing, and that the acknowledge follows the strobe.
module lbus_slave_tb;
  import bpm_pkg::*;

  logic              clk = 0;
  logic              rst;
  logic [LBUS_W-1:0] lb_data, wr_addr, wr_data;
  logic              lb_addr, lb_stb, lb_ack, wr_en;
  int                checks = 0, failures = 0;
  int                nwr = 0;
  logic [LBUS_W-1:0] last_a, last_d;

  always #12.5 clk = ~clk;

  lbus_slave dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && wr_en) begin
      nwr++;
      last_a <= wr_addr;
      last_d <= wr_data;
    end
  end

  task automatic send_word(logic is_addr, logic [LBUS_W-1:0] w);
    int n;
    #($urandom_range(40));
    lb_data = w; lb_addr = is_addr;
    #($urandom_range(10));
    lb_stb = 1;
    n = 0;
    while (!lb_ack && n < 100) begin #7; n++; end
    checks++;
    if (!lb_ack) begin failures++; $display("no acknowledge"); end
    #($urandom_range(20));
    lb_stb = 0;
    n = 0;
    while (lb_ack && n < 100) begin #7; n++; end
    checks++;
    if (lb_ack) begin failures++; $display("acknowledge stuck"); end
  endtask

  initial begin
    logic [LBUS_W-1:0] a, d;
    int n_prev;
    rst = 1; lb_data = 0; lb_addr = 0; lb_stb = 0;
    repeat (4) @(posedge clk);
    #3 rst = 0;
    for (int n = 0; n < 150; n++) begin
      a = LBUS_W'($urandom);
      d = LBUS_W'($urandom);
      n_prev = nwr;
      send_word(1'b1, a);
      repeat (2) @(posedge clk);
      checks++;
      if (nwr != n_prev) begin failures++; $display("address word wrote"); end
      // sometimes write the same address twice
      for (int k = 0; k < ((n % 4 == 0) ? 2 : 1); k++) begin
        d = LBUS_W'($urandom);
        n_prev = nwr;
        send_word(1'b0, d);
        repeat (2) @(posedge clk);
        checks++;
        if (nwr != n_prev + 1 || last_a !== a || last_d !== d) begin
          failures++;
          $display("write %0d: count %0d->%0d, got %h <= %h, want %h <= %h", n, n_prev, nwr, last_a, last_d, a, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
