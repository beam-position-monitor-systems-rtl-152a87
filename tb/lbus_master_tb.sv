// Self-checking test of lbus_master, run against lbus_slave on an unrelated
// clock (PCI-side clock 30 ns, DFE clock 25 ns).
//
// Random register writes are offered with random gaps; every write must come
// out of the slave exactly once, in order, with its address and data, and
// the master must not accept a new write before the last one completed.
module lbus_master_tb;
  import bpm_pkg::*;

  logic              mclk = 0, sclk = 0;
  logic              rst;
  logic              req, ready;
  logic [LBUS_W-1:0] req_addr, req_data;
  logic [LBUS_W-1:0] lb_data, wr_addr, wr_data;
  logic              lb_addr, lb_stb, lb_ack, wr_en;
  int                checks = 0, failures = 0;
  logic [2*LBUS_W-1:0] sent[$];
  int                nsent = 0, nrecv = 0;

  always #15 mclk = ~mclk;
  always #12.5 sclk = ~sclk;

  lbus_master u_m (
    .clk (mclk), .rst (rst), .req (req), .req_addr (req_addr), .req_data (req_data),
    .ready (ready), .lb_data (lb_data), .lb_addr (lb_addr), .lb_stb (lb_stb), .lb_ack (lb_ack)
  );

  lbus_slave u_s (
    .clk (sclk), .rst (rst), .lb_data (lb_data), .lb_addr (lb_addr), .lb_stb (lb_stb),
    .lb_ack (lb_ack), .wr_en (wr_en), .wr_addr (wr_addr), .wr_data (wr_data)
  );

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave side scoreboard
  always @(posedge sclk) begin
    if (!rst && wr_en) begin
      checks++;
      nrecv++;
      if (sent.size() == 0) begin
        failures++;
        $display("unexpected write %h <= %h", wr_addr, wr_data);
      end else begin
        logic [2*LBUS_W-1:0] e;
        e = sent.pop_front();
        if ({wr_addr, wr_data} !== e) begin
          failures++;
          $display("got %h <= %h, want %h <= %h", wr_addr, wr_data, e[2*LBUS_W-1:LBUS_W], e[LBUS_W-1:0]);
        end
      end
    end
  end

  initial begin
    int cyc;
    rst = 1; req = 0; req_addr = 0; req_data = 0;
    repeat (4) @(posedge mclk);
    @(negedge mclk) rst = 0;
    for (int n = 0; n < 200; n++) begin
      repeat ($urandom_range(3)) @(negedge mclk);
      req      = 1;
      req_addr = LBUS_W'($urandom);
      req_data = LBUS_W'($urandom);
      cyc = 0;
      // wait until the master takes it
      while (!ready) begin @(negedge mclk); cyc++; end
      @(posedge mclk);
      sent.push_back({req_addr, req_data});
      nsent++;
      @(negedge mclk) req = 0;
      // once taken, the request port may change at once
      req_addr = LBUS_W'($urandom);
      req_data = LBUS_W'($urandom);
      // the master must now be busy for the two handshakes
      checks++;
      if (ready) begin failures++; $display("ready right after a request"); end
    end
    while (ready !== 1'b1 || lb_ack) @(negedge mclk);
    repeat (10) @(negedge mclk);
    checks++;
    if (nrecv != nsent || sent.size() != 0) begin
      failures++;
      $display("sent %0d received %0d", nsent, nrecv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
