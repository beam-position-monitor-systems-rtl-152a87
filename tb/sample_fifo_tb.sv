// Self-checking test of sample_fifo with a small depth (16 words), the
// write clock at 40 MHz and the read clock at 33 MHz.
//
// Phases: fill until full (exactly DEPTH words must go in, then `full`);
// a further write is dropped and sets `overflow`, which clears on
// `ovf_clr`; drain until empty; then random traffic on both sides. Every
// word read is compared, in order, with a reference queue of the words
// written.
module sample_fifo_tb;

  localparam int DEPTH = 16;

  logic        wr_clk = 0, rd_clk = 0;
  logic        wr_rst, rd_rst;
  logic        wr_en, rd_en, full, empty, overflow, ovf_clr;
  logic [15:0] wr_data, rd_data;
  int          checks = 0, failures = 0;
  logic [15:0] model[$];
  int          nread = 0;
  bit          rand_rd = 0, drain = 0;

  always #12.5 wr_clk = ~wr_clk;
  always #15   rd_clk = ~rd_clk;

  sample_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  always @(negedge rd_clk) begin
    rd_en <= 1'b0;
    if (!rd_rst && !empty && (drain || (rand_rd && $urandom_range(2) != 0))) begin
      checks++;
      if (model.size() == 0 || rd_data !== model[0]) begin
        failures++;
        $display("read %0d: got %h want %h", nread, rd_data, model.size() ? model[0] : 16'hxxxx);
      end
      if (model.size() != 0) void'(model.pop_front());
      nread++;
      rd_en <= 1'b1;
    end
  end

  task automatic write_word(logic [15:0] d);
    @(negedge wr_clk);
    wr_en = 1; wr_data = d;
    if (!full) model.push_back(d);
    @(negedge wr_clk) wr_en = 0;
  endtask

  initial begin
    int nin;
    wr_rst = 1; rd_rst = 1; wr_en = 0; wr_data = 0; ovf_clr = 0;
    repeat (4) @(posedge rd_clk);
    @(negedge wr_clk) wr_rst = 0;
    @(negedge rd_clk) rd_rst = 0;
    checks++;
    if (!empty || full || overflow) failures++;
    // fill
    nin = 0;
    while (!full && nin < DEPTH + 4) begin
      write_word(16'($urandom));
      nin++;
    end
    checks++;
    if (nin != DEPTH) begin failures++; $display("full after %0d words", nin); end
    checks++;
    if (overflow) failures++;
    write_word(16'hdead);   // dropped
    checks++;
    if (!overflow) begin failures++; $display("no overflow"); end
    @(negedge wr_clk) ovf_clr = 1;
    @(negedge wr_clk) ovf_clr = 0;
    checks++;
    if (overflow) failures++;
    // drain
    repeat (6) @(negedge rd_clk);
    checks++;
    if (empty) failures++;
    drain = 1;
    repeat (DEPTH * 2 + 10) @(negedge rd_clk);
    drain = 0;
    checks++;
    if (!empty || model.size() != 0 || nread != DEPTH) begin
      failures++;
      $display("after drain: empty %b left %0d read %0d", empty, model.size(), nread);
    end
    // random traffic
    rand_rd = 1;
    for (int k = 0; k < 3000; k++) begin
      if ($urandom_range(2) != 0) write_word(16'($urandom));
      else @(negedge wr_clk);
    end
    rand_rd = 0;
    drain = 1;
    repeat (DEPTH * 3 + 10) @(negedge rd_clk);
    checks++;
    if (model.size() != 0 || !empty) begin failures++; $display("%0d words lost", model.size()); end
    $display("words read: %0d", nread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
