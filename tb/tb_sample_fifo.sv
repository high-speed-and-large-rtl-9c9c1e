// tb_sample_fifo: self-checking test of the burst FIFO.
// Random pushes and pops against a reference queue: data order, rd_valid,
// level, full, the sticky overflow flag (and that an overflowing word is
// dropped), and clear. A burst of one word per clock drained one word per six
// clocks shows the FIFO absorbing the rate difference of the recorder.
module tb_sample_fifo;
  localparam int unsigned DEPTH = 64;

  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic full, overflow, rd_valid;
  logic [$clog2(DEPTH+1):0] level;
  int checks = 0, failures = 0;
  logic [15:0] q [$];

  sample_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // reference model, updated on the clock edge
  always @(posedge clk) if (rst_n && !clr) begin
    if (rd_en && rd_valid) begin
      logic [15:0] e;
      e = q.pop_front();
      check(rd_data == e, $sformatf("read %h expected %h", rd_data, e));
    end
    if (wr_en && q.size() < DEPTH + 1 && !full) q.push_back(wr_data);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(!rd_valid && level == 0 && !overflow, "empty after reset");
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      wr_en   = ($urandom_range(0, 99) < 45);
      wr_data = 16'($urandom);
      rd_en   = ($urandom_range(0, 99) < 50);
      @(negedge clk);
      check(level == q.size(), $sformatf("level %0d expected %0d", level, q.size()));
    end
    wr_en = 0; rd_en = 1;
    repeat (DEPTH + 4) @(negedge clk);
    check(!rd_valid && q.size() == 0, "drained");
    check(!overflow, "no overflow yet");
    rd_en = 0;
    // burst in at 1 word/clock, out at 1 word/6 clocks: 70 words overflow 64+
    for (int i = 0; i < 80; i++) begin
      wr_en = 1; wr_data = 16'(i);
      rd_en = (i % 6 == 5);
      @(negedge clk);
    end
    wr_en = 0; rd_en = 0;
    @(negedge clk);
    check(full, "full after burst");
    check(overflow, "overflow flagged");
    check(level == DEPTH + 1, "level at depth plus output register");
    rd_en = 1;
    repeat (DEPTH + 2) @(negedge clk);
    rd_en = 0;
    check(q.size() == 0 && !rd_valid, "all kept words read");
    check(overflow, "overflow is sticky");
    // clear
    wr_en = 1; @(negedge clk); wr_en = 0;
    clr = 1; @(negedge clk); clr = 0;
    q.delete();
    @(negedge clk);
    check(!overflow && level == 0 && !rd_valid, "clear empties and clears overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
