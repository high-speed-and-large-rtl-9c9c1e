// tb_frame_formatter: self-checking test of the word formatter.
// Random windows of random samples; every written word is compared with a
// reference list built from the driven samples: 0000b & sample per window
// clock, then after group_end the five mark words time[15:0], time[31:16],
// time[47:32], 0000h, FFFFh with the time given at group_end. Also checks the
// one-clock latency and the busy flag.
module tb_frame_formatter;
  import ssr_pkg::*;

  logic clk = 0, rst_n = 0, window = 0, group_end = 0;
  logic [ADC_BITS-1:0]  adc_data = '0;
  logic [TIME_BITS-1:0] time_cnt = '0;
  logic wr_en, busy;
  logic [WORD_BITS-1:0] wr_data;
  int checks = 0, failures = 0;
  logic [15:0] expq [$];
  longint cyc = 0, last_in = -1, last_out = -1;

  frame_formatter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (window) last_in = cyc;
    if (wr_en) begin
      logic [15:0] e;
      if (expq.size() == 0) check(0, "unexpected word");
      else begin
        e = expq.pop_front();
        check(wr_data == e, $sformatf("word %h expected %h", wr_data, e));
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    for (int g = 0; g < 40; g++) begin
      int n;
      logic [47:0] t;
      n = 1 + $urandom_range(0, 60);
      for (int i = 0; i < n; i++) begin
        window = 1;
        adc_data = ADC_BITS'($urandom);
        expq.push_back({4'h0, adc_data});
        @(negedge clk);
        check(wr_en && wr_data == {4'h0, adc_data}, "one clock latency");
      end
      window = 0;
      t = {$urandom, $urandom};
      time_cnt = t;
      group_end = 1;
      expq.push_back(t[15:0]); expq.push_back(t[31:16]); expq.push_back(t[47:32]);
      expq.push_back(16'h0000); expq.push_back(16'hFFFF);
      @(negedge clk);
      group_end = 0;
      time_cnt = '1;               // only the value at group_end counts
      check(busy, "busy during the mark");
      repeat (5) @(negedge clk);
      check(!busy, "busy ends after five mark words");
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d words missing", expq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
