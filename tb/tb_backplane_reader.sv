// tb_backplane_reader: self-checking test of the back-plane read sequencer.
// Six stand-in channels each answer their start pulse with a random number
// of random words (one of them with none) and a done pulse. The USB FIFO
// side is randomly full. Checks that the channels are started once each, in
// order, only after the previous one is done; that the USB words are exactly
// the channels' words in channel order; that nothing is written while the
// USB FIFO is full; and that done pulses once at the end.
module tb_backplane_reader;
  import ssr_pkg::*;
  localparam int unsigned N = 6;

  logic clk = 0, rst_n = 0, start = 0, done, active, usb_wr, usb_full = 0;
  logic [2:0] cur_ch;
  logic [N-1:0] ch_start, ch_valid, ch_ready, ch_done;
  logic [N-1:0][15:0] ch_data;
  logic [15:0] usb_data;
  int checks = 0, failures = 0;

  backplane_reader #(.NUM_CH(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  logic [15:0] words [N][$];
  logic [15:0] expect_q [$];
  int started [$];
  int n_done = 0;
  bit running [N];

  for (genvar k = 0; k < N; k++) begin : g_src
    logic v = 0;
    assign ch_valid[k] = running[k] && v && words[k].size() > 0;
    assign ch_data[k]  = words[k].size() > 0 ? words[k][0] : 16'h0;
    always @(posedge clk) begin
      ch_done[k] <= 1'b0;
      if (rst_n && ch_start[k]) begin
        started.push_back(k);
        check(k == 0 || !running[k-1], "start after previous channel finished");
        running[k] = 1;
      end else if (running[k]) begin
        if (ch_valid[k] && ch_ready[k]) void'(words[k].pop_front());
        if (words[k].size() == 0) begin running[k] = 0; ch_done[k] <= 1'b1; end
      end
      v <= ($urandom_range(0, 3) != 0);
    end
  end

  logic [15:0] got [$];
  always @(posedge clk) if (rst_n) begin
    if (usb_wr) begin
      check(!usb_full, "no write while USB FIFO full");
      got.push_back(usb_data);
    end
    if (done) n_done++;
    usb_full <= ($urandom_range(0, 4) == 0);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch_done = '0;
    for (int k = 0; k < N; k++) begin
      int len;
      len = (k == 3) ? 0 : $urandom_range(1, 300);
      for (int i = 0; i < len; i++) begin
        logic [15:0] w;
        w = 16'($urandom);
        words[k].push_back(w);
        expect_q.push_back(w);
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    check(!active && ch_start == '0, "idle after reset");
    start = 1; @(negedge clk); start = 0;
    while (n_done == 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check(n_done == 1, "one done pulse");
    check(started.size() == N, $sformatf("%0d channels started", started.size()));
    for (int i = 0; i < started.size(); i++) check(started[i] == i, "channel order");
    check(got.size() == expect_q.size(), $sformatf("%0d words, expected %0d", got.size(), expect_q.size()));
    for (int i = 0; i < got.size() && i < expect_q.size(); i++)
      if (got[i] != expect_q[i]) begin check(0, $sformatf("word %0d", i)); break; end
    check(!active, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
