// tb_acq_timing: self-checking test of the acquisition time sequence.
// Drives S2, DG and PWS on the falling clock edge and checks, from the clock
// at which each input changed: the window opens DELAY + 2 clocks after a DG
// trailing edge (two clocks of input synchronisation), with the delay chosen
// by PWS; it stays open until two clocks after the DG rising edge; group_end
// pulses once per window; a DG rising edge inside the delay cancels the
// window; S2 low or arm low keeps the window shut; the time count advances by
// one per clock while S2 is high and is zero while S2 is low.
module tb_acq_timing;
  import ssr_pkg::*;

  localparam int unsigned D1 = 12, D2 = 30, SYNC = 2;

  logic clk = 0, rst_n = 0, arm = 0, s2 = 0, dg = 1, pws = 0;
  logic s2_s, window, group_end;
  logic [TIME_BITS-1:0] time_cnt;
  int checks = 0, failures = 0;
  longint cyc = 0;

  acq_timing #(.DELAY1_CYC(D1), .DELAY2_CYC(D2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  // monitor window edges and group_end pulses
  longint win_rise = -1, win_fall = -1;
  int     n_groups = 0, n_rises = 0;
  logic   win_q = 0;
  always @(posedge clk) begin
    if (window && !win_q) begin win_rise = cyc; n_rises++; end
    if (!window && win_q) win_fall = cyc;
    if (group_end) begin
      n_groups++;
      check(!window && win_q === 1'b0 || !window, "group_end while window open");
    end
    win_q <= window;
  end

  // one DG period: DG low for `low` clocks after the call, then high for `high`
  task automatic dg_period(input int low, input int high, input bit pws_v,
                           input bit expect_win);
    longint t_fall, t_rise;
    int d, g0;
    d  = pws_v ? D2 : D1;
    g0 = n_groups;
    @(negedge clk); pws = pws_v;
    repeat (3) @(negedge clk);
    dg = 0; t_fall = cyc;
    win_rise = -1; win_fall = -1;
    repeat (low) @(negedge clk);
    dg = 1; t_rise = cyc;
    repeat (high) @(negedge clk);
    if (expect_win) begin
      check(win_rise == t_fall + SYNC + d, $sformatf("window open at %0d, expected %0d", win_rise - t_fall, SYNC + d));
      check(win_fall == t_rise + SYNC + 1, $sformatf("window close at %0d after DG rise", win_fall - t_rise));
      check(n_groups == g0 + 1, "one group_end per window");
    end else begin
      check(win_rise == -1, "no window expected");
      check(n_groups == g0, "no group_end expected");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0; logic [TIME_BITS-1:0] tc0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // S2 low: nothing, time zero
    dg_period(50, 20, 0, 0);
    check(time_cnt == 0, "time count zero while S2 low");
    arm = 1;
    dg_period(50, 20, 0, 0);
    @(negedge clk); s2 = 1;
    repeat (5) @(negedge clk);
    check(s2_s == 1, "S2 synchronised");
    tc0 = time_cnt; t0 = cyc;
    repeat (37) @(negedge clk);
    check(time_cnt - tc0 == TIME_BITS'(cyc - t0), "time count one LSB per clock");
    // PWS low and high delays, various widths
    dg_period(60, 20, 0, 1);
    dg_period(60, 20, 1, 1);
    dg_period(D1 + 1, 10, 0, 1);
    dg_period(200, 15, 1, 1);
    dg_period(45, 30, 0, 1);
    // DG rises during the delay: window cancelled
    dg_period(D2 - 5, 20, 1, 0);
    dg_period(D1 - 2, 20, 0, 0);
    // arm low: no window
    arm = 0;
    dg_period(60, 20, 0, 0);
    arm = 1;
    dg_period(60, 20, 1, 1);
    // S2 falls inside a window: window closes with a group_end
    begin
      int g0;
      g0 = n_groups;
      @(negedge clk); dg = 0;
      repeat (D1 + 20) @(negedge clk);
      check(window == 1, "window open before S2 drop");
      s2 = 0;
      repeat (4) @(negedge clk);
      check(window == 0, "S2 low closes the window");
      check(n_groups == g0 + 1, "S2 drop gives group_end");
      check(time_cnt == 0, "time count cleared when S2 low");
      dg = 1;
      repeat (10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
