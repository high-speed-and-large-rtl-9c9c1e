// tb_ssr_full: one complete operation of the recorder at its full size: all
// parameters at their defaults (three cards, six channels, eight 128 MByte
// chips of 2 kByte pages per channel, 16K-word FIFOs, 1 us / 2 us delays),
// flash models with a 700 us programming time and 25 us read time.
// Sequence: erase every block, record ten DG periods with windows of about
// 2500 samples (about 24 pages per channel, three rounds of the eight chips)
// with both PWS settings, then read all six channels back over the USB side.
// The data checks are those of tb_ssr_top: ramps per channel must come back
// as runs of consecutive samples of length (DG low time - delay + 1), sampled
// in the same clock on every channel, each followed by its time and frame
// synchronisation mark; the time marks must step by the DG period.
// The read rate over all channels must exceed 10 MByte/s.
module tb_ssr_full;
  import ssr_pkg::*;

  localparam int unsigned NCARD = 3, NCH = 2 * NCARD, NCHIP = 8;
  localparam int unsigned PB = 2048, PPC = 65536, PPB = 64;
  localparam int unsigned D1 = 60, D2 = 120;
  localparam int unsigned PW = PB / 2;
  localparam int unsigned T_PROG = 42000, T_READ = 1500, T_ERASE = 120;

  logic clk = 0, rst_n = 0, s2 = 0, dg = 1, pws = 0;
  logic [NCH-1:0][ADC_BITS-1:0] adc_data;
  logic cmd_erase = 0, cmd_read = 0, cmd_check = 0, check_done = 0, check_req;
  mode_e mode;
  logic [$clog2(NCH)-1:0] read_ch;
  logic [15:0] usb_data;
  logic usb_wr, usb_full = 0;
  logic [NCH-1:0] ch_overflow, ch_full, ch_stall;
  logic [NCH-1:0][31:0] ch_page_count;
  logic [NCH-1:0][NCHIP-1:0] nand_ce_n, nand_rb_n;
  logic [NCH-1:0] nand_cle, nand_ale, nand_we_n, nand_re_n, nand_io_oe;
  logic [NCH-1:0][7:0] nand_io_out, nand_io_in;
  int unsigned errs [NCH];
  int checks = 0, failures = 0;
  longint read_cycles = 0, tot_bytes = 0;
  longint cyc = 0;

  ssr_top dut (.*);

  for (genvar k = 0; k < NCH; k++) begin : g_arr
    nand_array_model #(.NUM_CHIPS(NCHIP), .PAGE_BYTES(PB), .PAGES(PPC), .PAGES_PER_BLK(PPB),
                       .T_PROG(T_PROG), .T_READ(T_READ), .T_ERASE(T_ERASE)) u_arr (
      .clk, .ce_n(nand_ce_n[k]), .cle(nand_cle[k]), .ale(nand_ale[k]), .we_n(nand_we_n[k]),
      .re_n(nand_re_n[k]), .io_from_ctrl(nand_io_out[k]), .io_oe(nand_io_oe[k]),
      .io_to_ctrl(nand_io_in[k]), .rb_n(nand_rb_n[k]), .errors(errs[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // A/D ramps, changing on the falling edge
  always @(negedge clk)
    for (int k = 0; k < NCH; k++) adc_data[k] <= ADC_BITS'(cyc * 3 + k * 517);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  // mechanism counters
  int n_win = 0, n_cancel = 0, n_d1 = 0, n_d2 = 0, n_wrap = 0, n_stall = 0;
  int n_ovf = 0, n_full = 0, n_mode [5];
  mode_e mode_q = MODE_HOLD;
  logic [NCH-1:0] stall_q = '0, ovf_q = '0, full_q = '0;
  always @(posedge clk) if (rst_n) begin
    if (mode != mode_q) n_mode[int'(mode)]++;
    mode_q <= mode;
    for (int k = 0; k < NCH; k++) begin
      if (ch_stall[k] && !stall_q[k]) n_stall++;
      if (ch_overflow[k] && !ovf_q[k]) n_ovf++;
      if (ch_full[k] && !full_q[k]) n_full++;
    end
    stall_q <= ch_stall; ovf_q <= ch_overflow; full_q <= ch_full;
  end
  // chip 0 of channel 0 programmed again after chips 1..7: circulatory wrap
  int prog_on0 = 0;
  always @(posedge nand_we_n[0])
    if (nand_cle[0] && nand_io_out[0] == 8'h10 && !nand_ce_n[0][0]) begin
      prog_on0++;
      if (prog_on0 >= 2) n_wrap++;
    end

  // USB side: collect words per channel
  logic [15:0] rx [NCH][$];
  always @(posedge clk) if (rst_n) begin
    if (usb_wr) begin
      check(!usb_full, "no USB write while full");
      rx[read_ch].push_back(usb_data);
    end
    usb_full <= 1'b0;
  end

  task automatic pulse_cmd(ref logic c);
    @(negedge clk); c = 1; @(negedge clk); c = 0;
  endtask

  task automatic wait_mode(input mode_e m, input int max_cyc);
    int n;
    n = 0;
    while (mode != m && n < max_cyc) begin @(negedge clk); n++; end
    check(mode == m, $sformatf("mode %0d reached", m));
  endtask

  task automatic read_all();
    for (int k = 0; k < NCH; k++) rx[k].delete();
    pulse_cmd(cmd_read);
    check(mode == MODE_READ, "read mode");
    wait_mode(MODE_HOLD, 3000000);
  endtask

  // expected group lengths and DG periods of the run
  int exp_len [$];
  longint fall_t [$];   // clock of each DG rising edge that ends a window

  task automatic dg_period(input int low, input int high, input bit pws_v);
    int d;
    d = pws_v ? D2 : D1;
    @(negedge clk); pws = pws_v;
    repeat (2) @(negedge clk);
    dg = 0;
    if (low >= d) begin
      exp_len.push_back(low - d + 1); n_win++;
      if (pws_v) n_d2++; else n_d1++;
    end else n_cancel++;
    repeat (low) @(negedge clk);
    dg = 1;
    if (low >= d) fall_t.push_back(cyc);
    repeat (high - 3) @(negedge clk);
  endtask

  // undo the inverted page order of one channel's read stream
  task automatic unpage(input int k, output logic [15:0] w [$]);
    int n, np, lastw, pos;
    w.delete();
    n = rx[k].size();
    if (n == 0) return;
    np = (n + PW - 1) / PW;
    lastw = n - (np - 1) * PW;
    // stream = page np-1 (lastw words), page np-2, ..., page 0
    for (int p = 0; p < np; p++) begin
      pos = lastw + (np - 2 - p) * PW;
      if (p == np - 1) pos = 0;
      for (int j = 0; j < ((p == np - 1) ? lastw : PW); j++) w.push_back(rx[k][pos + j]);
    end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w [NCH][$];
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(mode == MODE_HOLD, "holding after reset");

    // erase
    pulse_cmd(cmd_erase);
    check(mode == MODE_ERASE, "erase mode");
    wait_mode(MODE_HOLD, 2000000);

    // recording run
    @(negedge clk); s2 = 1;
    repeat (10) @(negedge clk);
    check(mode == MODE_RECORD, "recording on S2");
    for (int i = 0; i < 10; i++) begin
      int low;
      low = $urandom_range(2400, 2600);
      dg_period(low, 12000, i % 2);
    end
    @(negedge clk); s2 = 0;
    wait_mode(MODE_HOLD, 2000000);
    for (int k = 0; k < NCH; k++) check(!ch_overflow[k], "no overflow in the run");

    begin
      longint t0;
      t0 = cyc;
      read_all();
      read_cycles = cyc - t0;
      tot_bytes = 0;
      for (int k = 0; k < NCH; k++) tot_bytes += 2 * rx[k].size();
    end
    for (int k = 0; k < NCH; k++) unpage(k, w[k]);
    // parse every channel group by group
    for (int k = 0; k < NCH; k++) begin
      int pos;
      longint t_prev;
      int off_prev;
      pos = 0; t_prev = -1; off_prev = -1;
      check(w[k].size() == exp_len.sum() + 5 * exp_len.size(),
            $sformatf("channel %0d: %0d words, expected %0d", k, w[k].size(), exp_len.sum() + 5 * exp_len.size()));
      for (int g = 0; g < exp_len.size() && pos + exp_len[g] + 5 <= w[k].size(); g++) begin
        bit ramp_ok;
        longint t;
        int off;
        ramp_ok = 1;
        for (int j = 0; j < exp_len[g]; j++) begin
          if (w[k][pos + j][15:12] != 4'h0) ramp_ok = 0;
          if (j > 0 && w[k][pos + j][11:0] != 12'(w[k][pos + j - 1][11:0] + 3)) ramp_ok = 0;
        end
        check(ramp_ok, $sformatf("ch %0d group %0d: consecutive samples", k, g));
        // same sampling clock on all channels
        if (k > 0) check(12'(w[k][pos][11:0] - w[0][pos][11:0]) == 12'(k * 517),
                         $sformatf("ch %0d group %0d sampled with channel 0", k, g));
        pos += exp_len[g];
        t = {w[k][pos + 2], w[k][pos + 1], w[k][pos]};
        check(w[k][pos + 3] == 16'h0000 && w[k][pos + 4] == 16'hFFFF,
              $sformatf("ch %0d group %0d frame sync mark", k, g));
        if (g > 0) check(t - t_prev == fall_t[g] - fall_t[g - 1],
                         $sformatf("ch %0d group %0d: time mark step %0d, DG period %0d",
                                   k, g, t - t_prev, fall_t[g] - fall_t[g - 1]));
        // the last sample lies a fixed distance before the mark time
        off = int'(12'(w[k][pos - 1][11:0] - 12'(t * 3)));
        if (g > 0) check(off == off_prev, "mark time aligned with samples");
        off_prev = off;
        t_prev = t;
        pos += 5;
      end
    end
    for (int k = 0; k < NCH; k++)
      check(rx[k].size() > PW && rx[k][0] != w[k][0], "read order is inverted");

    for (int k = 0; k < NCH; k++) check(errs[k] == 0, $sformatf("flash protocol errors ch %0d: %0d", k, errs[k]));
    check(n_win == 10 && n_d1 > 0 && n_d2 > 0, "windows with both delays");
    check(n_wrap > 0, "circulatory wrap seen");
    check(read_cycles < longint'(tot_bytes) * 6,
          $sformatf("read %0d bytes in %0d clocks (needs < 6 per byte for 10 MByte/s)", tot_bytes, read_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
