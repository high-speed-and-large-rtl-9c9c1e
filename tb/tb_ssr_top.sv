// tb_ssr_top: end-to-end test of the recorder logic with six flash arrays
// (8 chip models each) at reduced sizes: 256-byte pages, 16 pages per chip,
// a 257-word FIFO, delays of 8 and 16 clocks, and a programming time longer
// than one round of the eight chips, so that the writer has to wait.
//
// Sequence: read a blank recorder (vacant), self-check, erase, record a run
// of DG periods with both PWS settings and one period too short to open a
// window, read everything back over the USB side and check it; then erase,
// record with windows longer than the FIFO can absorb until the arrays are
// full, and read back the full arrays.
//
// The data check is independent of the design's internals: each A/D input is
// a ramp (+3 per clock, channel k offset by 517*k), so a group must be a run
// of consecutive ramp values of length (DG low time - delay + 1), the same
// for all six channels and sampled in the same clock on all of them,
// followed by a mark 00h00h FFh FFh whose time advances by the DG period.
// Every mechanism (window, both delays, cancelled window, marks, circulatory
// wrap to chip 0, waiting on a busy chip, FIFO overflow, array full, inverted
// read order, vacant read, all five modes) is counted and must occur.
module tb_ssr_top;
  import ssr_pkg::*;

  localparam int unsigned NCARD = 3, NCH = 2 * NCARD, NCHIP = 8;
  localparam int unsigned PB = 256, PPC = 16, PPB = 4, RES = 4, FD = 256;
  localparam int unsigned D1 = 8, D2 = 16;
  localparam int unsigned PW = PB / 2, DATA_PAGES = NCHIP * (PPC - RES);
  localparam int unsigned T_PROG = 20000, T_READ = 188, T_ERASE = 300;

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
  longint cyc = 0;

  ssr_top #(.NUM_CARDS(NCARD), .NUM_CHIPS(NCHIP), .PAGE_BYTES(PB), .PAGES_PER_CHIP(PPC),
            .PAGES_PER_BLK(PPB), .RES_ROWS(RES), .FIFO_DEPTH(FD),
            .DELAY1_CYC(D1), .DELAY2_CYC(D2)) dut (.*);

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
    usb_full <= ($urandom_range(0, 7) == 0);
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
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w [NCH][$];
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(mode == MODE_HOLD, "holding after reset");

    // blank recorder: every channel vacant
    read_all();
    begin
      int tot;
      tot = 0;
      for (int k = 0; k < NCH; k++) tot += rx[k].size();
      check(tot == 0, "blank recorder reads no data");
    end

    // self-check mode
    pulse_cmd(cmd_check);
    check(mode == MODE_CHECK && check_req, "self-check mode");
    repeat (5) @(negedge clk);
    pulse_cmd(check_done);
    @(negedge clk);
    check(mode == MODE_HOLD, "self-check done");

    // erase
    pulse_cmd(cmd_erase);
    check(mode == MODE_ERASE, "erase mode");
    wait_mode(MODE_HOLD, 1000000);

    // recording run
    @(negedge clk); s2 = 1;
    repeat (10) @(negedge clk);
    check(mode == MODE_RECORD, "recording on S2");
    for (int i = 0; i < 14; i++) begin
      int low;
      low = $urandom_range(40, 160);
      dg_period(low, 1100, i % 2);
      if (i == 6) dg_period(D2 - 4, 600, 1);     // too short: window cancelled
    end
    @(negedge clk); s2 = 0;
    wait_mode(MODE_HOLD, 1000000);
    for (int k = 0; k < NCH; k++) check(!ch_overflow[k], "no overflow in the run");

    read_all();
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

    // second run: overflow and full arrays
    pulse_cmd(cmd_erase);
    wait_mode(MODE_HOLD, 1000000);
    @(negedge clk); s2 = 1;
    repeat (10) @(negedge clk);
    begin
      int n;
      n = 0;
      while (ch_full != '1 && n < 2000) begin dg_period(400, 120, 0); n++; end
    end
    repeat (2000) @(negedge clk);
    @(negedge clk); s2 = 0;
    wait_mode(MODE_HOLD, 1000000);
    for (int k = 0; k < NCH; k++) begin
      check(ch_overflow[k], "overflow flagged");
      check(ch_page_count[k] == DATA_PAGES, $sformatf("ch %0d full at %0d pages", k, ch_page_count[k]));
    end
    read_all();
    for (int k = 0; k < NCH; k++)
      check(rx[k].size() == DATA_PAGES * PW, $sformatf("ch %0d full array read: %0d words", k, rx[k].size()));

    for (int k = 0; k < NCH; k++) check(errs[k] == 0, $sformatf("flash protocol errors ch %0d: %0d", k, errs[k]));
    $display("mechanisms: windows=%0d delay1=%0d delay2=%0d cancelled=%0d wraps=%0d stalls=%0d overflows=%0d full=%0d",
             n_win, n_d1, n_d2, n_cancel, n_wrap, n_stall, n_ovf, n_full);
    $display("modes entered: hold=%0d record=%0d erase=%0d read=%0d check=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4]);
    check(n_win > 0 && n_d1 > 0 && n_d2 > 0 && n_cancel > 0, "window mechanisms seen");
    check(n_wrap > 0 && n_stall > 0, "circulatory wrap and busy wait seen");
    check(n_ovf > 0 && n_full > 0, "overflow and full seen");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_mode[3] > 0 && n_mode[4] > 0, "all five modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
