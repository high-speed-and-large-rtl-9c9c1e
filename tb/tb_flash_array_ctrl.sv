// tb_flash_array_ctrl: self-checking test of the flash array controller, run
// with the bus engine and eight flash chip models at reduced sizes (256-byte
// pages, 16 pages per chip, 4 pages per block, one reserved block).
// Checks, against values the testbench computes itself:
//   * reading a blank array gives no words (vacant area detection);
//   * erasing issues one erase per block per chip;
//   * recording puts linear page p on chip p mod 8, row 4 + p div 8, low byte
//     first, and ends with a partial page and the index page;
//   * the data strobes of a page follow every three clocks (20 MByte/s) and,
//     with programming faster than seven page writes, no chip is waited for;
//   * reading returns the pages newest first, and at one word per clock on
//     the output it is faster than 10 MByte/s (read busy time scaled to the
//     page size);
//   * recording beyond the array's size stops at the last page (full).
module tb_flash_array_ctrl;
  import ssr_pkg::*;

  localparam int unsigned NCH = 8, PB = 256, PPC = 16, PPB = 4, RES = 4;
  localparam int unsigned DATA_PAGES = NCH * (PPC - RES);
  localparam int unsigned PW = PB / 2;
  localparam int unsigned T_PROG = 4000, T_READ = 188, T_ERASE = 300;

  logic clk = 0, rst_n = 0;
  logic rec_en = 0, in_drained = 0, erase_start = 0, read_start = 0;
  logic busy, full, stall, read_done;
  logic [31:0] page_count;
  logic in_valid, in_ready, out_valid, out_ready = 1;
  logic [15:0] in_data, out_data;
  logic req_valid, req_ready, phy_rd_valid;
  nand_cycle_e req_kind;
  logic [7:0] req_data, phy_rd_data;
  logic [2:0] req_chip;
  logic [NCH-1:0] rb_n, ce_n;
  logic cle, ale, we_n, re_n, io_oe;
  logic [7:0] io_out, io_in;
  int unsigned model_errors;
  int checks = 0, failures = 0;
  longint cyc = 0;

  flash_array_ctrl #(.NUM_CHIPS(NCH), .PAGE_BYTES(PB), .PAGES_PER_CHIP(PPC),
                     .PAGES_PER_BLK(PPB), .RES_ROWS(RES)) dut (.*, .rb_n(rb_n));
  nand_phy #(.NUM_CHIPS(NCH)) u_phy (
    .clk, .rst_n, .req_valid, .req_ready, .req_kind, .req_data, .req_chip,
    .rd_valid(phy_rd_valid), .rd_data(phy_rd_data),
    .nand_ce_n(ce_n), .nand_cle(cle), .nand_ale(ale), .nand_we_n(we_n), .nand_re_n(re_n),
    .nand_io_out(io_out), .nand_io_oe(io_oe), .nand_io_in(io_in));
  nand_array_model #(.NUM_CHIPS(NCH), .PAGE_BYTES(PB), .PAGES(PPC), .PAGES_PER_BLK(PPB),
                     .T_PROG(T_PROG), .T_READ(T_READ), .T_ERASE(T_ERASE)) u_arr (
    .clk, .ce_n, .cle, .ale, .we_n, .re_n, .io_from_ctrl(io_out), .io_oe,
    .io_to_ctrl(io_in), .rb_n, .errors(model_errors));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  // word source
  logic [15:0] src [$];
  logic        src_en = 1;
  assign in_valid = src_en && src.size() > 0;
  assign in_data  = src.size() > 0 ? src[0] : 16'h0;
  always @(posedge clk) if (in_valid && in_ready) void'(src.pop_front());

  // word sink
  logic [15:0] got [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_data);

  // bus monitor: data strobe spacing within a page, chip order of programs
  longint last_data = -1;
  int     gap_max = 0, stall_cycles = 0;
  int     prog_chip [$];
  logic   count_gaps = 0;
  always @(posedge we_n) begin
    if (!cle && !ale) begin
      if (last_data >= 0 && count_gaps && cyc - last_data > gap_max) gap_max = int'(cyc - last_data);
      last_data = cyc;
    end else begin
      last_data = -1;
      if (cle && io_out == 8'h10)
        for (int i = 0; i < NCH; i++) if (!ce_n[i]) prog_chip.push_back(i);
    end
  end
  always @(posedge clk) if (count_gaps && stall) stall_cycles++;

  task automatic wait_idle(input int max_cyc);
    int n = 0;
    @(negedge clk);
    while (busy && n < max_cyc) begin @(negedge clk); n++; end
    check(!busy, "controller idle in time");
  endtask

  function automatic logic [7:0] flash_byte(int chip, int row, int col);
    if (u_arr.g_chip[0].u_chip.pages.exists(row) && chip == 0)
      return u_arr.g_chip[0].u_chip.pages[row][col*8 +: 8];
    return 8'hFF;
  endfunction

  logic [15:0] ref_w [$];

  task automatic do_read(input bit random_ready, output longint took);
    longint t0;
    got.delete();
    @(negedge clk); read_start = 1; t0 = cyc;
    @(negedge clk); read_start = 0;
    while (!read_done) begin
      out_ready = random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
      @(negedge clk);
    end
    took = cyc - t0;
    out_ready = 1;
    @(negedge clk);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint took;
    int npages, nwords, lastw;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);

    // 1. blank array reads as vacant
    do_read(0, took);
    check(got.size() == 0, "blank array gives no data");

    // 2. erase
    @(negedge clk); erase_start = 1; @(negedge clk); erase_start = 0;
    wait_idle(200000);
    check(u_arr.g_chip[0].u_chip.n_erase == PPC / PPB && u_arr.g_chip[7].u_chip.n_erase == PPC / PPB,
          "one erase per block per chip");

    // 3. record 20 full pages and 50 words
    nwords = 20 * PW + 50;
    ref_w.delete();
    for (int i = 0; i < nwords; i++) begin ref_w.push_back(16'($urandom)); end
    for (int i = 0; i < 3 * PW; i++) src.push_back(ref_w[i]);
    @(negedge clk); rec_en = 1;
    // first pages with a gappy source
    while (src.size() > 0) begin src_en = ($urandom_range(0, 2) != 0); @(negedge clk); end
    src_en = 1;
    repeat (200) @(negedge clk);
    // the rest with a source that is always ready: full-speed writing
    count_gaps = 1;
    for (int i = 3 * PW; i < nwords; i++) src.push_back(ref_w[i]);
    while (src.size() > 0) @(negedge clk);
    count_gaps = 0;
    rec_en = 0; in_drained = 1;
    wait_idle(200000);
    in_drained = 0;
    check(page_count == 21, $sformatf("pages written %0d", page_count));
    check(gap_max == 3, $sformatf("data strobes every 3 clocks within a page (max gap %0d)", gap_max));
    check(stall_cycles == 0, $sformatf("no wait on a busy chip (%0d cycles)", stall_cycles));
    for (int i = 0; i < prog_chip.size() - 1; i++)
      check(prog_chip[i] == i % NCH, "programs go round the chips");
    check(prog_chip[prog_chip.size() - 1] == 0, "index page programmed on chip 0");
    // flash contents: page p on chip p%8 at row RES + p/8, low byte first
    for (int p = 0; p < 21; p++) begin
      int w;
      w = (p == 20) ? 50 : PW;
      for (int j = 0; j < w; j += 17) begin
        logic [15:0] v;
        case (p % NCH)
          0: v = {u_arr.g_chip[0].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[0].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
          1: v = {u_arr.g_chip[1].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[1].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
          2: v = {u_arr.g_chip[2].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[2].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
          3: v = {u_arr.g_chip[3].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[3].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
          4: v = {u_arr.g_chip[4].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[4].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
          5: v = {u_arr.g_chip[5].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[5].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
          6: v = {u_arr.g_chip[6].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[6].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
          default: v = {u_arr.g_chip[7].u_chip.pages[RES + p / NCH][(2*j+1)*8 +: 8], u_arr.g_chip[7].u_chip.pages[RES + p / NCH][2*j*8 +: 8]};
        endcase
        check(v == ref_w[p * PW + j], $sformatf("flash page %0d word %0d", p, j));
      end
    end
    // index page
    check(flash_byte(0, 0, 0) == 8'd21 && flash_byte(0, 0, 1) == 8'd0, "index page count");
    check({flash_byte(0, 0, 5), flash_byte(0, 0, 4)} == 16'd100, "index last page bytes");
    check({flash_byte(0, 0, 7), flash_byte(0, 0, 6)} == INDEX_MAGIC, "index signature");

    // 4. read back with a stalling sink: newest page first
    do_read(1, took);
    begin
      logic [15:0] e [$];
      for (int p = 20; p >= 0; p--) begin
        int w;
        w = (p == 20) ? 50 : PW;
        for (int j = 0; j < w; j++) e.push_back(ref_w[p * PW + j]);
      end
      check(got.size() == e.size(), $sformatf("read %0d words, expected %0d", got.size(), e.size()));
      for (int i = 0; i < e.size() && i < got.size(); i++)
        if (got[i] != e[i]) begin check(0, $sformatf("read word %0d", i)); break; end
      check(1, "read order");
    end
    // 5. read speed with a sink that is always ready
    do_read(0, took);
    check(got.size() == nwords, "second read complete");
    // bytes per clock above 10 MByte / 60 MHz = 1/6
    check(took < longint'(nwords) * 2 * 6,
          $sformatf("read took %0d clocks for %0d bytes (needs < 6 per byte)", took, nwords * 2));

    // 6. fill the array: recording stops at the last page
    @(negedge clk); erase_start = 1; @(negedge clk); erase_start = 0;
    wait_idle(200000);
    for (int i = 0; i < DATA_PAGES * PW + 300; i++) src.push_back(16'(i));
    @(negedge clk); rec_en = 1;
    begin
      int n = 0;
      bit seen_full = 0;
      while (n < 400000 && !seen_full) begin @(negedge clk); n++; if (full) seen_full = 1; end
      check(seen_full, "array full reported");
    end
    repeat (100) @(negedge clk);
    check(page_count == DATA_PAGES, $sformatf("stopped at %0d pages", page_count));
    check(src.size() == 300, $sformatf("words left over after full: %0d", src.size()));
    rec_en = 0; in_drained = 1;
    wait_idle(200000);
    in_drained = 0;
    src.delete();
    check(flash_byte(0, 0, 0) == 8'(DATA_PAGES), "index of the full array");
    do_read(0, took);
    check(got.size() == DATA_PAGES * PW, "full array read back");
    check(got.size() > 0 && got[0] == 16'(DATA_PAGES * PW - PW), "read of full array starts at its newest page");
    check(model_errors == 0, $sformatf("flash protocol errors: %0d", model_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
