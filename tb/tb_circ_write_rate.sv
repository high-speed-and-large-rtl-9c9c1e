// tb_circ_write_rate: the circulatory write at full page size under a
// continuous input stream. Two flash channels (controller, bus engine, eight
// chip models each) at their default sizes (2 kByte pages) are fed one word
// whenever they ask. Channel A's chips take 700 us to program a page, the
// slowest programming time; seven page writes of about 103 us each cover it,
// so A must never wait for a busy chip and must write one page per
// 2048 x 3 clocks plus command overhead (20 MByte/s). Channel B's chips take
// 900 us, longer than one round of the eight chips, so B must wait on every
// chip after the first round, showing where the scheme's bound lies.
// 24 pages (three rounds) are written on each channel.
module tb_circ_write_rate;
  import ssr_pkg::*;

  localparam int unsigned NPG = 24, PB = 2048;
  localparam int unsigned T_FAST = 42000, T_SLOW = 54000;   // 700 us, 900 us

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  logic        rec_en = 0;
  logic [1:0]  busy, stall, in_ready;
  logic [1:0][31:0] page_count;
  int          stall_cycles [2];
  longint      t_first [2], t_last [2];
  int unsigned errs [2];
  logic [15:0] word_cnt [2];

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic req_valid, req_ready, phy_rd_valid, cle, ale, we_n, re_n, io_oe, out_valid;
    nand_cycle_e req_kind;
    logic [7:0] req_data, phy_rd_data, io_out, io_in;
    logic [2:0] req_chip;
    logic [7:0] ce_n, rb_n;
    logic [15:0] out_data;
    logic full_c, read_done;

    flash_array_ctrl u_ctrl (
      .clk, .rst_n, .rec_en, .in_drained(!rec_en), .erase_start(1'b0), .read_start(1'b0),
      .busy(busy[c]), .full(full_c), .stall(stall[c]), .page_count(page_count[c]), .read_done,
      .in_valid(1'b1), .in_data(word_cnt[c]), .in_ready(in_ready[c]),
      .out_valid, .out_data, .out_ready(1'b1),
      .req_valid, .req_ready, .req_kind, .req_data, .req_chip,
      .phy_rd_valid, .phy_rd_data, .rb_n);
    nand_phy u_phy (
      .clk, .rst_n, .req_valid, .req_ready, .req_kind, .req_data, .req_chip,
      .rd_valid(phy_rd_valid), .rd_data(phy_rd_data),
      .nand_ce_n(ce_n), .nand_cle(cle), .nand_ale(ale), .nand_we_n(we_n), .nand_re_n(re_n),
      .nand_io_out(io_out), .nand_io_oe(io_oe), .nand_io_in(io_in));
    nand_array_model #(.T_PROG(c == 0 ? T_FAST : T_SLOW)) u_arr (
      .clk, .ce_n, .cle, .ale, .we_n, .re_n, .io_from_ctrl(io_out), .io_oe,
      .io_to_ctrl(io_in), .rb_n, .errors(errs[c]));

    always @(posedge clk) if (rst_n) begin
      if (in_ready[c]) word_cnt[c] <= word_cnt[c] + 1'b1;
      if (rec_en && stall[c]) stall_cycles[c]++;
    end
    // program commands: time of the first and of the NPG-th
    int n_prog = 0;
    always @(posedge we_n) if (cle && io_out == 8'h10) begin
      n_prog++;
      if (n_prog == 1) t_first[c] = cyc;
      if (n_prog == NPG) t_last[c] = cyc;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint per_page;
    word_cnt[0] = 0; word_cnt[1] = 0;
    stall_cycles[0] = 0; stall_cycles[1] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    rec_en = 1;
    while (page_count[0] < NPG || page_count[1] < NPG) @(negedge clk);
    rec_en = 0;
    while (busy != '0) @(negedge clk);
    per_page = (t_last[0] - t_first[0]) / (NPG - 1);
    $display("700 us chips: %0d clocks per page, %0d stall clocks", per_page, stall_cycles[0]);
    $display("900 us chips: %0d clocks per page, %0d stall clocks",
             (t_last[1] - t_first[1]) / (NPG - 1), stall_cycles[1]);
    check(stall_cycles[0] == 0, "700 us programming: never waits for a chip");
    check(per_page >= PB * 3 && per_page <= PB * 3 + 64,
          $sformatf("700 us programming: %0d clocks per page (20 MByte/s is %0d)", per_page, PB * 3));
    check(stall_cycles[1] > 0, "900 us programming: waits for busy chips");
    check((t_last[1] - t_first[1]) / (NPG - 1) > PB * 3 + 64, "900 us programming is slower than 20 MByte/s");
    check(page_count[0] >= NPG && page_count[1] >= NPG, "pages written");
    check(errs[0] == 0 && errs[1] == 0, "no flash protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
