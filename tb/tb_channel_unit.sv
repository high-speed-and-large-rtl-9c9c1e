// tb_channel_unit: self-checking test of one recorder channel (formatter,
// FIFO, flash controller and bus engine) with eight flash chip models, at
// reduced sizes (256-byte pages, 16 pages per chip, 257-word FIFO).
// The testbench drives windows of random samples with their group_end and
// time, builds the expected word stream itself (0000b & sample, then the
// five mark words per group), records it, reads it back and compares it page
// by page in inverted order. A second recording with a window longer than
// the FIFO can absorb must raise the overflow flag.
module tb_channel_unit;
  import ssr_pkg::*;

  localparam int unsigned NCH = 8, PB = 256, PPC = 16, PPB = 4, RES = 4, FD = 256;
  localparam int unsigned PW = PB / 2;

  logic clk = 0, rst_n = 0;
  logic window = 0, group_end = 0, rec_en = 0, erase_start = 0, read_start = 0;
  logic [TIME_BITS-1:0] time_cnt = '0;
  logic [ADC_BITS-1:0] adc_data = '0;
  logic out_valid, out_ready = 1, read_done, busy, overflow, full, stall;
  logic [15:0] out_data;
  logic [31:0] page_count;
  logic [NCH-1:0] nand_ce_n, nand_rb_n;
  logic nand_cle, nand_ale, nand_we_n, nand_re_n, nand_io_oe;
  logic [7:0] nand_io_out, nand_io_in;
  int unsigned model_errors;
  int checks = 0, failures = 0;

  channel_unit #(.NUM_CHIPS(NCH), .PAGE_BYTES(PB), .PAGES_PER_CHIP(PPC),
                 .PAGES_PER_BLK(PPB), .RES_ROWS(RES), .FIFO_DEPTH(FD)) dut (.*);
  nand_array_model #(.NUM_CHIPS(NCH), .PAGE_BYTES(PB), .PAGES(PPC), .PAGES_PER_BLK(PPB),
                     .T_PROG(4000), .T_READ(188), .T_ERASE(300)) u_arr (
    .clk, .ce_n(nand_ce_n), .cle(nand_cle), .ale(nand_ale), .we_n(nand_we_n),
    .re_n(nand_re_n), .io_from_ctrl(nand_io_out), .io_oe(nand_io_oe),
    .io_to_ctrl(nand_io_in), .rb_n(nand_rb_n), .errors(model_errors));

  always #5 clk = ~clk;
  always @(posedge clk) time_cnt <= time_cnt + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  logic [15:0] got [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_data);

  task automatic wait_idle();
    int n;
    n = 0;
    repeat (20) @(negedge clk);
    while (busy && n < 500000) begin @(negedge clk); n++; end
    check(!busy, "channel idle in time");
  endtask

  logic [15:0] ref_w [$];

  task automatic group(input int len, input int gap);
    for (int i = 0; i < len; i++) begin
      window = 1;
      adc_data = ADC_BITS'($urandom);
      ref_w.push_back({4'h0, adc_data});
      @(negedge clk);
    end
    window = 0;
    group_end = 1;
    ref_w.push_back(time_cnt[15:0]); ref_w.push_back(time_cnt[31:16]);
    ref_w.push_back(time_cnt[47:32]); ref_w.push_back(16'h0000); ref_w.push_back(16'hFFFF);
    @(negedge clk);
    group_end = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int np, nw, lastw;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    @(negedge clk); erase_start = 1; @(negedge clk); erase_start = 0;
    wait_idle();
    // recording
    @(negedge clk); rec_en = 1;
    repeat (10) @(negedge clk);
    // the last group ends right before recording stops: the FIFO must drain
    for (int g = 0; g < 15; g++) group($urandom_range(20, 200), (g == 14) ? 0 : 1500);
    rec_en = 0;
    wait_idle();
    check(!overflow, "no overflow at this rate");
    nw = ref_w.size();
    np = (nw + PW - 1) / PW;
    lastw = nw - (np - 1) * PW;
    check(page_count == np, $sformatf("pages %0d expected %0d", page_count, np));
    // read back
    @(negedge clk); read_start = 1; @(negedge clk); read_start = 0;
    while (!read_done) begin out_ready = ($urandom_range(0, 4) != 0); @(negedge clk); end
    out_ready = 1;
    @(negedge clk);
    begin
      logic [15:0] e [$];
      for (int p = np - 1; p >= 0; p--) begin
        int w;
        w = (p == np - 1) ? lastw : PW;
        for (int j = 0; j < w; j++) e.push_back(ref_w[p * PW + j]);
      end
      check(got.size() == e.size(), $sformatf("read %0d words expected %0d", got.size(), e.size()));
      for (int i = 0; i < got.size() && i < e.size(); i++)
        if (got[i] != e[i]) begin check(0, $sformatf("word %0d: %h expected %h", i, got[i], e[i])); break; end
    end
    // overflow
    @(negedge clk); erase_start = 1; @(negedge clk); erase_start = 0;
    wait_idle();
    ref_w.delete();
    @(negedge clk); rec_en = 1;
    repeat (10) @(negedge clk);
    group(600, 100);
    check(overflow, "long window overflows the FIFO");
    rec_en = 0;
    wait_idle();
    check(model_errors == 0, $sformatf("flash protocol errors: %0d", model_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
