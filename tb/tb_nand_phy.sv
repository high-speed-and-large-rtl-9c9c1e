// tb_nand_phy: self-checking test of the flash bus cycle engine.
// Sends a random mix of command, address, data-input and data-output
// requests to random chips, back to back and with gaps. A bus monitor checks
// every WE# rising edge (CLE/ALE/data/chip enable as requested), every RE#
// cycle (chip enable, data returned on rd_valid), a strobe-low time of two
// clocks, and three clocks per cycle when requests follow each other.
module tb_nand_phy;
  import ssr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  nand_cycle_e req_kind = NB_CMD;
  logic [7:0] req_data = 0;
  logic [2:0] req_chip = 0;
  logic rd_valid;
  logic [7:0] rd_data;
  logic [7:0] nand_ce_n;
  logic nand_cle, nand_ale, nand_we_n, nand_re_n, nand_io_oe;
  logic [7:0] nand_io_out, nand_io_in;
  int checks = 0, failures = 0;

  typedef struct { nand_cycle_e kind; logic [7:0] data; logic [2:0] chip; } req_t;
  req_t exp_bus [$];
  logic [7:0] exp_rd [$];
  int rd_idx = 0;
  longint cyc = 0, last_strobe = -100, low_start = 0;
  int b2b_ok = 0;

  nand_phy #(.NUM_CHIPS(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at cycle %0d", what, cyc); end
  endtask

  // flash side: return a known byte while RE# is low
  assign nand_io_in = nand_re_n ? 8'h00 : (8'h5C ^ 8'(rd_idx * 37));

  task automatic bus_edge(input bit is_read);
    req_t e;
    if (exp_bus.size() == 0) begin check(0, "unexpected bus cycle"); return; end
    e = exp_bus.pop_front();
    check(nand_ce_n == ~(8'd1 << e.chip), "chip enable");
    check(cyc - low_start == 2, "strobe low two clocks");
    if (is_read) check(e.kind == NB_RDATA && !nand_io_oe, "read cycle");
    else begin
      check(e.kind != NB_RDATA && nand_io_oe, "write cycle");
      check(nand_cle == (e.kind == NB_CMD) && nand_ale == (e.kind == NB_ADDR), "CLE/ALE");
      check(nand_io_out == e.data, "data byte");
    end
    if (cyc - last_strobe == 3) b2b_ok++;
    check(cyc - last_strobe >= 3, "cycle at least three clocks");
    last_strobe = cyc;
  endtask

  always @(negedge nand_we_n or negedge nand_re_n) low_start = cyc;
  always @(posedge nand_we_n) if (rst_n) bus_edge(0);
  always @(posedge nand_re_n) if (rst_n) begin bus_edge(1); rd_idx++; end

  always @(posedge clk) if (rst_n && rd_valid) begin
    if (exp_rd.size() == 0) check(0, "unexpected rd_valid");
    else check(rd_data == exp_rd.pop_front(), "read data");
  end


  int n_rd = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    check(nand_ce_n == '1 && nand_we_n && nand_re_n, "bus idle after reset");
    for (int i = 0; i < 400; i++) begin
      nand_cycle_e k;
      logic [7:0] d;
      logic [2:0] c;
      req_t r;
      k = nand_cycle_e'($urandom_range(0, 3));
      d = 8'($urandom);
      c = 3'($urandom);
      r.kind = k; r.data = d; r.chip = c;
      exp_bus.push_back(r);
      if (k == NB_RDATA) begin exp_rd.push_back(8'h5C ^ 8'(n_rd * 37)); n_rd++; end
      req_valid = 1; req_kind = k; req_data = d; req_chip = c;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(exp_bus.size() == 0 && exp_rd.size() == 0, "all cycles seen");
    check(b2b_ok > 100, $sformatf("back-to-back cycles at 3 clocks: %0d", b2b_ok));
    check(nand_ce_n == '1, "chip enables high when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
