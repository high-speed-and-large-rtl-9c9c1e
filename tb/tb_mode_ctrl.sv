// tb_mode_ctrl: self-checking test of the function mode controller.
// Walks through every mode: holding -> recording (S2 high) -> holding once S2
// is low and the channels are idle; erasing with its start pulse and busy
// wait; reading until read_done; self-checking until check_done. Also checks
// that commands are ignored outside the holding mode and that S2 wins over a
// command in the same clock.
module tb_mode_ctrl;
  import ssr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s2_s = 0, cmd_erase = 0, cmd_read = 0, cmd_check = 0;
  logic ch_busy = 0, read_done = 0, check_done = 0;
  mode_e mode;
  logic rec_en, erase_start, read_start, check_req;
  int checks = 0, failures = 0;
  int n_es = 0, n_rs = 0;

  mode_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && erase_start) n_es++;
    if (rst_n && read_start)  n_rs++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1; @(negedge clk); sig = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(mode == MODE_HOLD, "reset to holding");
    check(!rec_en && !check_req, "outputs idle in holding");
    // recording
    s2_s = 1; cmd_erase = 1;
    @(negedge clk); cmd_erase = 0; ch_busy = 1;
    check(mode == MODE_RECORD, "S2 starts recording, before a command");
    check(rec_en, "rec_en in recording");
    check(n_es == 0, "no erase start while recording");
    pulse(cmd_read);
    repeat (5) @(negedge clk);
    check(mode == MODE_RECORD && n_rs == 0, "read command ignored while recording");
    s2_s = 0;
    @(negedge clk);
    check(!rec_en, "rec_en drops with S2");
    repeat (20) @(negedge clk);
    check(mode == MODE_RECORD, "recording waits for channels");
    ch_busy = 0;
    repeat (3) @(negedge clk);
    check(mode == MODE_HOLD, "holding after channels finish");
    // erasing
    pulse(cmd_erase);
    check(mode == MODE_ERASE && erase_start, "erase mode and its start pulse");
    ch_busy = 1;
    repeat (30) @(negedge clk);
    check(mode == MODE_ERASE, "erase waits for busy");
    ch_busy = 0;
    repeat (8) @(negedge clk);
    check(mode == MODE_HOLD && n_es == 1, "erase ends");
    // erase with channels that never become busy still ends after settling
    pulse(cmd_erase);
    repeat (8) @(negedge clk);
    check(mode == MODE_HOLD && n_es == 2, "short erase ends");
    // reading
    pulse(cmd_read);
    check(mode == MODE_READ && read_start, "read mode and its start pulse");
    pulse(cmd_erase);
    repeat (30) @(negedge clk);
    check(mode == MODE_READ && n_es == 2, "read waits for read_done, erase ignored");
    pulse(read_done);
    @(negedge clk);
    check(mode == MODE_HOLD, "read ends on read_done");
    // self-checking
    pulse(cmd_check);
    check(mode == MODE_CHECK && check_req, "self-check mode");
    repeat (10) @(negedge clk);
    check(check_req, "check_req held");
    pulse(check_done);
    @(negedge clk);
    check(mode == MODE_HOLD && !check_req, "self-check ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
