// frame_formatter: turns the A/D sample stream of one channel into stored words.
//
// Each 12-bit sample taken inside the sampling window becomes one 16-bit word
// whose upper four bits are 0000. Because the width of the trigger pulse
// varies, the number of samples per period varies too, so after every group of
// samples (one window) a 10-byte mark is appended: six bytes of time, lowest
// byte first, then the frame synchronisation bytes 00h 00h FFh FFh. Stored low
// byte first, the mark is the five words
//   time[15:0], time[31:16], time[47:32], 0000h, FFFFh.
// Word format and mark layout follow the recorder's description; the time is
// the count latched in the clock of `group_end`.
//
// Timing: one clock of latency from (window, adc_data) to (wr_en, wr_data);
// the five mark words follow on the five clocks after `group_end`. `busy` is
// high while mark words are still to be written. The next window must not open
// during those five clocks, which the acquisition delay (at least 2 clocks
// after a DG trailing edge that itself follows the rising edge) makes true for
// any DG low time above five clocks; an assertion checks it.
module frame_formatter
  import ssr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 window,
  input  logic                 group_end,
  input  logic [ADC_BITS-1:0]  adc_data,
  input  logic [TIME_BITS-1:0] time_cnt,
  output logic                 wr_en,
  output logic [WORD_BITS-1:0] wr_data,
  output logic                 busy
);

  logic [TIME_BITS-1:0] t_latch;
  logic [2:0]           mark_idx;   // 0: no mark pending, 1..5: next mark word
  logic [WORD_BITS-1:0] mark_word;

  always_comb begin
    unique case (mark_idx)
      3'd1:    mark_word = t_latch[15:0];
      3'd2:    mark_word = t_latch[31:16];
      3'd3:    mark_word = t_latch[47:32];
      3'd4:    mark_word = 16'h0000;
      default: mark_word = 16'hFFFF;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en    <= 1'b0;
      wr_data  <= '0;
      mark_idx <= '0;
      t_latch  <= '0;
    end else begin
      wr_en <= 1'b0;
      if (group_end) begin
        t_latch  <= time_cnt;
        mark_idx <= 3'd1;
      end else if (mark_idx != 3'd0) begin
        wr_en    <= 1'b1;
        wr_data  <= mark_word;
        mark_idx <= (mark_idx == 3'd5) ? 3'd0 : mark_idx + 1'b1;
      end else if (window) begin
        wr_en   <= 1'b1;
        wr_data <= {{(WORD_BITS-ADC_BITS){1'b0}}, adc_data};
      end
    end
  end

  assign busy = group_end || (mark_idx != 3'd0);

  a_no_window_in_mark: assert property (@(posedge clk) disable iff (!rst_n)
    (mark_idx != 3'd0) |-> !window)
    else $error("frame_formatter: window opened while a mark was being written");

endmodule
