// ssr_top: logic of the radar video solid state recorder.
//
// The recorder stores three pairs of I/Q radar video signals, each sampled at
// 60 MSPS with 12 bits (360 MSPS in total), into six independent flash arrays
// of 8 x 128 MByte (6 GByte in total), and gives the data back to a ground
// computer over USB 2.0. This module holds the digital part of all its cards:
//   * acquisition control card: acq_timing (S2/DG/PWS time sequence and the
//     48-bit time count) and mode_ctrl (the five function modes);
//   * three acquisition and storage cards, two channel_unit each (I and Q);
//   * USB control card: backplane_reader, which reads the channels one by one.
// Channel 2c is the I channel of card c, channel 2c+1 its Q channel.
// The A/D converters, flash chips, USB 2.0 controller, isolation and power
// parts are outside this module: their signals are the ports below. The flash
// I/O bus of each channel is split into io_out / io_oe / io_in for an
// external tristate pad. Self-checking is only a mode here: `check_req` is
// brought out and `check_done` ends it, for the check logic to connect to.
//
// Timing: one clock, the 60 MHz sample clock that comes with the video
// signals; the async radar controls are synchronised inside acq_timing.
module ssr_top
  import ssr_pkg::*;
#(
  parameter int unsigned NUM_CARDS      = 3,
  parameter int unsigned NUM_CHIPS      = 8,
  parameter int unsigned PAGE_BYTES     = 2048,
  parameter int unsigned PAGES_PER_CHIP = 65536,
  parameter int unsigned PAGES_PER_BLK  = 64,
  parameter int unsigned RES_ROWS       = 64,
  parameter int unsigned FIFO_DEPTH     = 16384,
  parameter int unsigned DELAY1_CYC     = 60,
  parameter int unsigned DELAY2_CYC     = 120,
  localparam int unsigned NUM_CH        = 2 * NUM_CARDS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // radar seeker digital interface
  input  logic                                 s2,
  input  logic                                 dg,
  input  logic                                 pws,
  // A/D converters
  input  logic [NUM_CH-1:0][ADC_BITS-1:0]      adc_data,
  // ground computer commands (through the USB controller)
  input  logic                                 cmd_erase,
  input  logic                                 cmd_read,
  input  logic                                 cmd_check,
  input  logic                                 check_done,
  output logic                                 check_req,
  output mode_e                                mode,
  output logic [$clog2(NUM_CH)-1:0]            read_ch,     // channel being read
  // USB controller FIFO
  output logic [WORD_BITS-1:0]                 usb_data,
  output logic                                 usb_wr,
  input  logic                                 usb_full,
  // status per channel
  output logic [NUM_CH-1:0]                    ch_overflow,
  output logic [NUM_CH-1:0]                    ch_full,
  output logic [NUM_CH-1:0]                    ch_stall,
  output logic [NUM_CH-1:0][31:0]              ch_page_count,
  // flash buses, one per channel
  output logic [NUM_CH-1:0][NUM_CHIPS-1:0]     nand_ce_n,
  output logic [NUM_CH-1:0]                    nand_cle,
  output logic [NUM_CH-1:0]                    nand_ale,
  output logic [NUM_CH-1:0]                    nand_we_n,
  output logic [NUM_CH-1:0]                    nand_re_n,
  output logic [NUM_CH-1:0][7:0]               nand_io_out,
  output logic [NUM_CH-1:0]                    nand_io_oe,
  input  logic [NUM_CH-1:0][7:0]               nand_io_in,
  input  logic [NUM_CH-1:0][NUM_CHIPS-1:0]     nand_rb_n
);

  // ---------------- acquisition control card ----------------
  logic                 s2_s, window, group_end, rec_en, erase_start, read_start;
  logic [TIME_BITS-1:0] time_cnt;
  logic                 read_done;
  logic [NUM_CH-1:0]    ch_busy;

  acq_timing #(.DELAY1_CYC(DELAY1_CYC), .DELAY2_CYC(DELAY2_CYC)) u_timing (
    .clk, .rst_n, .arm(rec_en), .s2, .dg, .pws,
    .s2_s, .window, .group_end, .time_cnt
  );

  mode_ctrl u_mode (
    .clk, .rst_n, .s2_s, .cmd_erase, .cmd_read, .cmd_check,
    .ch_busy(|ch_busy), .read_done, .check_done,
    .mode, .rec_en, .erase_start, .read_start, .check_req
  );

  // ---------------- acquisition and storage cards ----------------
  logic [NUM_CH-1:0]                ch_start, ch_valid, ch_ready, ch_done;
  logic [NUM_CH-1:0][WORD_BITS-1:0] ch_data;

  for (genvar c = 0; c < NUM_CARDS; c++) begin : g_card
    for (genvar q = 0; q < 2; q++) begin : g_chan      // 0: I, 1: Q
      localparam int unsigned K = 2 * c + q;
      channel_unit #(
        .NUM_CHIPS(NUM_CHIPS), .PAGE_BYTES(PAGE_BYTES), .PAGES_PER_CHIP(PAGES_PER_CHIP),
        .PAGES_PER_BLK(PAGES_PER_BLK), .RES_ROWS(RES_ROWS), .FIFO_DEPTH(FIFO_DEPTH)
      ) u_ch (
        .clk, .rst_n,
        .window, .group_end, .time_cnt, .rec_en, .erase_start,
        .read_start(ch_start[K]),
        .adc_data(adc_data[K]),
        .out_valid(ch_valid[K]), .out_data(ch_data[K]), .out_ready(ch_ready[K]),
        .read_done(ch_done[K]),
        .busy(ch_busy[K]), .overflow(ch_overflow[K]), .full(ch_full[K]),
        .stall(ch_stall[K]), .page_count(ch_page_count[K]),
        .nand_ce_n(nand_ce_n[K]), .nand_cle(nand_cle[K]), .nand_ale(nand_ale[K]),
        .nand_we_n(nand_we_n[K]), .nand_re_n(nand_re_n[K]),
        .nand_io_out(nand_io_out[K]), .nand_io_oe(nand_io_oe[K]),
        .nand_io_in(nand_io_in[K]), .nand_rb_n(nand_rb_n[K])
      );
    end
  end

  // ---------------- USB control card ----------------
  backplane_reader #(.NUM_CH(NUM_CH)) u_reader (
    .clk, .rst_n, .start(read_start), .done(read_done),
    .active(), .cur_ch(read_ch),
    .ch_start, .ch_valid, .ch_data, .ch_ready, .ch_done,
    .usb_data, .usb_wr, .usb_full
  );

endmodule
