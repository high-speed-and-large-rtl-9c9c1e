// channel_unit: one I or Q channel of an acquisition and storage card.
//
// Each video channel has its own A/D converter, buffer and flash array, so
// that no analog switching is needed and the six channels share the data
// rate. The channel chain is
//   A/D samples -> frame_formatter (16-bit words + time/sync marks)
//               -> sample_fifo     (burst buffer)
//               -> flash_array_ctrl + nand_phy (circulatory page writes)
// and, for reading, the flash controller's inverted-order word stream goes
// out to the back plane. The chain follows the recorder's acquisition and
// storage card; the connection details are this design's.
//
// Recording ends ("drained") when recording is no longer enabled, no window
// is open, the formatter has written its last mark and the FIFO is empty.
// The FIFO is cleared, and its overflow flag with it, when recording starts.
//
// Timing: all on the 60 MHz sample clock. `adc_data` is taken in the clocks
// where `window` is high; the word reaches the FIFO one clock later.
module channel_unit
  import ssr_pkg::*;
#(
  parameter int unsigned NUM_CHIPS      = 8,
  parameter int unsigned PAGE_BYTES     = 2048,
  parameter int unsigned PAGES_PER_CHIP = 65536,
  parameter int unsigned PAGES_PER_BLK  = 64,
  parameter int unsigned RES_ROWS       = 64,
  parameter int unsigned FIFO_DEPTH     = 16384
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // from the acquisition control card
  input  logic                  window,
  input  logic                  group_end,
  input  logic [TIME_BITS-1:0]  time_cnt,
  input  logic                  rec_en,
  input  logic                  erase_start,
  input  logic                  read_start,
  // A/D converter
  input  logic [ADC_BITS-1:0]   adc_data,
  // read stream to the back plane
  output logic                  out_valid,
  output logic [WORD_BITS-1:0]  out_data,
  input  logic                  out_ready,
  output logic                  read_done,
  // status
  output logic                  busy,
  output logic                  overflow,
  output logic                  full,
  output logic                  stall,
  output logic [31:0]           page_count,
  // flash bus
  output logic [NUM_CHIPS-1:0]  nand_ce_n,
  output logic                  nand_cle,
  output logic                  nand_ale,
  output logic                  nand_we_n,
  output logic                  nand_re_n,
  output logic [7:0]            nand_io_out,
  output logic                  nand_io_oe,
  input  logic [7:0]            nand_io_in,
  input  logic [NUM_CHIPS-1:0]  nand_rb_n
);

  localparam int unsigned CB = (NUM_CHIPS > 1) ? $clog2(NUM_CHIPS) : 1;

  logic                 fmt_wr, fmt_busy;
  logic [WORD_BITS-1:0] fmt_data;
  logic                 fifo_valid, fifo_pop;
  logic [WORD_BITS-1:0] fifo_data;
  logic [$clog2(FIFO_DEPTH+1):0] fifo_level;
  logic                 rec_en_d, drained;

  logic                 req_valid, req_ready, phy_rd_valid;
  nand_cycle_e          req_kind;
  logic [7:0]           req_data, phy_rd_data;
  logic [CB-1:0]        req_chip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_en_d <= 1'b0;
      drained  <= 1'b0;
    end else begin
      rec_en_d <= rec_en;
      drained  <= !rec_en && !window && !fmt_busy && !fmt_wr && (fifo_level == '0);
    end
  end

  frame_formatter u_fmt (
    .clk, .rst_n,
    .window, .group_end, .adc_data, .time_cnt,
    .wr_en(fmt_wr), .wr_data(fmt_data), .busy(fmt_busy)
  );

  sample_fifo #(.WIDTH(WORD_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .clr(rec_en && !rec_en_d),
    .wr_en(fmt_wr), .wr_data(fmt_data),
    .full(), .overflow,
    .rd_valid(fifo_valid), .rd_data(fifo_data), .rd_en(fifo_pop),
    .level(fifo_level)
  );

  flash_array_ctrl #(
    .NUM_CHIPS(NUM_CHIPS), .PAGE_BYTES(PAGE_BYTES), .PAGES_PER_CHIP(PAGES_PER_CHIP),
    .PAGES_PER_BLK(PAGES_PER_BLK), .RES_ROWS(RES_ROWS)
  ) u_ctrl (
    .clk, .rst_n,
    .rec_en, .in_drained(drained), .erase_start, .read_start,
    .busy, .full, .stall, .page_count, .read_done,
    .in_valid(fifo_valid), .in_data(fifo_data), .in_ready(fifo_pop),
    .out_valid, .out_data, .out_ready,
    .req_valid, .req_ready, .req_kind, .req_data, .req_chip,
    .phy_rd_valid, .phy_rd_data,
    .rb_n(nand_rb_n)
  );

  nand_phy #(.NUM_CHIPS(NUM_CHIPS)) u_phy (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_kind, .req_data, .req_chip,
    .rd_valid(phy_rd_valid), .rd_data(phy_rd_data),
    .nand_ce_n, .nand_cle, .nand_ale, .nand_we_n, .nand_re_n,
    .nand_io_out, .nand_io_oe, .nand_io_in
  );

endmodule
