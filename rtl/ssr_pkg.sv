// ssr_pkg: types and constants shared by the radar video solid state recorder.
//
// The recorder runs from the single 60 MHz sample clock. One time-mark LSB is
// one clock (16.667 ns), so the 48-bit time mark covers 2^48 / 60e6 = 4691249 s.
// Each channel stores to an array of 8 flash chips of 128 MByte with 2 kByte
// pages. The flash command bytes are those of a standard large-page 1 Gbit NAND
// part; the recorder's description names only the chip size and page buffer,
// so the command set is this design's choice.
package ssr_pkg;

  // Sample path
  localparam int unsigned ADC_BITS   = 12;   // A/D converter resolution
  localparam int unsigned WORD_BITS  = 16;   // stored word: 0000 & sample
  localparam int unsigned TIME_BITS  = 48;   // six-byte timing mark

  // NAND command bytes
  localparam logic [7:0] NAND_READ1  = 8'h00;
  localparam logic [7:0] NAND_READ2  = 8'h30;
  localparam logic [7:0] NAND_PROG1  = 8'h80;
  localparam logic [7:0] NAND_PROG2  = 8'h10;
  localparam logic [7:0] NAND_ERASE1 = 8'h60;
  localparam logic [7:0] NAND_ERASE2 = 8'hD0;

  // Index page signature (bytes 6 and 7 of the index page)
  localparam logic [15:0] INDEX_MAGIC = 16'h5AA5;

  // Kinds of flash bus cycle
  typedef enum logic [1:0] {
    NB_CMD   = 2'd0,   // command latch cycle (CLE high, WE# pulse)
    NB_ADDR  = 2'd1,   // address latch cycle (ALE high, WE# pulse)
    NB_WDATA = 2'd2,   // data input cycle (WE# pulse)
    NB_RDATA = 2'd3    // data output cycle (RE# pulse)
  } nand_cycle_e;

  // The five function modes of the recorder
  typedef enum logic [2:0] {
    MODE_HOLD   = 3'd0,   // data holding (idle, flash contents kept)
    MODE_RECORD = 3'd1,   // acquisition and recording
    MODE_ERASE  = 3'd2,   // data erasing
    MODE_READ   = 3'd3,   // data reading
    MODE_CHECK  = 3'd4    // self-checking
  } mode_e;

endpackage
