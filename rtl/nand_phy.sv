// nand_phy: bus cycle engine for the eight flash chips of one channel.
//
// The chips share one 8-bit I/O bus with CLE, ALE, WE# and RE#; each has its
// own chip enable. A request names the chip and one bus cycle: a command latch,
// an address latch, a data-input byte or a data-output byte. Every cycle takes
// three 60 MHz clocks: the strobe (WE# or RE#) is low for two clocks and high
// for one. Three clocks per byte is 20 MByte/s, the maximum flash write speed
// in the recorder's description; the cycle shape and bus signals are those of
// a standard asynchronous NAND interface and are this design's choice.
//
// Handshake: a request is taken when req_valid and req_ready are both high.
// req_ready is high when the engine is idle and in the last clock of a cycle,
// so back-to-back requests run with no gap. For a data-output cycle the byte
// on io_in is sampled at the end of the second strobe-low clock (33 ns after
// RE# falls) and returned with a one-clock rd_valid pulse in the third clock.
// CLE, ALE and the data stay stable through the strobe-high clock (hold time);
// all chip enables are high when no cycle is running.
module nand_phy
  import ssr_pkg::*;
#(
  parameter int unsigned NUM_CHIPS = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // request
  input  logic                          req_valid,
  output logic                          req_ready,
  input  nand_cycle_e                   req_kind,
  input  logic [7:0]                    req_data,
  input  logic [$clog2(NUM_CHIPS)-1:0]  req_chip,
  output logic                          rd_valid,
  output logic [7:0]                    rd_data,
  // flash bus
  output logic [NUM_CHIPS-1:0]          nand_ce_n,
  output logic                          nand_cle,
  output logic                          nand_ale,
  output logic                          nand_we_n,
  output logic                          nand_re_n,
  output logic [7:0]                    nand_io_out,
  output logic                          nand_io_oe,
  input  logic [7:0]                    nand_io_in
);

  logic [1:0]  ph;          // 0,1: strobe low; 2: strobe high
  logic        run;
  nand_cycle_e kind;

  assign req_ready = !run || (ph == 2'd2);
  wire   accept    = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      ph          <= 2'd0;
      kind        <= NB_CMD;
      nand_ce_n   <= '1;
      nand_cle    <= 1'b0;
      nand_ale    <= 1'b0;
      nand_we_n   <= 1'b1;
      nand_re_n   <= 1'b1;
      nand_io_out <= '0;
      nand_io_oe  <= 1'b0;
      rd_valid    <= 1'b0;
      rd_data     <= '0;
    end else begin
      rd_valid <= 1'b0;
      if (accept) begin
        run         <= 1'b1;
        ph          <= 2'd0;
        kind        <= req_kind;
        nand_ce_n   <= ~(NUM_CHIPS'(1) << req_chip);
        nand_cle    <= (req_kind == NB_CMD);
        nand_ale    <= (req_kind == NB_ADDR);
        nand_we_n   <= (req_kind == NB_RDATA);
        nand_re_n   <= (req_kind != NB_RDATA);
        nand_io_out <= req_data;
        nand_io_oe  <= (req_kind != NB_RDATA);
      end else if (run) begin
        unique case (ph)
          2'd0: ph <= 2'd1;
          2'd1: begin
            ph        <= 2'd2;
            nand_we_n <= 1'b1;
            nand_re_n <= 1'b1;
            if (kind == NB_RDATA) begin
              rd_data  <= nand_io_in;
              rd_valid <= 1'b1;
            end
          end
          default: begin            // end of cycle, no new request
            run        <= 1'b0;
            ph         <= 2'd0;
            nand_ce_n  <= '1;
            nand_cle   <= 1'b0;
            nand_ale   <= 1'b0;
            nand_io_oe <= 1'b0;
          end
        endcase
      end
    end
  end

endmodule
