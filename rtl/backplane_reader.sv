// backplane_reader: read sequencer of the USB control card.
//
// When the ground computer reads the recorder, the data of the acquisition
// and storage cards is fetched over the back plane one channel after another:
// channel 0 (card 0, I), channel 1 (card 0, Q), channel 2 (card 1, I), and so
// on. The sequencer starts a channel's read, passes its words to the write
// FIFO of the USB 2.0 controller, and moves on when that channel reports
// `ch_done`. Reading the cards one by one follows the recorder's description;
// the channel order and the FIFO-style USB interface (16-bit data, write
// strobe, full flag, as on common USB 2.0 peripheral controllers) are this
// design's choices.
//
// Timing: `start` is a one-clock pulse; `ch_start[k]` pulses in the clock
// after channel k is selected. A word moves in every clock in which the
// selected channel has one and `usb_full` is low (usb_wr = ch_valid[k] &
// !usb_full, combinational). `done` pulses once after the last channel.
module backplane_reader
  import ssr_pkg::*;
#(
  parameter int unsigned NUM_CH = 6
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              done,
  output logic                              active,
  output logic [$clog2(NUM_CH)-1:0]         cur_ch,
  // back plane, one stream per channel
  output logic [NUM_CH-1:0]                 ch_start,
  input  logic [NUM_CH-1:0]                 ch_valid,
  input  logic [NUM_CH-1:0][WORD_BITS-1:0]  ch_data,
  output logic [NUM_CH-1:0]                 ch_ready,
  input  logic [NUM_CH-1:0]                 ch_done,
  // USB controller FIFO
  output logic [WORD_BITS-1:0]              usb_data,
  output logic                              usb_wr,
  input  logic                              usb_full
);

  typedef enum logic [1:0] {B_IDLE, B_START, B_XFER} bstate_e;
  bstate_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= B_IDLE;
      cur_ch   <= '0;
      ch_start <= '0;
      done     <= 1'b0;
    end else begin
      ch_start <= '0;
      done     <= 1'b0;
      unique case (st)
        B_IDLE:  if (start) begin cur_ch <= '0; st <= B_START; end
        B_START: begin
          ch_start[cur_ch] <= 1'b1;
          st               <= B_XFER;
        end
        B_XFER: if (ch_done[cur_ch]) begin
          if (cur_ch == ($clog2(NUM_CH))'(NUM_CH - 1)) begin
            done <= 1'b1;
            st   <= B_IDLE;
          end else begin
            cur_ch <= cur_ch + 1'b1;
            st     <= B_START;
          end
        end
        default: st <= B_IDLE;
      endcase
    end
  end

  assign active = (st != B_IDLE);

  always_comb begin
    ch_ready = '0;
    usb_wr   = 1'b0;
    usb_data = ch_data[cur_ch];
    if (st == B_XFER) begin
      ch_ready[cur_ch] = !usb_full;
      usb_wr           = ch_valid[cur_ch] && !usb_full;
    end
  end

endmodule
