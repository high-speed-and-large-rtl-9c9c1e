// mode_ctrl: selects the function mode of the recorder.
//
// The recorder has five function modes: acquisition and recording, data
// holding, data erasing, data reading and self-checking. Data holding is the
// rest state: the flash keeps its contents and nothing is written. From there:
//   * S2 (power-on signal of the radar seeker) going high starts recording;
//     recording ends when S2 is low again and every channel has written its
//     buffered data and its index page (`ch_busy` all low);
//   * an erase command from the ground computer starts erasing, which ends
//     when all channels are idle again;
//   * a read command starts reading, which ends with `read_done` from the
//     back-plane read sequencer;
//   * a self-check command raises `check_req` until `check_done` returns.
// The list of modes follows the recorder's description; how a mode is entered
// and left is not described and is this design's choice. S2 has priority in
// the holding mode; a command that arrives in another mode is ignored.
//
// Timing: `erase_start` and `read_start` are one-clock pulses in the first
// clock of their mode. `rec_en` is high for the whole recording mode while S2
// is high. A mode waits SETTLE clocks before it looks at `ch_busy`, so that
// channels have raised busy by then.
module mode_ctrl
  import ssr_pkg::*;
#(
  parameter int unsigned SETTLE = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s2_s,          // synchronised power-on signal
  input  logic  cmd_erase,     // one-clock command pulses from the USB card
  input  logic  cmd_read,
  input  logic  cmd_check,
  input  logic  ch_busy,       // OR of all channels' busy
  input  logic  read_done,     // back-plane read of all channels finished
  input  logic  check_done,    // self-check finished
  output mode_e mode,
  output logic  rec_en,
  output logic  erase_start,
  output logic  read_start,
  output logic  check_req
);

  localparam int unsigned SW = $clog2(SETTLE + 1);
  logic [SW-1:0] settle;
  wire           settled = (settle == SW'(SETTLE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= MODE_HOLD;
      settle      <= '0;
      erase_start <= 1'b0;
      read_start  <= 1'b0;
    end else begin
      erase_start <= 1'b0;
      read_start  <= 1'b0;
      if (!settled) settle <= settle + 1'b1;
      unique case (mode)
        MODE_HOLD: begin
          settle <= '0;
          if (s2_s)            mode <= MODE_RECORD;
          else if (cmd_erase) begin mode <= MODE_ERASE; erase_start <= 1'b1; end
          else if (cmd_read)  begin mode <= MODE_READ;  read_start  <= 1'b1; end
          else if (cmd_check)  mode <= MODE_CHECK;
        end
        MODE_RECORD: begin
          if (s2_s)                       settle <= '0;
          else if (settled && !ch_busy)   mode <= MODE_HOLD;
        end
        MODE_ERASE: if (settled && !ch_busy) mode <= MODE_HOLD;
        MODE_READ:  if (read_done)           mode <= MODE_HOLD;
        MODE_CHECK: if (check_done)          mode <= MODE_HOLD;
        default:    mode <= MODE_HOLD;
      endcase
    end
  end

  assign rec_en    = (mode == MODE_RECORD) && s2_s;
  assign check_req = (mode == MODE_CHECK);

endmodule
