// acq_timing: acquisition time sequence of the recorder.
//
// While recording is armed and the power-on signal S2 is high, every period of
// the trigger signal DG opens one sampling window: the window opens a fixed delay
// after the trailing (falling) edge of DG and closes at the next DG rising edge.
// The delay is chosen by PWS at the trailing edge: DELAY1_CYC clocks when PWS is
// low, DELAY2_CYC clocks when PWS is high. The window, the two delays and the
// 60 MHz time base follow the recorder's description; the delay values
// themselves are not given there, so 1 us and 2 us are this design's defaults.
//
// The block also keeps the 48-bit time count that goes into each timing mark:
// one LSB per 60 MHz clock, cleared while S2 is low and counting while it is high.
//
// Timing: S2, DG and PWS are asynchronous radar signals and pass a two-flop
// synchroniser. With dg_s the synchronised DG, `window` is first high DELAY
// clocks after dg_s falls, and last high in the clock where dg_s rises;
// `group_end` is a one-clock pulse in the clock after the window's last clock.
// A DG rising edge during the delay cancels that period's window. Dropping S2
// or `arm` during a window closes it the same way, with a group_end pulse.
module acq_timing
  import ssr_pkg::*;
#(
  parameter int unsigned DELAY1_CYC = 60,    // PWS low: X1 = 1 us at 60 MHz
  parameter int unsigned DELAY2_CYC = 120    // PWS high: X2 = 2 us at 60 MHz
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 arm,        // recording mode selected
  input  logic                 s2,         // power-on signal (async)
  input  logic                 dg,         // trigger signal (async)
  input  logic                 pws,        // delay control signal (async)
  output logic                 s2_s,       // synchronised S2
  output logic                 window,     // sample enable for all channels
  output logic                 group_end,  // one-clock pulse after a window
  output logic [TIME_BITS-1:0] time_cnt    // 48-bit timing mark count
);

  localparam int unsigned CW = $clog2((DELAY1_CYC > DELAY2_CYC ? DELAY1_CYC : DELAY2_CYC) + 1);

  logic [1:0] s2_ff, dg_ff, pws_ff;
  logic       dg_s, dg_d, pws_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_ff  <= '0;
      dg_ff  <= '1;
      pws_ff <= '0;
      dg_d   <= 1'b1;
    end else begin
      s2_ff  <= {s2_ff[0], s2};
      dg_ff  <= {dg_ff[0], dg};
      pws_ff <= {pws_ff[0], pws};
      dg_d   <= dg_s;
    end
  end
  assign s2_s  = s2_ff[1];
  assign dg_s  = dg_ff[1];
  assign pws_s = pws_ff[1];

  wire dg_fall = dg_d & ~dg_s;
  wire dg_rise = ~dg_d & dg_s;
  wire active  = arm & s2_s;

  typedef enum logic [1:0] {T_IDLE, T_DELAY, T_WINDOW} tstate_e;
  tstate_e         st;
  logic [CW-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= T_IDLE;
      cnt       <= '0;
      group_end <= 1'b0;
    end else begin
      group_end <= 1'b0;
      unique case (st)
        T_IDLE: begin
          if (active && dg_fall) begin
            // window is high from clock DELAY after the edge: DELAY-1 more clocks of delay
            cnt <= CW'((pws_s ? DELAY2_CYC : DELAY1_CYC) - 2);
            st  <= T_DELAY;
          end
        end
        T_DELAY: begin
          if (!active || dg_rise)  st <= T_IDLE;
          else if (cnt == '0)      st <= T_WINDOW;
          else                     cnt <= cnt - 1'b1;
        end
        T_WINDOW: begin
          if (!active || dg_rise) begin
            st        <= T_IDLE;
            group_end <= 1'b1;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // The window includes the clock in which the closing edge is seen.
  assign window = (st == T_WINDOW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      time_cnt <= '0;
    else if (!s2_s)  time_cnt <= '0;
    else             time_cnt <= time_cnt + 1'b1;
  end

  initial begin
    assert (DELAY1_CYC >= 2 && DELAY2_CYC >= 2)
      else $error("acq_timing: delays must be at least 2 clocks");
  end

endmodule
