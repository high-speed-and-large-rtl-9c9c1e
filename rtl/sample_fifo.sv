// sample_fifo: high-speed 16-bit buffer between the A/D path and the flash.
//
// Samples arrive in bursts of one word per 60 MHz clock while the sampling
// window is open; the flash side takes one word per six clocks (10 MWord/s).
// The FIFO absorbs the difference. The buffering role and word width follow
// the recorder's description; the depth is not given there, and 16K words
// (the size of common 16K x 18 high-speed FIFO chips) is this design's choice.
//
// Write side: `wr_en` pushes `wr_data` unless the FIFO is full; a push into a
// full FIFO is dropped and sets the sticky `overflow` flag, which `clr`
// clears together with the contents. Read side is first-word-fall-through:
// `rd_valid` says `rd_data` holds the oldest word, `rd_en` takes it.
// The storage is an array with a registered read port (one output register
// in front of it), so it maps to block RAM. `level` counts all held words;
// with the output register the FIFO holds DEPTH + 1 words.
module sample_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16384     // words, power of two
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  output logic                       full,
  output logic                       overflow,
  output logic                       rd_valid,
  output logic [WIDTH-1:0]           rd_data,
  input  logic                       rd_en,
  output logic [$clog2(DEPTH+1):0]   level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      mcount;           // words in the array
  logic             push, pull, take;

  assign full = (mcount == (AW+1)'(DEPTH));
  assign push = wr_en && !full;
  assign take = rd_valid && rd_en;
  // refill the output register from the array when it is empty or being taken
  assign pull = (mcount != '0) && (!rd_valid || take);

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= wr_data;
    if (pull) rd_data   <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      mcount   <= '0;
      rd_valid <= 1'b0;
      overflow <= 1'b0;
    end else if (clr) begin
      wptr     <= '0;
      rptr     <= '0;
      mcount   <= '0;
      rd_valid <= 1'b0;
      overflow <= 1'b0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pull) rptr <= rptr + 1'b1;
      mcount <= mcount + (AW+1)'(push) - (AW+1)'(pull);
      if (pull)      rd_valid <= 1'b1;
      else if (take) rd_valid <= 1'b0;
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  assign level = ($clog2(DEPTH+1)+1)'(mcount) + ($clog2(DEPTH+1)+1)'(rd_valid);

  initial assert ((1 << AW) == DEPTH) else $error("sample_fifo: DEPTH must be a power of two");

endmodule
