// nand_array_model: NUM_CHIPS flash chip models on one shared bus, as wired on
// an acquisition and storage card. Simulation only. Each chip has its own
// chip enable and ready/busy line; the chip that drives the bus during a
// read strobe supplies `io_to_ctrl`. `errors` sums the chips' protocol errors.
module nand_array_model #(
  parameter int unsigned NUM_CHIPS     = 8,
  parameter int unsigned PAGE_BYTES    = 2048,
  parameter int unsigned PAGES         = 65536,
  parameter int unsigned PAGES_PER_BLK = 64,
  parameter int unsigned T_PROG        = 42000,
  parameter int unsigned T_READ        = 1500,
  parameter int unsigned T_ERASE       = 120
) (
  input  logic                 clk,
  input  logic [NUM_CHIPS-1:0] ce_n,
  input  logic                 cle,
  input  logic                 ale,
  input  logic                 we_n,
  input  logic                 re_n,
  input  logic [7:0]           io_from_ctrl,
  input  logic                 io_oe,
  output logic [7:0]           io_to_ctrl,
  output logic [NUM_CHIPS-1:0] rb_n,
  output int unsigned          errors
);

  logic [NUM_CHIPS-1:0][7:0] dout;
  logic [NUM_CHIPS-1:0]      drv;
  int unsigned               errs [NUM_CHIPS];

  for (genvar i = 0; i < NUM_CHIPS; i++) begin : g_chip
    nand_flash_model #(
      .PAGE_BYTES(PAGE_BYTES), .PAGES(PAGES), .PAGES_PER_BLK(PAGES_PER_BLK),
      .T_PROG(T_PROG), .T_READ(T_READ), .T_ERASE(T_ERASE)
    ) u_chip (
      .clk, .ce_n(ce_n[i]), .cle, .ale, .we_n, .re_n, .io_in(io_from_ctrl),
      .io_out(dout[i]), .io_drive(drv[i]), .rb_n(rb_n[i])
    );
    assign errs[i] = u_chip.errors;
  end

  always_comb begin
    io_to_ctrl = 8'hFF;
    for (int i = 0; i < NUM_CHIPS; i++) if (drv[i]) io_to_ctrl = dout[i];
    errors = 0;
    for (int i = 0; i < NUM_CHIPS; i++) errors += errs[i];
    // bus conflict: more than one chip driving, or chip and controller
    if ($countones(drv) > 1 || (drv != '0 && io_oe)) errors += 1000;
  end

endmodule
