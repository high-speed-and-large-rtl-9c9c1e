// nand_flash_model: behavioural model of one large-page NAND flash chip
// (2 kByte pages, 64 pages per block, 65536 pages = 128 MByte by default).
// Simulation only. It latches commands and addresses on the rising edge of
// WE#, keeps written pages in a sparse store (unwritten bytes read FFh),
// and models the busy times of read (00h-30h), page program (80h-10h) and
// block erase (60h-D0h) with R/B#, counted in cycles of `clk`. Programming
// ANDs the buffer into the page, as real flash does. Protocol errors (a
// command while busy, a read strobe while busy, a data cycle outside a
// program) are counted in `errors`.
module nand_flash_model #(
  parameter int unsigned PAGE_BYTES    = 2048,
  parameter int unsigned PAGES         = 65536,
  parameter int unsigned PAGES_PER_BLK = 64,
  parameter int unsigned T_PROG        = 42000,   // 700 us at 60 MHz
  parameter int unsigned T_READ        = 1500,    // 25 us
  parameter int unsigned T_ERASE       = 120      // shortened erase time
) (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] io_in,
  output logic [7:0] io_out,
  output logic       io_drive,
  output logic       rb_n
);

  typedef logic [PAGE_BYTES*8-1:0] page_t;
  page_t pages [int unsigned];

  logic [7:0]  pbuf [PAGE_BYTES];
  logic [7:0]  rbuf [PAGE_BYTES];
  longint unsigned cyc = 0, busy_until = 0;
  int unsigned col = 0, row = 0, acnt = 0;
  logic [7:0]  cmd = 8'hFF;
  logic        in_prog = 1'b0;
  int unsigned errors = 0, n_prog = 0, n_read = 0, n_erase = 0;

  always @(posedge clk) cyc <= cyc + 1;
  assign rb_n = (cyc >= busy_until);

  always @(posedge we_n) if (!ce_n) begin
    if (cle) begin
      if (!rb_n) errors++;
      cmd = io_in;
      acnt = 0;
      case (io_in)
        8'h80: begin
          in_prog = 1'b1;
          col = 0; row = 0;
          for (int i = 0; i < PAGE_BYTES; i++) pbuf[i] = 8'hFF;
        end
        8'h10: begin
          page_t old;
          if (!in_prog) errors++;
          old = pages.exists(row) ? pages[row] : '1;
          for (int i = 0; i < PAGE_BYTES; i++) old[i*8 +: 8] = old[i*8 +: 8] & pbuf[i];
          pages[row] = old;
          in_prog = 1'b0;
          n_prog++;
          busy_until = cyc + T_PROG;
        end
        8'h00: begin col = 0; row = 0; end
        8'h30: begin
          page_t cur;
          cur = pages.exists(row) ? pages[row] : '1;
          for (int i = 0; i < PAGE_BYTES; i++) rbuf[i] = cur[i*8 +: 8];
          n_read++;
          busy_until = cyc + T_READ;
        end
        8'h60: row = 0;
        8'hD0: begin
          int unsigned b0;
          b0 = row - (row % PAGES_PER_BLK);
          for (int unsigned r = b0; r < b0 + PAGES_PER_BLK; r++)
            if (pages.exists(r)) pages.delete(r);
          n_erase++;
          busy_until = cyc + T_ERASE;
        end
        default: errors++;
      endcase
    end else if (ale) begin
      if (cmd == 8'h60) begin
        if (acnt == 0) row = io_in; else row = row | (int'(io_in) << 8);
      end else begin
        case (acnt)
          0: col = io_in;
          1: col = col | (int'(io_in) << 8);
          2: row = io_in;
          default: row = row | (int'(io_in) << 8);
        endcase
      end
      acnt++;
    end else begin
      if (!in_prog || col >= PAGE_BYTES) errors++;
      else pbuf[col] = io_in;
      col++;
    end
  end

  always @(negedge re_n) if (!ce_n && !rb_n) errors++;
  always @(posedge re_n) if (!ce_n) col++;

  assign io_drive = !ce_n && !re_n;
  assign io_out   = (col < PAGE_BYTES) ? rbuf[col] : 8'hFF;

  initial for (int i = 0; i < PAGE_BYTES; i++) begin pbuf[i] = 8'hFF; rbuf[i] = 8'hFF; end

endmodule
