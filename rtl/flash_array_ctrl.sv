// flash_array_ctrl: storage controller for the flash array of one channel.
//
// Recording (circulatory write). The array is NUM_CHIPS flash chips on one
// bus. A chip takes 2 kByte into its page buffer in about 100 us (20 MByte/s)
// and then programs it by itself for 200 to 700 us. The controller therefore
// fills the page buffer of chip 0, starts its programming, moves straight on to
// chip 1, and so on; by the time it comes back to chip 0, seven other pages
// (about 700 us) have been written and chip 0 is ready again. Linear page p
// goes to chip p mod NUM_CHIPS, row RES_ROWS + p div NUM_CHIPS. Words are
// stored low byte first. Before a page is opened the controller waits for the
// chip's ready/busy line, so a slow chip only stalls the stream (`stall`).
// When recording stops and the input is drained, a partly filled page is
// programmed as it is and the index page is written. A full array takes no
// more words; the index is then written as soon as recording stops.
//
// Index area. Block 0 of every chip is kept out of the data area; page 0 of
// chip 0 holds the index: bytes 0-3 the number of pages written, bytes 4-5
// the number of valid bytes in the last page, bytes 6-7 the signature 5AA5h
// (all little-endian). Reading uses it to fetch only the written area; an
// erased (or never written) index reads as "no data".
//
// Reading. Data comes out in inverted order, newest first: the pages from the
// last written down to page 0, each page from its first byte, as 16-bit words.
//
// Erasing. Every block of every chip is erased, chip-minor so that the chips
// erase in parallel.
//
// The circulatory write, the index area, the inverted read order and the byte
// order follow the recorder's description. The index layout, the reserved
// block, the page order within the inverted read, the need to erase before
// recording and the standard NAND command sequences are this design's choices.
//
// Interfaces: `rec_en` is a level (rising edge starts recording, falling edge
// ends it once `in_drained`); `erase_start` and `read_start` are pulses taken
// in the idle state. Input words are first-word-fall-through (in_valid,
// in_data, in_ready pops). Output words use valid/ready; `read_done` pulses
// after the last word has been taken. Bus cycles go to nand_phy through a
// valid/ready request. Timing: three clocks per written byte; about four
// clocks per read byte when the output is not stalled.
module flash_array_ctrl
  import ssr_pkg::*;
#(
  parameter int unsigned NUM_CHIPS      = 8,
  parameter int unsigned PAGE_BYTES     = 2048,
  parameter int unsigned PAGES_PER_CHIP = 65536,
  parameter int unsigned PAGES_PER_BLK  = 64,
  parameter int unsigned RES_ROWS       = 64,     // rows kept for the index area
  parameter int unsigned TWB_CYC        = 12      // wait before sampling R/B#
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // control
  input  logic                          rec_en,
  input  logic                          in_drained,
  input  logic                          erase_start,
  input  logic                          read_start,
  output logic                          busy,
  output logic                          full,
  output logic                          stall,
  output logic [31:0]                   page_count,
  output logic                          read_done,
  // recorded words in
  input  logic                          in_valid,
  input  logic [WORD_BITS-1:0]          in_data,
  output logic                          in_ready,
  // read words out
  output logic                          out_valid,
  output logic [WORD_BITS-1:0]          out_data,
  input  logic                          out_ready,
  // to nand_phy
  output logic                          req_valid,
  input  logic                          req_ready,
  output nand_cycle_e                   req_kind,
  output logic [7:0]                    req_data,
  output logic [$clog2(NUM_CHIPS)-1:0]  req_chip,
  input  logic                          phy_rd_valid,
  input  logic [7:0]                    phy_rd_data,
  input  logic [NUM_CHIPS-1:0]          rb_n          // ready/busy, high = ready
);

  localparam int unsigned CB         = (NUM_CHIPS > 1) ? $clog2(NUM_CHIPS) : 1;
  localparam int unsigned BW         = $clog2(PAGE_BYTES + 1);
  localparam int unsigned DATA_PAGES = NUM_CHIPS * (PAGES_PER_CHIP - RES_ROWS);
  localparam int unsigned BLOCKS     = PAGES_PER_CHIP / PAGES_PER_BLK;
  localparam int unsigned TW         = $clog2(TWB_CYC + 1);

  typedef enum logic [1:0] {OP_PROG, OP_PEND, OP_READ, OP_ERASE} seq_op_e;

  typedef enum logic [4:0] {
    S_IDLE, S_SEQ, S_TWB, S_WAITRB,
    S_R_START, S_R_OPEN, S_R_DATA, S_R_DONE,
    S_X_OPEN, S_X_DATA, S_X_END,
    S_E_NEXT, S_E_CMD, S_E_ADV,
    S_I_OPEN, S_I_RD, S_I_CHK,
    S_P_OPEN, S_P_RD, S_P_NEXT, S_DONE
  } state_e;

  state_e       st, seq_next, twb_next, wait_next;
  seq_op_e      seq_op;
  logic [2:0]   seq_step;
  logic [CB-1:0] seq_chip;
  logic [15:0]  seq_row;
  logic [TW-1:0] twb_cnt;
  logic         wait_all;
  logic [CB-1:0] wait_chip;

  logic [31:0]  pcnt;          // pages written (record) / current page (read)
  logic [BW-1:0] bcnt;         // byte index within the page
  logic [BW-1:0] nbytes;       // bytes to read from the current page
  logic [15:0]  last_bytes;
  logic [7:0]   word_hi;       // high byte of the word being written
  logic [7:0]   low_q;
  logic         rd_pending;
  logic [15:0]  blk;
  logic [CB-1:0] e_chip;
  logic [7:0]   idx_rx [8];
  logic         rec_en_d;

  logic [1:0][NUM_CHIPS-1:0] rb_ff;
  wire  [NUM_CHIPS-1:0] rb_s = rb_ff[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rb_ff <= '0;
    else        rb_ff <= {rb_ff[0], rb_n};
  end

  // chip and row of linear data page p
  function automatic logic [CB-1:0] chip_of(input logic [31:0] p);
    return CB'(p % NUM_CHIPS);
  endfunction
  function automatic logic [15:0] row_of(input logic [31:0] p);
    return 16'(RES_ROWS + p / NUM_CHIPS);
  endfunction

  // command sequences: length and the byte of each step
  function automatic logic [2:0] seq_len(input seq_op_e op);
    unique case (op)
      OP_PROG:  return 3'd5;   // 80h, col, col, row, row
      OP_PEND:  return 3'd1;   // 10h
      OP_READ:  return 3'd6;   // 00h, col, col, row, row, 30h
      default:  return 3'd4;   // 60h, row, row, D0h
    endcase
  endfunction

  logic [7:0]  seq_byte;
  nand_cycle_e seq_kind;
  always_comb begin
    seq_kind = NB_ADDR;
    seq_byte = 8'h00;           // column address is always 0
    unique case (seq_op)
      OP_PROG: begin
        if (seq_step == 3'd0) begin seq_kind = NB_CMD; seq_byte = NAND_PROG1; end
        else if (seq_step == 3'd3) seq_byte = seq_row[7:0];
        else if (seq_step == 3'd4) seq_byte = seq_row[15:8];
      end
      OP_PEND: begin seq_kind = NB_CMD; seq_byte = NAND_PROG2; end
      OP_READ: begin
        if (seq_step == 3'd0) begin seq_kind = NB_CMD; seq_byte = NAND_READ1; end
        else if (seq_step == 3'd3) seq_byte = seq_row[7:0];
        else if (seq_step == 3'd4) seq_byte = seq_row[15:8];
        else if (seq_step == 3'd5) begin seq_kind = NB_CMD; seq_byte = NAND_READ2; end
      end
      default: begin
        if (seq_step == 3'd0) begin seq_kind = NB_CMD; seq_byte = NAND_ERASE1; end
        else if (seq_step == 3'd1) seq_byte = seq_row[7:0];
        else if (seq_step == 3'd2) seq_byte = seq_row[15:8];
        else begin seq_kind = NB_CMD; seq_byte = NAND_ERASE2; end
      end
    endcase
  end

  // index page contents
  logic [7:0] idx_tx;
  always_comb begin
    unique case (bcnt[2:0])
      3'd0: idx_tx = pcnt[7:0];
      3'd1: idx_tx = pcnt[15:8];
      3'd2: idx_tx = pcnt[23:16];
      3'd3: idx_tx = pcnt[31:24];
      3'd4: idx_tx = last_bytes[7:0];
      3'd5: idx_tx = last_bytes[15:8];
      3'd6: idx_tx = INDEX_MAGIC[7:0];
      default: idx_tx = INDEX_MAGIC[15:8];
    endcase
  end

  wire slot_free = !req_valid || req_ready;
  wire rb_ok     = wait_all ? (&rb_s) : rb_s[wait_chip];
  wire out_free  = !out_valid || out_ready;
  wire can_read  = (!rd_pending || phy_rd_valid) && out_free;

  assign in_ready = (st == S_R_DATA) && slot_free && (bcnt != BW'(PAGE_BYTES))
                    && !bcnt[0] && in_valid;
  assign busy       = (st != S_IDLE);
  assign full       = (st == S_R_START) && (pcnt == DATA_PAGES);
  assign stall      = (st == S_WAITRB) && !rb_ok;
  assign page_count = pcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      seq_next   <= S_IDLE;
      twb_next   <= S_IDLE;
      wait_next  <= S_IDLE;
      seq_op     <= OP_PROG;
      seq_step   <= '0;
      seq_chip   <= '0;
      seq_row    <= '0;
      twb_cnt    <= '0;
      wait_all   <= 1'b0;
      wait_chip  <= '0;
      pcnt       <= '0;
      bcnt       <= '0;
      nbytes     <= '0;
      last_bytes <= '0;
      word_hi    <= '0;
      low_q      <= '0;
      rd_pending <= 1'b0;
      blk        <= '0;
      e_chip     <= '0;
      idx_rx     <= '{default: 8'hFF};
      rec_en_d   <= 1'b0;
      req_valid  <= 1'b0;
      req_kind   <= NB_CMD;
      req_data   <= '0;
      req_chip   <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      read_done  <= 1'b0;
    end else begin
      rec_en_d  <= rec_en;
      read_done <= 1'b0;
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (phy_rd_valid) rd_pending <= 1'b0;

      unique case (st)
        S_IDLE: begin
          if (rec_en && !rec_en_d) begin
            pcnt       <= '0;
            last_bytes <= 16'(PAGE_BYTES);
            st         <= S_R_START;
          end else if (erase_start) begin
            blk    <= '0;
            e_chip <= '0;
            st     <= S_E_NEXT;
          end else if (read_start) begin
            st <= S_I_OPEN;
          end
        end

        // ---- shared sub-sequences ----
        S_SEQ: if (slot_free) begin
          req_valid <= 1'b1;
          req_kind  <= seq_kind;
          req_data  <= seq_byte;
          req_chip  <= seq_chip;
          if (seq_step == seq_len(seq_op) - 3'd1) begin
            seq_step <= '0;
            st       <= seq_next;
          end else begin
            seq_step <= seq_step + 1'b1;
          end
        end
        S_TWB: begin
          if (req_valid)                 twb_cnt <= '0;
          else if (twb_cnt == TW'(TWB_CYC)) begin
            twb_cnt <= '0;
            st      <= twb_next;
          end else                       twb_cnt <= twb_cnt + 1'b1;
        end
        S_WAITRB: if (rb_ok) st <= wait_next;

        // ---- recording ----
        S_R_START: begin
          // a full array ends the recording without waiting for the input
          if (!rec_en && (in_drained || pcnt == DATA_PAGES)) begin
            wait_all  <= 1'b1;
            wait_next <= S_X_OPEN;
            st        <= S_WAITRB;
          end else if (pcnt != DATA_PAGES && in_valid) begin
            wait_all  <= 1'b0;
            wait_chip <= chip_of(pcnt);
            wait_next <= S_R_OPEN;
            st        <= S_WAITRB;
          end
        end
        S_R_OPEN: begin
          seq_op   <= OP_PROG;
          seq_chip <= chip_of(pcnt);
          seq_row  <= row_of(pcnt);
          seq_next <= S_R_DATA;
          bcnt     <= '0;
          st       <= S_SEQ;
        end
        S_R_DATA: if (slot_free) begin
          if (bcnt == BW'(PAGE_BYTES)) begin
            seq_op   <= OP_PEND;
            seq_next <= S_R_DONE;
            st       <= S_SEQ;
          end else if (!bcnt[0]) begin
            if (in_valid) begin
              word_hi   <= in_data[15:8];
              req_valid <= 1'b1;
              req_kind  <= NB_WDATA;
              req_data  <= in_data[7:0];
              bcnt      <= bcnt + 1'b1;
            end else if (in_drained && !rec_en) begin
              seq_op   <= OP_PEND;       // program the partly filled page
              seq_next <= S_R_DONE;
              st       <= S_SEQ;
            end
          end else begin
            req_valid <= 1'b1;
            req_kind  <= NB_WDATA;
            req_data  <= word_hi;
            bcnt      <= bcnt + 1'b1;
          end
        end
        S_R_DONE: begin
          pcnt       <= pcnt + 1'b1;
          last_bytes <= 16'(bcnt);
          twb_next   <= S_R_START;
          st         <= S_TWB;
        end

        // ---- index page write ----
        S_X_OPEN: begin
          seq_op   <= OP_PROG;
          seq_chip <= '0;
          seq_row  <= '0;
          seq_next <= S_X_DATA;
          bcnt     <= '0;
          st       <= S_SEQ;
        end
        S_X_DATA: if (slot_free) begin
          if (bcnt == BW'(8)) begin
            seq_op   <= OP_PEND;
            seq_next <= S_X_END;
            st       <= S_SEQ;
          end else begin
            req_valid <= 1'b1;
            req_kind  <= NB_WDATA;
            req_data  <= idx_tx;
            bcnt      <= bcnt + 1'b1;
          end
        end
        S_X_END: begin
          wait_all  <= 1'b1;
          wait_next <= S_IDLE;
          twb_next  <= S_WAITRB;
          st        <= S_TWB;
        end

        // ---- erasing ----
        S_E_NEXT: begin
          wait_all  <= 1'b0;
          wait_chip <= e_chip;
          wait_next <= S_E_CMD;
          st        <= S_WAITRB;
        end
        S_E_CMD: begin
          seq_op   <= OP_ERASE;
          seq_chip <= e_chip;
          seq_row  <= 16'(blk * PAGES_PER_BLK);
          seq_next <= S_TWB;
          twb_next <= S_E_ADV;
          st       <= S_SEQ;
        end
        S_E_ADV: begin
          if (e_chip == CB'(NUM_CHIPS - 1)) begin
            e_chip <= '0;
            blk    <= blk + 1'b1;
            if (blk == 16'(BLOCKS - 1)) begin
              wait_all  <= 1'b1;
              wait_next <= S_IDLE;
              st        <= S_WAITRB;
            end else st <= S_E_NEXT;
          end else begin
            e_chip <= e_chip + 1'b1;
            st     <= S_E_NEXT;
          end
        end

        // ---- reading: index page ----
        S_I_OPEN: begin
          seq_op    <= OP_READ;
          seq_chip  <= '0;
          seq_row   <= '0;
          seq_next  <= S_TWB;
          twb_next  <= S_WAITRB;
          wait_all  <= 1'b0;
          wait_chip <= '0;
          wait_next <= S_I_RD;
          bcnt      <= '0;
          st        <= S_SEQ;
        end
        S_I_RD: begin
          if (phy_rd_valid) begin
            idx_rx[bcnt[2:0]] <= phy_rd_data;
            bcnt              <= bcnt + 1'b1;
            if (bcnt == BW'(7)) st <= S_I_CHK;
          end
          if (slot_free && !rd_pending && !phy_rd_valid && bcnt != BW'(8)) begin
            req_valid  <= 1'b1;
            req_kind   <= NB_RDATA;
            req_chip   <= '0;
            rd_pending <= 1'b1;
          end
        end
        S_I_CHK: begin
          if ({idx_rx[7], idx_rx[6]} == INDEX_MAGIC &&
              {idx_rx[3], idx_rx[2], idx_rx[1], idx_rx[0]} != 32'd0) begin
            pcnt   <= {idx_rx[3], idx_rx[2], idx_rx[1], idx_rx[0]} - 1'b1;
            nbytes <= BW'({idx_rx[5], idx_rx[4]});
            st     <= S_P_OPEN;
          end else begin
            st <= S_DONE;               // vacant: nothing was recorded
          end
        end

        // ---- reading: data pages, newest first ----
        S_P_OPEN: begin
          seq_op    <= OP_READ;
          seq_chip  <= chip_of(pcnt);
          seq_row   <= row_of(pcnt);
          seq_next  <= S_TWB;
          twb_next  <= S_WAITRB;
          wait_all  <= 1'b0;
          wait_chip <= chip_of(pcnt);
          wait_next <= S_P_RD;
          bcnt      <= '0;
          st        <= S_SEQ;
        end
        S_P_RD: begin
          if (phy_rd_valid) begin
            if (!bcnt[0]) low_q <= phy_rd_data;
            else begin
              out_data  <= {phy_rd_data, low_q};
              out_valid <= 1'b1;
            end
            bcnt <= bcnt + 1'b1;
          end
          if (slot_free && can_read && (bcnt + BW'(rd_pending)) != nbytes) begin
            req_valid  <= 1'b1;
            req_kind   <= NB_RDATA;
            req_chip   <= chip_of(pcnt);
            rd_pending <= 1'b1;
          end
          if (bcnt == nbytes && !rd_pending && out_free) st <= S_P_NEXT;
        end
        S_P_NEXT: begin
          if (pcnt == '0) st <= S_DONE;
          else begin
            pcnt   <= pcnt - 1'b1;
            nbytes <= BW'(PAGE_BYTES);
            st     <= S_P_OPEN;
          end
        end
        S_DONE: begin
          if (out_free) begin
            read_done <= 1'b1;
            st        <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert ((1 << CB) == NUM_CHIPS || NUM_CHIPS == 1)
      else $error("flash_array_ctrl: NUM_CHIPS must be a power of two");
    assert (PAGES_PER_CHIP <= 65536) else $error("flash_array_ctrl: two row address bytes only");
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && !req_ready) |=> (req_valid && $stable(req_data) && $stable(req_kind)))
    else $error("flash_array_ctrl: request changed before it was taken");

endmodule
