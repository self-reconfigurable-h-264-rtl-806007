// me_controller: address generation and data-flow control of the full-search
// motion estimation for one 16x16 macroblock.
//
// Depending on `mode` one, two or four PE arrays work in lock step. With one
// array it visits all sixteen 4x4 blocks; with two, the first array takes the
// top eight blocks and the second the bottom eight; with four, array p takes
// block row p. Each array walks its blocks from the top-left block downwards,
// column after column. All arrays therefore work on blocks of the same block
// column whose rows differ by a fixed number of block rows, so they can share
// one set of search-window bands: the controller addresses NBAND_ALL = 8
// bands (rows -8+4b .. -5+4b, b = 0..7, relative to the first array's block)
// and array p uses bands p*(4/P) .. p*(4/P)+4. Read enables mark the bands
// and current-frame ports actually needed, 5, 7 or 8 bands (40, 56 or 64
// bits per clock) for P = 1, 2, 4.
//
// For one block the search covers h, v in [-8,+7]. For each h the arrays
// receive the four window columns h..h+3 of the block, each column as four
// clocks of one pixel per band (a "slot"), and the current-block column
// x = 0..3 that goes with it one slot later. Rows are scanned in snake order
// (down in even block columns, up in odd ones). A block takes 64 slots
// (256 clocks); the slots of consecutive blocks follow each other without a
// gap, and one extra slot at the end lets the last column be computed. A
// macroblock with P arrays thus takes (16/P * 64 + 1) * 4 clocks of issue.
//
// Window coordinates outside the frame are clamped to the nearest frame
// pixel (edge extension). Frame buffers have one clock of read latency, so
// every control output except the addresses is registered to arrive with the
// pixels.
//
// What follows the design: the 1/2/4-array partition of the macroblock, the
// top-to-bottom block order, five bands of the window per array, a 16-clock
// row of candidates and the snake scan. What is this implementation's own: the
// slot schedule, the band sharing between arrays, edge clamping and the
// start/busy/done handshake (start is ignored while busy).
module me_controller
  import me_pkg::*;
#(
  parameter int unsigned W  = FRAME_W,
  parameter int unsigned H  = FRAME_H,
  localparam int unsigned AW = $clog2(W * H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [3:0]    mb_x,          // macroblock column
  input  logic [3:0]    mb_y,          // macroblock row
  input  prr_mode_e     mode,
  output logic          busy,
  // frame buffer read addresses
  output logic [AW-1:0] ref_addr [NBAND_ALL],
  output logic          ref_en   [NBAND_ALL],   // band read this clock
  output logic [AW-1:0] cur_addr [MAX_PRR],
  output logic          cur_en   [MAX_PRR],     // current pixel read this clock
  // PE array control (shared by all arrays), aligned with the read data
  output logic          sw_wr,
  output logic [1:0]    sw_row,
  output logic          swap,
  output logic          pe_en,
  output logic [1:0]    c_row,
  output logic          pe_first,
  output logic          pe_last,
  output off_t          h,
  output logic          blk_first,
  output logic          blk_last
);

  localparam int unsigned SLOTS_PER_BLK = 64;

  logic [10:0]  slot;       // slot being loaded (0 .. nslots)
  logic [1:0]   cnt;        // clock inside the slot
  logic [10:0]  nslots;     // 64 * blocks per array
  prr_mode_e    mode_q;
  logic [3:0]   mbx_q, mby_q;

  // Decoded fields of the slot being loaded (L) and computed (C).
  logic [9:0]   slot_c;
  logic         ld_on, cp_on;
  logic [3:0]   n_l, n_c;
  logic [3:0]   hh_l, hh_c;   // h + 8
  logic [1:0]   x_l, x_c;
  logic [1:0]   k_l, y_c;
  logic [2:0]   rows_per;
  int           r0_l, c_l, r0_c, c_c;

  always_comb begin
    rows_per = 3'd4 >> mode_q;
    ld_on    = busy && (slot < nslots);
    cp_on    = busy && (slot != '0);
    slot_c   = 10'(slot - 1'b1);

    n_l  = slot[9:6];   hh_l = slot[5:2];   x_l = slot[1:0];
    n_c  = slot_c[9:6]; hh_c = slot_c[5:2]; x_c = slot_c[1:0];
    k_l  = x_l[0] ? ~cnt : cnt;    // snake scan of the rows
    y_c  = x_c[0] ? ~cnt : cnt;

    r0_l = int'(n_l) % int'(rows_per);  c_l = int'(n_l) / int'(rows_per);
    r0_c = int'(n_c) % int'(rows_per);  c_c = int'(n_c) / int'(rows_per);
  end

  function automatic logic [AW-1:0] pix_addr(int x, int y);
    int xc, yc;
    xc = (x < 0) ? 0 : (x > int'(W) - 1) ? int'(W) - 1 : x;
    yc = (y < 0) ? 0 : (y > int'(H) - 1) ? int'(H) - 1 : y;
    return AW'(yc * int'(W) + xc);
  endfunction

  // Read addresses (combinational from the counters).
  always_comb begin
    int wx, wy, cx, cy;
    wx = int'(mbx_q) * int'(MB) + c_l * int'(BLK) + int'(hh_l) + SR_MIN + int'(x_l);
    for (int b = 0; b < int'(NBAND_ALL); b++) begin
      wy = int'(mby_q) * int'(MB) + r0_l * int'(BLK) + SR_MIN + b * int'(BLK) + int'(k_l);
      ref_addr[b] = pix_addr(wx, wy);
    end
    cx = int'(mbx_q) * int'(MB) + c_c * int'(BLK) + int'(x_c);
    for (int p = 0; p < int'(MAX_PRR); p++) begin
      cy = int'(mby_q) * int'(MB) + (p * int'(rows_per) + r0_c) * int'(BLK) + int'(y_c);
      cur_addr[p] = pix_addr(cx, cy);
      cur_en[p]   = cp_on && p < (1 << mode_q);
    end
    // Only the bands some active array uses are read: 5 + (P-1)*4/P of 8.
    for (int b = 0; b < int'(NBAND_ALL); b++)
      ref_en[b] = ld_on && b < int'(NBAND) + ((1 << mode_q) - 1) * int'(rows_per);
  end

  // Counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      slot   <= '0;
      cnt    <= '0;
      nslots <= '0;
      mode_q <= PRR_1;
      mbx_q  <= '0;
      mby_q  <= '0;
    end else if (!busy) begin
      if (start) begin
        busy   <= 1'b1;
        slot   <= '0;
        cnt    <= '0;
        mode_q <= mode;
        mbx_q  <= mb_x;
        mby_q  <= mb_y;
        nslots <= 11'(SLOTS_PER_BLK * (NBLK >> mode));
      end
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == 2'd3) begin
        if (slot == nslots) busy <= 1'b0;
        else                slot <= slot + 1'b1;
      end
    end
  end

  // Control aligned with the frame-buffer read data (one clock later).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_wr <= 1'b0; sw_row <= '0; swap <= 1'b0;
      pe_en <= 1'b0; c_row <= '0; pe_first <= 1'b0; pe_last <= 1'b0;
      h <= '0; blk_first <= 1'b0; blk_last <= 1'b0;
    end else begin
      sw_wr     <= ld_on;
      sw_row    <= k_l;
      swap      <= ld_on && cnt == 2'd3;
      pe_en     <= cp_on;
      c_row     <= y_c;
      pe_first  <= cp_on && x_c == 2'd0 && cnt == 2'd0;
      pe_last   <= cp_on && x_c == 2'd3 && cnt == 2'd3;
      h         <= off_t'(hh_c) ^ 4'b1000;   // hh - 8 in two's complement
      blk_first <= hh_c == 4'd0;
      blk_last  <= hh_c == 4'd15;
    end
  end

endmodule
