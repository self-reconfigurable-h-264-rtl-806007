// pe_array: the 16x1 PE array held by one partially reconfigurable region.
//
// The array evaluates the 16 vertical displacements v = -8..+7 of one
// horizontal displacement h of a 4x4 current block in parallel, one PE per
// displacement, arranged as four 4x1 PE groups. The search window is read as
// five bands of four rows (rows -8..-5, -4..-1, 0..3, 4..7 and 8..10 relative
// to the block's top row), one pixel per band per clock: 40 bits per cycle.
// Four clocks fill the band latches with one 19-pixel column of the window
// (the fourth pixel of the last band is a constant 0); on the fourth write
// `swap` copies the column into the active latches, from which each PE picks,
// through a 4:1 multiplexer, the pixel of its displacement at the current
// block row `c_row`. While a column is being used the next one is loaded, so
// a column costs four clocks and a row of 16 candidates sixteen (four
// columns of four pixels). The current pixel c is broadcast to all PEs.
// After the 16th pixel (`pe_last`) the 16 SADs go to the comparator, which
// keeps the minimum SAD and motion vector of the block.
//
// Which band latch and which row are used each clock, and the block and row
// framing flags, are driven by the ME controller; the array holds no
// counters. The band split, the 16x1 organisation, the 4x1 groups, the
// zero pad and the snake scan order of the controller follow the design;
// the double set of column latches is this implementation's way of loading
// the next column while the PEs still work on the current one. The PEs sit
// in four pe_group4 instances.
//
// Timing: a row's SADs reach the comparator one clock after `pe_last`, and
// `res_valid` with the block's minimum follows one clock later (after the
// row with `blk_last`).
module pe_array
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // search-window load
  input  pixel_t      sw_in [NBAND],   // one pixel of each band
  input  logic        sw_wr,           // write sw_in into latch row sw_row
  input  logic [1:0]  sw_row,          // row within the band (0..3)
  input  logic        swap,            // column complete: move to active latches
  // computation
  input  pixel_t      c_in,            // current-block pixel (broadcast)
  input  logic [1:0]  c_row,           // its row y inside the 4x4 block
  input  logic        pe_en,           // c_in is valid
  input  logic        pe_first,        // first pixel of a candidate row
  input  logic        pe_last,         // last pixel of a candidate row
  input  off_t        h,               // horizontal displacement, valid with pe_last
  input  logic        blk_first,       // valid with pe_last
  input  logic        blk_last,        // valid with pe_last
  // result
  output logic        res_valid,
  output blk_result_t result
);

  pixel_t load_q   [NBAND][BLK];
  pixel_t active_q [NCOL];
  sad_t   sads     [NPE];

  logic   row_done_q, blk_first_q, blk_last_q;
  off_t   h_q;

  // Band latches; band 4 holds only rows 8..10, its fourth latch is 0.
  function automatic pixel_t band_pix(int b, int k, pixel_t p);
    return (b == NBAND - 1 && k == BLK - 1) ? 8'd0 : p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBAND; b++)
        for (int k = 0; k < BLK; k++) load_q[b][k] <= '0;
      for (int i = 0; i < NCOL; i++) active_q[i] <= '0;
    end else begin
      if (sw_wr)
        for (int b = 0; b < NBAND; b++) load_q[b][sw_row] <= band_pix(b, int'(sw_row), sw_in[b]);
      if (swap)
        for (int b = 0; b < NBAND; b++)
          for (int k = 0; k < BLK; k++)
            active_q[b*BLK + k] <= (sw_wr && sw_row == 2'(k)) ? band_pix(b, k, sw_in[b])
                                                              : load_q[b][k];
    end
  end

  // Four 4x1 PE groups; group g covers displacements 4g-8 .. 4g-5 and sees
  // window rows 4g .. 4g+6 of the active column.
  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    pixel_t win [BLK + BLK - 1];
    sad_t   gsads [BLK];

    always_comb
      for (int k = 0; k < BLK + BLK - 1; k++) win[k] = active_q[g * BLK + k];

    pe_group4 u_grp (
      .clk     (clk),
      .rst_n   (rst_n),
      .win     (win),
      .c_in    (c_in),
      .c_row   (c_row),
      .pe_en   (pe_en),
      .pe_first(pe_first),
      .sads    (gsads)
    );

    for (genvar j = 0; j < BLK; j++) begin : g_out
      assign sads[g * BLK + j] = gsads[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_done_q  <= 1'b0;
      blk_first_q <= 1'b0;
      blk_last_q  <= 1'b0;
      h_q         <= '0;
    end else begin
      row_done_q  <= pe_en && pe_last;
      if (pe_en && pe_last) begin
        blk_first_q <= blk_first;
        blk_last_q  <= blk_last;
        h_q         <= h;
      end
    end
  end

  sad_comparator u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (row_done_q),
    .blk_first(blk_first_q),
    .blk_last (blk_last_q),
    .h        (h_q),
    .sads     (sads),
    .out_valid(res_valid),
    .result   (result)
  );

endmodule
