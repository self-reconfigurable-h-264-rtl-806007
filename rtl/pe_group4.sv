// pe_group4: one "4x1 PE" group of the 16x1 array.
//
// Four PEs evaluate four neighbouring vertical displacements (j = 0..3 of
// the group). The group sees the seven latched window pixels its PEs can
// need, win[0..6]; PE j takes win[j + c_row] through a 4:1 multiplexer, so
// with the broadcast current pixel c(x, y = c_row) it accumulates
// |c(x,y) - window(v0 + j + y)|. Four such groups side by side, with
// overlapping windows, form the 16x1 array. The grouping follows the
// design's array figure; the slice-and-multiplex form is this
// implementation's. Timing is that of sad_pe: sums update one clock after
// the pixel.
module pe_group4
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  pixel_t     win [BLK + BLK - 1],   // window rows v0 .. v0+6
  input  pixel_t     c_in,
  input  logic [1:0] c_row,
  input  logic       pe_en,
  input  logic       pe_first,
  output sad_t       sads [BLK]
);

  for (genvar j = 0; j < BLK; j++) begin : g_pe
    sad_pe u_pe (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (pe_en),
      .first(pe_first),
      .c    (c_in),
      .sw   (win[j + int'(c_row)]),
      .acc  (sads[j])
    );
  end

endmodule
