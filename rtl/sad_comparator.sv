// sad_comparator: motion-vector selection for one 4x4 block.
//
// The 16 PEs of an array deliver, together, the SADs of the 16 vertical
// displacements v = -8..+7 at one horizontal displacement h. The comparator
// takes the smallest of the 16 (the lowest v wins a tie), compares it with
// the best SAD found so far for the block and keeps the smaller one together
// with its motion vector (h, v). `blk_first` marks the first row of
// candidates of a block (h = -8) and replaces the stored minimum;
// `blk_last` marks the last row (h = +7) and makes the final minimum SAD and
// motion vector appear on `result` with `out_valid` one cycle later.
// A later row replaces the stored minimum only when it is strictly smaller,
// so the first candidate in scan order wins ties. The design only says that
// SADs go to "the comparator unit for motion vector selection"; the
// comparison tree and the tie rule are this implementation's.
module sad_comparator
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,         // sads[] hold a complete row of candidates
  input  logic        blk_first,        // first row of the block (h = -8)
  input  logic        blk_last,         // last row of the block (h = +7)
  input  off_t        h,                // horizontal displacement of this row
  input  sad_t        sads [NPE],       // sads[i] is displacement v = i - 8
  output logic        out_valid,
  output blk_result_t result
);

  sad_t        row_min;
  off_t        row_v;
  blk_result_t best, cand;

  // Minimum of the 16 SADs, lowest index wins a tie.
  always_comb begin
    row_min = sads[0];
    row_v   = off_t'(SR_MIN);
    for (int i = 1; i < NPE; i++) begin
      if (sads[i] < row_min) begin
        row_min = sads[i];
        row_v   = off_t'(i + SR_MIN);
      end
    end
    cand.sad  = row_min;
    cand.mv.h = h;
    cand.mv.v = row_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best      <= '0;
      result    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (blk_first || cand.sad < best.sad) best <= cand;
        if (blk_last) begin
          result    <= (blk_first || cand.sad < best.sad) ? cand : best;
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
