// tb_sad_comparator: feeds 16 rows of 16 SADs (h = -8..+7, v = -8..+7) per
// block, with random values and with deliberate ties, and checks that the
// minimum SAD and its motion vector appear one clock after the last row,
// the first candidate in (h, v) scan order winning ties.
module tb_sad_comparator;
  import me_pkg::*;

  logic        clk = 0, rst_n = 0, in_valid = 0, blk_first = 0, blk_last = 0;
  off_t        h = '0;
  sad_t        sads [NPE];
  logic        out_valid;
  blk_result_t result;
  always #5 clk = ~clk;

  sad_comparator dut (.*);

  function automatic int sx(off_t v);
    return (int'(v) ^ 8) - 8;   // 4-bit two's complement to int
  endfunction

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < NPE; i++) sads[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 300; blk++) begin
      automatic int best = 1 << 30, bh = 0, bv = 0;
      automatic int range = (blk % 3 == 0) ? 4 : 4095;     // small range: many ties
      for (int hh = -8; hh <= 7; hh++) begin
        @(negedge clk);
        in_valid = 1; blk_first = (hh == -8); blk_last = (hh == 7); h = off_t'(hh);
        for (int i = 0; i < NPE; i++) begin
          automatic int s = $urandom_range(range);
          sads[i] = sad_t'(s);
          if (s < best) begin best = s; bh = hh; bv = i - 8; end
        end
        if (hh != 7 && $urandom_range(2) == 0) begin   // idle gap between rows
          @(negedge clk);
          in_valid = 0;
          checks++;
          if (out_valid) begin failures++; $display("FAIL: early valid"); end
        end
      end
      @(negedge clk);
      in_valid = 0; blk_first = 0; blk_last = 0;
      checks++;
      if (!out_valid || result.sad != sad_t'(best) || result.mv.h != off_t'(bh) || result.mv.v != off_t'(bv)) begin
        failures++;
        $display("FAIL: block %0d got v=%0b sad %0d (%0d,%0d) expected %0d (%0d,%0d)", blk, out_valid,
                 result.sad, sx(result.mv.h), sx(result.mv.v), best, bh, bv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
