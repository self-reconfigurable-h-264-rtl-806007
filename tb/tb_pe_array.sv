// tb_pe_array: drives one 16x1 PE array the way the ME controller does,
// without frame buffers: for each of several random 4x4 blocks and random
// 19x19 search windows it streams, per horizontal displacement h, the four
// window columns h..h+3 (five bands, four clocks each, rows in snake order)
// and the matching current-block columns one column later. The fourth pixel
// of the last band is fed random data, which the array must ignore. The
// block's minimum SAD and motion vector, found here by full search, must
// appear exactly two clocks after the last pixel of the block, and each row
// of 16 candidates must take 16 clocks.
module tb_pe_array;
  import me_pkg::*;

  localparam int NB = 4;               // blocks streamed back to back

  logic        clk = 0, rst_n = 0;
  pixel_t      sw_in [NBAND];
  logic        sw_wr = 0, swap = 0, pe_en = 0, pe_first = 0, pe_last = 0;
  logic        blk_first = 0, blk_last = 0;
  logic [1:0]  sw_row = '0, c_row = '0;
  pixel_t      c_in = '0;
  off_t        h = '0;
  logic        res_valid;
  blk_result_t result;
  always #5 clk = ~clk;

  pe_array dut (.*);

  pixel_t cur [NB][4][4];       // [block][x][y]
  pixel_t win [NB][19][19];     // [block][X][Y], X = h+8+x, Y = v+8+y
  blk_result_t expect_r [NB];

  function automatic int sx(off_t v);
    return (int'(v) ^ 8) - 8;   // 4-bit two's complement to int
  endfunction

  int checks = 0, failures = 0;
  int cyc = 0, last_cyc [NB], nres = 0, first_cnt = 0, last_cnt = 0;
  always @(posedge clk) cyc++;

  initial begin
    for (int n = 0; n < NB; n++) begin
      automatic int best = 1 << 30;
      for (int x = 0; x < 4; x++)
        for (int y = 0; y < 4; y++) cur[n][x][y] = pixel_t'($urandom);
      for (int X = 0; X < 19; X++)
        for (int Y = 0; Y < 19; Y++)
          win[n][X][Y] = (n == 1) ? pixel_t'(cur[n][X % 4][Y % 4] + 1) : pixel_t'($urandom);
      for (int hh = 0; hh < 16; hh++)
        for (int vv = 0; vv < 16; vv++) begin
          automatic int s = 0;
          for (int x = 0; x < 4; x++)
            for (int y = 0; y < 4; y++) begin
              automatic int a = cur[n][x][y], b = win[n][hh + x][vv + y];
              s += a > b ? a - b : b - a;
            end
          if (s < best) begin
            best = s;
            expect_r[n].sad = sad_t'(s);
            expect_r[n].mv.h = off_t'(hh - 8);
            expect_r[n].mv.v = off_t'(vv - 8);
          end
        end
    end
  end

  initial begin
    for (int b = 0; b < NBAND; b++) sw_in[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g <= NB * 64; g++) begin
      for (int cnt = 0; cnt < 4; cnt++) begin
        @(negedge clk);
        // load slot g
        if (g < NB * 64) begin
          automatic int n = g / 64, hh = (g % 64) / 4, x = g % 4;
          automatic int k = (x % 2) ? 3 - cnt : cnt;
          for (int b = 0; b < NBAND; b++)
            sw_in[b] = (4 * b + k < 19) ? win[n][hh + x][4 * b + k] : pixel_t'($urandom);
          sw_wr = 1; sw_row = 2'(k); swap = (cnt == 3);
        end else begin
          sw_wr = 0; swap = 0;
        end
        // compute slot g-1
        if (g >= 1) begin
          automatic int n = (g - 1) / 64, hh = ((g - 1) % 64) / 4, x = (g - 1) % 4;
          automatic int y = (x % 2) ? 3 - cnt : cnt;
          c_in = cur[n][x][y]; c_row = 2'(y); pe_en = 1;
          pe_first = (x == 0 && cnt == 0);
          pe_last  = (x == 3 && cnt == 3);
          h = off_t'(hh - 8);
          blk_first = (hh == 0); blk_last = (hh == 15);
          if (pe_first) first_cnt = cyc;
          if (pe_last) begin
            checks++;
            if (cyc - first_cnt != 15) begin failures++; $display("FAIL: row length"); end
            last_cnt = cyc;
            if (blk_last) last_cyc[n] = cyc;
          end
        end
      end
    end
    @(negedge clk);
    pe_en = 0; sw_wr = 0; swap = 0; pe_first = 0; pe_last = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (nres != NB) begin failures++; $display("FAIL: %0d results of %0d", nres, NB); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && res_valid) begin
    checks++;
    if (nres >= NB || result != expect_r[nres] || cyc - last_cyc[nres] != 2) begin
      failures++;
      $display("FAIL: block %0d sad %0d mv (%0d,%0d) after %0d clocks", nres, result.sad,
               sx(result.mv.h), sx(result.mv.v), cyc - last_cyc[nres]);
    end
    nres++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
