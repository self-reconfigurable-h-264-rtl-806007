// tb_me_controller: runs the controller for macroblocks in every mode,
// inside the frame and at its corners, and compares, clock by clock, its
// read addresses with a schedule built here from nested loops (block column,
// block row, h, window column, row in snake order), with window coordinates
// clamped to the frame. The control signals must follow one clock later.
// Also checks the busy time, (64 * 16/P + 1) * 4 clocks, the read enables
// (5, 7 or 8 bands for P = 1, 2, 4) and the number of pixels read.
module tb_me_controller;
  import me_pkg::*;

  localparam int unsigned W = FRAME_W, H = FRAME_H;
  localparam int unsigned AW = $clog2(W * H);

  logic          clk = 0, rst_n = 0, start = 0;
  logic [3:0]    mb_x = '0, mb_y = '0;
  prr_mode_e     mode = PRR_1;
  logic          busy;
  logic [AW-1:0] ref_addr [NBAND_ALL];
  logic          ref_en   [NBAND_ALL];
  logic [AW-1:0] cur_addr [MAX_PRR];
  logic          cur_en   [MAX_PRR];
  logic          sw_wr, swap, pe_en, pe_first, pe_last, blk_first, blk_last;
  logic [1:0]    sw_row, c_row;
  off_t          h;
  always #5 clk = ~clk;

  me_controller dut (.*);

  int checks = 0, failures = 0, errs = 0;

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic int pa(int x, int y);
    return clampi(y, 0, H - 1) * W + clampi(x, 0, W - 1);
  endfunction

  // Expected per-slot data.
  typedef struct {
    int bx, by, h, x;     // block of array 0, displacement, block column
  } slot_t;
  slot_t sl [1100];

  task automatic run(int mx, int my, int m);
    automatic int nprr = 1 << m, rows = 4 / nprr, ns = 0;
    automatic int busy_clks = 0, ref_reads = 0, cur_reads = 0;
    automatic int used_bands = (m == 0) ? 5 : (m == 1) ? 7 : 8;
    errs = 0;
    for (int col = 0; col < 4; col++)
      for (int rr = 0; rr < rows; rr++)
        for (int hh = -8; hh <= 7; hh++)
          for (int x = 0; x < 4; x++) begin
            sl[ns].bx = mx * 16 + col * 4;
            sl[ns].by = my * 16 + rr * 4;
            sl[ns].h  = hh;
            sl[ns].x  = x;
            ns++;
          end
    @(negedge clk);
    start = 1; mb_x = 4'(mx); mb_y = 4'(my); mode = prr_mode_e'(m);
    @(negedge clk);
    start = 0;
    for (int g = 0; g <= ns; g++)
      for (int cnt = 0; cnt < 4; cnt++) begin
        int k, y;
        bit exp_first, exp_last;
        if (busy) busy_clks++;
        for (int b = 0; b < 8; b++) if (ref_en[b]) ref_reads++;
        for (int p = 0; p < MAX_PRR; p++) if (cur_en[p]) cur_reads++;
        for (int b = 0; b < 8; b++) if (ref_en[b] != (g < ns && b < used_bands)) errs++;
        for (int p = 0; p < MAX_PRR; p++) if (cur_en[p] != (g >= 1 && p < nprr)) errs++;
        if (g < ns) begin
          k = (sl[g].x % 2) ? 3 - cnt : cnt;
          for (int b = 0; b < 8; b++)
            if (ref_addr[b] != AW'(pa(sl[g].bx + sl[g].h + sl[g].x, sl[g].by - 8 + 4 * b + k))) errs++;
        end
        if (g >= 1) begin
          y = (sl[g-1].x % 2) ? 3 - cnt : cnt;
          for (int p = 0; p < nprr; p++)
            if (cur_addr[p] != AW'(pa(sl[g-1].bx + sl[g-1].x, sl[g-1].by + p * rows * 4 + y))) errs++;
        end
        exp_first = g >= 1 && sl[g-1].x == 0 && cnt == 0;
        exp_last  = g >= 1 && sl[g-1].x == 3 && cnt == 3;
        @(negedge clk);
        if (sw_wr != (g < ns)) errs++;
        if (g < ns && (sw_row != 2'(k) || swap != (cnt == 3))) errs++;
        if (pe_en != (g >= 1)) errs++;
        if (g >= 1) begin
          if (c_row != 2'(y) || pe_first != exp_first || pe_last != exp_last) errs++;
          if (exp_last && (h != off_t'(sl[g-1].h) || blk_first != (sl[g-1].h == -8)
                           || blk_last != (sl[g-1].h == 7))) errs++;
        end
      end
    checks++;
    if (errs != 0) begin failures++; $display("FAIL: MB (%0d,%0d) P=%0d: %0d mismatches", mx, my, nprr, errs); end
    checks++;
    if (busy || busy_clks != (ns + 1) * 4) begin
      failures++; $display("FAIL: busy for %0d clocks", busy_clks);
    end
    // every band pixel the active arrays use is read once per load clock,
    // and each of the 256 pixels of the 16 blocks once per displacement h
    checks++;
    if (ref_reads != ns * 4 * used_bands || cur_reads != 16 * 16 * 16) begin
      failures++; $display("FAIL: P=%0d read %0d reference and %0d current pixels", nprr, ref_reads, cur_reads);
    end
    $display("P=%0d: %0d reference pixels (%0d Kbit) and %0d current pixels per macroblock",
             nprr, ref_reads, ref_reads * 8 / 1000, cur_reads);
    @(negedge clk);
    checks++;
    if (sw_wr || pe_en) begin failures++; $display("FAIL: activity after the macroblock"); end
  endtask

  initial begin
    for (int i = 0; i < 1100; i++) sl[i] = '{0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(5, 4, 0);
    run(0, 0, 1);
    run(10, 8, 2);
    run(0, 8, 0);
    run(10, 0, 1);
    run(3, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
