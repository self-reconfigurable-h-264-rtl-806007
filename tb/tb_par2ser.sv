// tb_par2ser: for each mode (1, 2, 4 arrays) presents 16/P sets of random
// results, as the arrays would at the end of each block, and checks that the
// unit writes each array's result once, to the raster entry of the block that
// array handled (array p covers block rows p*4/P .. (p+1)*4/P-1, walking down
// each block column before the next), and pulses done after the 16th write.
module tb_par2ser;
  import me_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, res_valid = 0;
  prr_mode_e   mode = PRR_1;
  blk_result_t sad_min [MAX_PRR];
  logic        we, done;
  logic [3:0]  addr;
  blk_result_t sad_final;
  always #5 clk = ~clk;

  par2ser dut (.*);

  int checks = 0, failures = 0;
  blk_result_t expect_at [16];
  int          writes [16];
  int          nwrites = 0, ndone = 0, done_at = -1;

  always @(negedge clk) if (rst_n) begin
    if (we) begin
      writes[addr]++;
      nwrites++;
      checks++;
      if (sad_final != expect_at[addr]) begin
        failures++; $display("FAIL: entry %0d data", addr);
      end
    end
    if (done) begin
      ndone++;
      done_at = nwrites;
    end
  end

  initial begin
    for (int i = 0; i < MAX_PRR; i++) sad_min[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      prr_mode_e m;
      int nprr, rows;
      m = prr_mode_e'(rep % 3);
      nprr = 1 << (rep % 3);
      rows = 4 / nprr;
      for (int i = 0; i < 16; i++) begin writes[i] = 0; expect_at[i] = '0; end
      nwrites = 0; ndone = 0; done_at = -1;
      @(negedge clk);
      start = 1; mode = m;
      @(negedge clk);
      start = 0;
      for (int col = 0; col < 4; col++)
        for (int rr = 0; rr < rows; rr++) begin
          repeat ($urandom_range(8) + nprr + 1) @(negedge clk);
          for (int p = 0; p < MAX_PRR; p++) begin
            sad_min[p] = blk_result_t'($urandom);
            if (p < nprr) expect_at[(p * rows + rr) * 4 + col] = sad_min[p];
          end
          res_valid = 1;
          @(negedge clk);
          res_valid = 0;
          for (int p = 0; p < MAX_PRR; p++) sad_min[p] = blk_result_t'($urandom);
        end
      repeat (nprr + 3) @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (writes[i] != 1) begin failures++; $display("FAIL: mode %0d entry %0d written %0d times", nprr, i, writes[i]); end
      end
      checks++;
      if (ndone != 1 || done_at != 16) begin
        failures++; $display("FAIL: mode %0d done %0d times, after %0d writes", nprr, ndone, done_at);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
