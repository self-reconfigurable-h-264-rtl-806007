// tb_sad_buffer: writes random results into the 16 entries in random order
// and reads them back (one clock of read latency), also reading an entry in
// the same clock as it is written.
module tb_sad_buffer;
  import me_pkg::*;

  logic        clk = 0, rst_n = 0, we = 0;
  logic [3:0]  wr_addr = '0, rd_addr = '0;
  blk_result_t sad_final = '0, rd_data;
  blk_result_t model [NBLK];
  always #5 clk = ~clk;

  sad_buffer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NBLK; i++) model[i] = '0;
    for (int t = 0; t < 500; t++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(15);
      we = $urandom_range(1);
      wr_addr = 4'(a);
      sad_final = blk_result_t'($urandom);
      rd_addr = 4'($urandom_range(15));
      if (we) model[a] = sad_final;
      @(negedge clk);
      we = 0;
      checks++;
      if (rd_data != model[rd_addr] && !(rd_addr == wr_addr)) begin
        failures++; $display("FAIL: entry %0d", rd_addr);
      end
      @(negedge clk);
      checks++;
      if (rd_data != model[rd_addr]) begin
        failures++; $display("FAIL: entry %0d after write", rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
