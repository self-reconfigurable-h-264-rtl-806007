// tb_sad_pe: checks one SAD processing element. Random 16-pixel candidates
// (with random idle clocks in between) must leave the sum of absolute
// differences in the register exactly one clock after the 16th pixel, and
// the register must hold while `en` is low; `first` must restart the sum.
module tb_sad_pe;
  import me_pkg::*;

  logic   clk = 0, rst_n = 0, en = 0, first = 0;
  pixel_t c = '0, sw = '0;
  sad_t   acc;
  always #5 clk = ~clk;

  sad_pe dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int sum = 0;
      automatic int pix = 0;
      while (pix < 16) begin
        @(negedge clk);
        if ($urandom_range(3) == 0) begin
          en = 0;
        end else begin
          int a, b;
          a = $urandom_range(255);
          b = (t % 7 == 0) ? 255 - a : $urandom_range(255);
          en = 1; first = (pix == 0); c = pixel_t'(a); sw = pixel_t'(b);
          sum += (a > b) ? a - b : b - a;
          pix++;
        end
      end
      @(negedge clk);
      en = 0; first = 0;
      checks++;
      if (acc != sad_t'(sum)) begin
        failures++;
        $display("FAIL: candidate %0d sad %0d expected %0d", t, acc, sum);
      end
      @(negedge clk);
      checks++;
      if (acc != sad_t'(sum)) begin
        failures++;
        $display("FAIL: candidate %0d not held", t);
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
