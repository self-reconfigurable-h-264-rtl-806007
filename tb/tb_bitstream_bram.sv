// tb_bitstream_bram: fills the whole 2^14-word RAM through port A, then reads
// every word back through port B and a random sample through port A, each
// with one clock of latency.
module tb_bitstream_bram;

  localparam int AW = 14;
  logic          clk = 0, weA = 0;
  logic [AW-1:0] addrA = '0, addrB = '0;
  logic [31:0]   dataA_in = '0, dataA_out, dataB;
  always #5 clk = ~clk;

  bitstream_bram dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [31:0] word(int i);
    return 32'(i) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
  endfunction

  initial begin
    for (int i = 0; i < 2 ** AW; i++) begin
      @(negedge clk);
      weA = 1; addrA = AW'(i); dataA_in = word(i);
    end
    @(negedge clk);
    weA = 0;
    for (int i = 0; i < 2 ** AW; i++) begin
      addrB = AW'(i);
      addrA = AW'($urandom);
      @(negedge clk);
      checks++;
      if (dataB != word(i)) begin failures++; $display("FAIL: port B word %0d", i); end
      if (i % 16 == 0) begin
        checks++;
        if (dataA_out != word(int'(addrA))) begin failures++; $display("FAIL: port A word %0d", addrA); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
