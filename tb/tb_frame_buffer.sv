// tb_frame_buffer: writes a full QCIF frame of random pixels and reads it
// through all eight read ports at random addresses, checking each pixel one
// clock after its address, and that a port with its read enable low keeps
// its last pixel.
module tb_frame_buffer;
  import me_pkg::*;

  localparam int unsigned W = FRAME_W, H = FRAME_H, NRD = NBAND_ALL;
  localparam int unsigned AW = $clog2(W * H);

  logic          clk = 0, wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  pixel_t        wr_data = '0;
  logic          rd_en   [NRD];
  logic [AW-1:0] rd_addr [NRD];
  pixel_t        last    [NRD];
  pixel_t        rd_data [NRD];
  pixel_t        model [W * H];
  always #5 clk = ~clk;

  frame_buffer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < NRD; i++) begin rd_addr[i] = '0; rd_en[i] = 1'b0; end
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      model[i] = pixel_t'($urandom);
      wr_en = 1; wr_addr = AW'(i); wr_data = model[i];
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < NRD; i++) begin
        last[i]    = rd_data[i];
        rd_addr[i] = AW'($urandom_range(W * H - 1));
        rd_en[i]   = (t < 100) || ($urandom_range(3) != 0);
      end
      @(negedge clk);
      for (int i = 0; i < NRD; i++) begin
        checks++;
        if (rd_data[i] != (rd_en[i] ? model[rd_addr[i]] : last[i])) begin
          failures++; $display("FAIL: port %0d address %0d", i, rd_addr[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
