// sad_buffer: result store of one macroblock.
//
// Sixteen entries, one per 4x4 block in raster order (entry = 4*row + column
// of the block inside the macroblock), each holding the block's 12-bit
// minimum SAD and its 8-bit motion vector. The parallel-to-serial unit writes
// one entry per clock; the processor reads entries back through the bus-side
// port with one clock of latency. Entry contents and widths are the design's;
// the raster entry order and the registered read are this implementation's.
module sad_buffer
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  wr_addr,
  input  blk_result_t sad_final,
  input  logic [3:0]  rd_addr,
  output blk_result_t rd_data
);

  blk_result_t mem [NBLK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBLK; i++) mem[i] <= '0;
      rd_data <= '0;
    end else begin
      if (we) mem[wr_addr] <= sad_final;
      rd_data <= mem[rd_addr];
    end
  end

endmodule
