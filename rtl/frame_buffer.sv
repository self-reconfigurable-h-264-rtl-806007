// frame_buffer: on-chip store of one video frame (current or reference).
//
// The processor writes the frame one 8-bit pixel at a time through a simple
// bus-side port; the ME controller reads NRD pixels per clock, one per read
// port, from any addresses. Pixels are stored in raster order
// (address = y * W + x). Reads are synchronous: the pixel addressed in cycle t
// with rd_en high is on rd_data from cycle t+1, like a block RAM; a port
// whose rd_en is low keeps its last pixel (no memory access). The design fixes the frame
// format (QCIF, 176x144) and that the controller fetches current and
// reference pixels from such buffers; the number of read ports (one per PE
// array for the current frame, one per search-window band for the reference
// frame), the 8-bit write port and the read latency are this
// implementation's choices.
module frame_buffer
  import me_pkg::*;
#(
  parameter int unsigned W   = FRAME_W,
  parameter int unsigned H   = FRAME_H,
  parameter int unsigned NRD = NBAND_ALL,
  localparam int unsigned AW = $clog2(W * H)
) (
  input  logic          clk,
  // bus-side write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  pixel_t        wr_data,
  // read ports
  input  logic          rd_en   [NRD],
  input  logic [AW-1:0] rd_addr [NRD],
  output pixel_t        rd_data [NRD]
);

  pixel_t mem [W * H];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    for (int i = 0; i < NRD; i++)
      if (rd_en[i]) rd_data[i] <= mem[rd_addr[i]];
  end

endmodule
