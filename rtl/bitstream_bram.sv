// bitstream_bram: dual-port block RAM used as a cache for one partial
// bitstream.
//
// Port A belongs to the processor, which stores the decompressed partial
// bitstream through it (weA high writes dataA, otherwise the word at addrA is
// read). Port B is read by the configuration interface, which streams the
// words into the configuration port. Both ports are 32 bits wide with 14-bit
// word addresses, as in the design, so the RAM holds 2^14 words (64 KiB).
// Reads are synchronous on both ports (one clock), and a port-A read of the
// address being written returns the old word; those details are this
// implementation's choice.
module bitstream_bram #(
  parameter int unsigned AW = 14,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  // port A: processor side
  input  logic [AW-1:0] addrA,
  input  logic [DW-1:0] dataA_in,
  input  logic          weA,
  output logic [DW-1:0] dataA_out,
  // port B: configuration interface side
  input  logic [AW-1:0] addrB,
  output logic [DW-1:0] dataB
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (weA) mem[addrA] <= dataA_in;
    dataA_out <= mem[addrA];
  end

  always_ff @(posedge clk) dataB <= mem[addrB];

endmodule
