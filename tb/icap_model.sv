// icap_model: behavioural model of the FPGA's internal configuration access
// port, for testbenches only (not synthesizable logic of the design).
//
// A word on din is taken on a rising clock edge while ce and we are high and
// busy is low. Clocks with ce and we high and a NOOP word on din are counted separately; the others are
// stored in order in `got` so that a testbench can compare them with the
// bitstream it sent. Every BUSY_PERIOD taken words the model raises busy for
// BUSY_LEN clocks (never when BUSY_PERIOD = 0 or busy_enable is cleared). It also counts protocol
// errors: ce rising without we having been high in the clock before, and we
// falling while ce was still high in the clock before. `out` returns the
// number of words taken.
module icap_model #(
  parameter int unsigned DEPTH       = 20000,
  parameter int unsigned BUSY_PERIOD = 7,
  parameter int unsigned BUSY_LEN    = 2,
  parameter logic [31:0] NOOP        = 32'h2000_0000
) (
  input  logic        clk,
  input  logic        ce,
  input  logic        we,
  input  logic [31:0] din,
  output logic        busy,
  output logic [31:0] out
);

  logic [31:0] got [DEPTH];
  int unsigned n_words   = 0;
  int unsigned n_noop    = 0;
  int unsigned n_busy    = 0;   // clocks a data word waited for busy
  int unsigned n_proto   = 0;
  int unsigned busy_left = 0;
  int unsigned since     = 0;
  logic        ce_d = 1'b0, we_d = 1'b0;
  bit          busy_enable = 1'b1;   // testbenches may turn busy pulses off

  initial begin
    busy = 1'b0;
    out  = '0;
  end

  always @(posedge clk) begin
    if (ce && !ce_d && !we_d) n_proto++;
    if (!we && we_d && ce_d)  n_proto++;
    ce_d <= ce;
    we_d <= we;
    if (ce && we && busy && din != NOOP) n_busy++;
    if (ce && we && din == NOOP) n_noop++;
    if (ce && we && !busy) begin
      if (din != NOOP) begin
        if (n_words < DEPTH) got[n_words] = din;
        n_words++;
        since++;
      end
    end
    if (busy_left > 0) begin
      busy_left--;
      busy <= (busy_left > 0);
    end else if (busy_enable && BUSY_PERIOD != 0 && since >= BUSY_PERIOD) begin
      since     = 0;
      busy_left = BUSY_LEN;
      busy <= 1'b1;
    end
    out <= n_words;
  end

  task automatic clear();
    n_words = 0;
    n_noop  = 0;
    n_busy  = 0;
    n_proto = 0;
    since   = 0;
  endtask

endmodule
