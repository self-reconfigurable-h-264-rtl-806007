// config_if: configuration interface between the bitstream BlockRAM and the
// FPGA's internal configuration access port (ICAP).
//
// When the processor pulses `start`, the module copies `length` 32-bit words
// from BlockRAM port B into the ICAP, relieving the processor of the
// transfer. The sequence follows the design's control flow:
//   1. raise we_icap;
//   2. one clock later raise ce_icap;
//   3. present one word per clock on din_icap, holding it while busy_icap is
//      high (a word is taken on a clock edge with ce, we high and busy low);
//   4./5. advance the address counter until the last word has been taken;
//   6. wait eight clocks with ce still high;
//   7. drop ce_icap;
//   8. one clock later drop we_icap and pulse `done`.
// ce_icap, we_icap and busy_icap are treated as active high, as the design
// describes them. During the eight-clock wait din_icap carries a type-1 NOOP
// word (0x2000_0000) so that the port is fed nothing but padding; that value,
// the word unit of `length`, ignoring `start` while busy or with length 0,
// and the registered copy of the port's output (`icap_status`) are this
// implementation's choices.
//
// Timing: BlockRAM reads take one clock; the address for the next word is
// issued combinationally (addrB) so that a stream without busy runs at one
// word per clock. A transfer of N words takes N + 10 clocks from the clock
// after `start` to `done`, plus one clock per busy cycle.
module config_if #(
  parameter int unsigned AW = 14,
  parameter logic [31:0] NOOP = 32'h2000_0000
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          start,
  input  logic [AW:0]   length,      // words, 1 .. 2^AW
  output logic          busy,
  output logic          done,
  output logic [31:0]   icap_status, // last word seen on the ICAP output
  // BlockRAM port B
  output logic [AW-1:0] addrB,
  input  logic [31:0]   dataB,
  // ICAP
  output logic          ce_icap,
  output logic          we_icap,
  output logic [31:0]   din_icap,
  input  logic          busy_icap,
  input  logic [31:0]   out_icap
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_WE_SETUP,
    S_SEND,
    S_FLUSH,
    S_CE_OFF
  } state_e;

  state_e        state;
  logic [AW-1:0] addr;
  logic [AW:0]   len_q;
  logic [2:0]    wait_cnt;
  logic          last_word;

  assign last_word = ({1'b0, addr} == len_q - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      addr        <= '0;
      len_q       <= '0;
      wait_cnt    <= '0;
      done        <= 1'b0;
      icap_status <= '0;
    end else begin
      done        <= 1'b0;
      icap_status <= out_icap;
      unique case (state)
        S_IDLE: if (start && length != '0) begin
          len_q <= length;
          addr  <= '0;
          state <= S_WE_SETUP;
        end
        S_WE_SETUP: state <= S_SEND;
        S_SEND: if (!busy_icap) begin
          if (last_word) begin
            wait_cnt <= '0;
            state    <= S_FLUSH;
          end else begin
            addr <= addr + 1'b1;
          end
        end
        S_FLUSH: begin
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 3'd7) state <= S_CE_OFF;
        end
        S_CE_OFF: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    we_icap  = (state != S_IDLE);
    ce_icap  = (state == S_SEND) || (state == S_FLUSH);
    busy     = (state != S_IDLE);
    din_icap = (state == S_SEND) ? dataB : NOOP;
    // Next word's address: the BlockRAM output then follows the counter.
    if (state == S_SEND && !busy_icap && !last_word) addrB = addr + 1'b1;
    else if (state == S_SEND)                        addrB = addr;
    else                                             addrB = '0;
  end

  // A word presented while the port is busy must stay on the bus.
  a_hold_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SEND && busy_icap) |=> (state == S_SEND && $stable(din_icap)));
  // ce is only ever high while we is high.
  a_ce_within_we: assert property (@(posedge clk) disable iff (!rst_n)
    ce_icap |-> we_icap);

endmodule
