// par2ser: parallel-to-serial unit between the PE arrays and the SAD buffer.
//
// All active PE arrays finish a block in the same clock, each presenting a
// minimum SAD and motion vector (sad_min1..4 and the MVs). This unit captures
// them and writes them into the SAD buffer one per clock (`we`, `addr`,
// `sad_final`), computing each block's raster index from the array number p,
// the array's block counter n and the mode: with P arrays each array covers
// 4/P block rows, walking them top-down before moving one block column to
// the right. After the 16th write of a macroblock it pulses `done`.
// A `start` pulse clears the counters for a new macroblock and latches the
// mode. The design names the unit and its inputs and outputs; the capture
// register, the order of the writes (array 1 first) and the index formula
// are this implementation's. A new set of results may arrive at most every
// P+1 clocks; the ME schedule delivers one every 256.
module par2ser
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  prr_mode_e   mode,
  input  logic        res_valid,               // all active arrays' results valid
  input  blk_result_t sad_min [MAX_PRR],
  output logic        we,
  output logic [3:0]  addr,
  output blk_result_t sad_final,
  output logic        done
);

  prr_mode_e   mode_q;
  blk_result_t hold [MAX_PRR];
  logic [2:0]  pend;        // results still to write from `hold`
  logic [1:0]  p;           // array being written
  logic [3:0]  n;           // block counter of the arrays
  logic [4:0]  written;
  logic [2:0]  nprr, rows_per;
  logic [3:0]  r, c;

  always_comb begin
    nprr     = 3'd1 << mode_q;
    rows_per = 3'd4 >> mode_q;
    r        = 4'(int'(p) * int'(rows_per) + int'(n) % int'(rows_per));
    c        = 4'(int'(n) / int'(rows_per));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= PRR_1;
      for (int i = 0; i < MAX_PRR; i++) hold[i] <= '0;
      pend      <= '0;
      p         <= '0;
      n         <= '0;
      written   <= '0;
      we        <= 1'b0;
      addr      <= '0;
      sad_final <= '0;
      done      <= 1'b0;
    end else begin
      we   <= 1'b0;
      done <= 1'b0;
      if (start) begin
        mode_q  <= mode;
        pend    <= '0;
        p       <= '0;
        n       <= '0;
        written <= '0;
      end else if (pend != '0) begin
        we        <= 1'b1;
        addr      <= 4'(r * 4'd4 + c);
        sad_final <= hold[p];
        written   <= written + 1'b1;
        pend      <= pend - 1'b1;
        if (pend == 3'd1) begin
          p <= '0;
          n <= n + 1'b1;
        end else begin
          p <= p + 1'b1;
        end
        if (written == 5'd15) done <= 1'b1;
      end else if (res_valid) begin
        for (int i = 0; i < MAX_PRR; i++) hold[i] <= sad_min[i];
        pend <= nprr;
        p    <= '0;
      end
    end
  end

endmodule
