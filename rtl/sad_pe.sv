// sad_pe: one processing element of the 16x1 SAD array.
//
// Each clock with `en` high the PE forms the absolute difference |c - sw| of a
// current-block pixel and a search-window pixel and adds it into its
// accumulator register; `first` marks the first of the 16 pixels of a 4x4
// candidate and restarts the sum instead of adding. After the 16th pixel the
// register holds the candidate's SAD until the next `first`. The structure
// (|a-b|, add-accumulate, register) is the one of the design; the restart
// flag and the active-low reset are this implementation's choices.
//
// Timing: `acc` shows the sum including the pixel presented in cycle t from
// cycle t+1 on.
module sad_pe
  import me_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,      // accumulate this cycle
  input  logic   first,   // first pixel of a candidate: restart the sum
  input  pixel_t c,       // current-block pixel (broadcast)
  input  pixel_t sw,      // search-window pixel for this PE's candidate
  output sad_t   acc      // running / final SAD
);

  pixel_t ad;

  always_comb ad = (c > sw) ? pixel_t'(c - sw) : pixel_t'(sw - c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (en) begin
      if (first)      acc <= sad_t'(ad);
      else            acc <= acc + sad_t'(ad);
    end
  end

endmodule
