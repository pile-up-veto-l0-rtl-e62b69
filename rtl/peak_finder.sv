// Highest-peak search over the z-histogram.
//
// Returns the bin with the largest count and that count. On equal counts the
// lower bin wins. When excl_en is set, the bins within excl_radius of
// excl_center are left out of the search; this is how the third peak is
// looked for next to an already found second peak. If every bin is excluded
// the result is bin 0 with height 0.
// One combinational compare chain, registered output: latency 1 cycle, one
// histogram per cycle. Searching peaks is described; the tie rule and the
// exclusion window are this design's choices.
module peak_finder
  import pu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  hist_t      hist,
  input  logic       excl_en,
  input  bin_idx_t   excl_center,
  input  logic [2:0] excl_radius,
  output logic       out_valid,
  output peak_t      peak
);
  peak_t best;

  always_comb begin
    best = '0;
    for (int i = 0; i < int'(N_BINS); i++) begin
      automatic int offs = (i > int'(excl_center)) ? i - int'(excl_center)
                                                   : int'(excl_center) - i;
      automatic logic excluded = excl_en && (offs <= int'(excl_radius));
      if (!excluded && hist[i] > best.height) begin
        best.bin    = bin_idx_t'(i);
        best.height = hist[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      peak      <= '0;
    end else begin
      out_valid <= in_valid;
      peak      <= best;
    end
  end
endmodule
