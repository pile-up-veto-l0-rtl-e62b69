// Combination of the left and right half histograms.
//
// The two detector halves are displaced along the beam by 1.5 cm, so the
// same vertex position falls in different bins of the two half histograms.
// Each right-half bin j is added into left-half bin RIGHT_TO_LEFT[j] (the
// left bin covering the same z; -1 = outside the range, dropped):
//   hist[p] = hist_l[p] + sum over j with RIGHT_TO_LEFT[j] == p of hist_r[j]
// Combinational adders, registered output: latency 1 cycle, one event per
// cycle. The need for the correction is described; the table form and its
// values follow from this design's assumed geometry (pu_pkg).
module half_combine
  import pu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  half_hist_t hist_l,
  input  half_hist_t hist_r,
  output logic       out_valid,
  output hist_t      hist
);
  hist_t hist_c;

  always_comb begin
    for (int p = 0; p < int'(N_BINS); p++) begin
      hist_c[p] = cbin_t'(hist_l[p]);
      for (int j = 0; j < int'(N_BINS); j++) begin
        if (RIGHT_TO_LEFT[j] == p) hist_c[p] = hist_c[p] + cbin_t'(hist_r[j]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hist      <= '0;
    end else begin
      out_valid <= in_valid;
      hist      <= hist_c;
    end
  end
endmodule
