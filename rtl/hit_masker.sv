// Removal of the hits that made up the highest peak.
//
// For peak bin p, every pair (A[a], B[a+d]) on the diagonals d of that bin
// is a combination that contributed to the peak; both hits of each such pair
// are cleared, in both planes. In the left half the bin is one diagonal,
// d = D_MIN + p. In the right half it is every diagonal D_MIN + j whose
// RIGHT_TO_LEFT[j] equals p (one or two of them). The masks are formed from
// the unmasked hits, so a hit is removed if it belongs to any contributing
// pair:
//   A' = A & ~(B >> d),   B' = B & ~(A << d)
// Combinational shifters, registered output: latency 1 cycle, one event per
// cycle. Masking the contributing hits in both stations is described; the
// diagonal form follows from the assumed geometry (pu_pkg).
module hit_masker
  import pu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  event_hits_t hits,
  input  bin_idx_t    peak_bin,
  output logic        out_valid,
  output event_hits_t hits_masked
);
  logic [N_CH-1:0] kill_al, kill_bl, kill_ar, kill_br;
  int unsigned d_left;

  always_comb begin
    d_left  = D_MIN + int'(peak_bin);
    kill_al = hits.b_left >> d_left;
    kill_bl = hits.a_left << d_left;
    kill_ar = '0;
    kill_br = '0;
    for (int j = 0; j < int'(N_BINS); j++) begin
      if (RIGHT_TO_LEFT[j] == int'(peak_bin)) begin
        kill_ar = kill_ar | (hits.b_right >> (D_MIN + j));
        kill_br = kill_br | (hits.a_right << (D_MIN + j));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      hits_masked <= '0;
    end else begin
      out_valid           <= in_valid;
      hits_masked.a_left  <= hits.a_left  & ~kill_al;
      hits_masked.b_left  <= hits.b_left  & ~kill_bl;
      hits_masked.a_right <= hits.a_right & ~kill_ar;
      hits_masked.b_right <= hits.b_right & ~kill_br;
    end
  end
endmodule
