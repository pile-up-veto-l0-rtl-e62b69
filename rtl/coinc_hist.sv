// Coincidence matrix and z-histogram of one detector half.
//
// Every hit channel a of plane A is combined with every hit channel b of
// plane B. With channel radii growing geometrically (see pu_pkg), all the
// combinations that point back to the same vertex position lie on one
// diagonal d = b - a of the A x B matrix, so histogram bin i, which stands
// for diagonal d = DMIN + i, is the number of channels a for which both
// A[a] and B[a+d] fired:
//   hist[i] = popcount( hits_a & (hits_b >> (DMIN + i)) )
// All NB bins are computed in parallel in one clock cycle; the result is
// registered. Latency 1 cycle, one event per cycle.
//
// The coincidence-matrix principle and its projection onto z are the
// described method; mapping a z-bin to one matrix diagonal rests on this
// design's assumed log-spaced channel radii.
module coinc_hist
  import pu_pkg::*;
#(
  parameter int unsigned N    = N_CH,
  parameter int unsigned NB   = N_BINS,
  parameter int unsigned DMIN = D_MIN
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic [N-1:0]                     hits_a,
  input  logic [N-1:0]                     hits_b,
  output logic                             out_valid,
  output logic [NB-1:0][$clog2(N+1)-1:0]   hist
);
  localparam int unsigned W = $clog2(N + 1);

  logic [NB-1:0][W-1:0] hist_c;

  always_comb begin
    for (int unsigned i = 0; i < NB; i++) begin
      hist_c[i] = W'($countones(hits_a & (hits_b >> (DMIN + i))));
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
