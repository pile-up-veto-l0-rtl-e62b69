// Pile-up veto shared constants and types.
//
// Geometry model. Each detector plane is read out as two halves (left and
// right) of N_CH comparator channels each; a channel is the OR of four
// strips, as formed by the front-end chip. Channel i is taken to sit at a
// radius that grows geometrically with i, r(i) = R_MIN * q^i with
// q = (R_MAX/R_MIN)^(1/N_CH). With that layout a straight track from a
// vertex at Z_PV, which hits plane A at radius R_A and plane B at radius
// R_B = k * R_A, always lands d = ln(k)/ln(q) channels further out on plane
// B than on plane A, whatever its angle. A z-histogram bin ("wedge between
// lines of constant k") is therefore a diagonal d = i_B - i_A of the
// coincidence matrix. The bins kept are d = D_MIN .. D_MIN+N_BINS-1, which
// with the assumed plane positions Z_A = -220 mm and Z_B = -300 mm cover a
// vertex range of +15 cm (small d) down to -15 cm (large d), with bins that
// are finer downstream and coarser upstream.
//
// The right half of the detector sits 1.5 cm further downstream than the
// left half. A vertex at z then shows up in the right half at the bin the
// left half would give for z - 1.5 cm. RIGHT_TO_LEFT maps each right-half
// bin j to the left-half bin of the same z:
//   RIGHT_TO_LEFT[j] = round( ln(k_L(z_R(D_MIN+j))) / ln(q) ) - D_MIN
// where z_R(d) is the vertex z seen by the right half at diagonal d and
// k_L(z) = (Z_B - z)/(Z_A - z). Entries of -1 fall outside the left range
// and are dropped.
//
// The 2-plane, 4-half, 128-channel split and the 48-cycle latency follow the
// description of the system; the radii, plane positions and number of bins
// are this design's own choices.
package pu_pkg;

  // Channels per detector half per plane: 512 inputs = 2 planes x 2 halves x 128.
  localparam int unsigned N_CH      = 128;
  // z-histogram bins and the first diagonal they start at.
  localparam int unsigned N_BINS    = 48;
  localparam int unsigned D_MIN     = 15;
  // Width of a half-histogram bin (at most N_CH entries) and of a combined bin.
  localparam int unsigned HW        = $clog2(N_CH + 1);
  localparam int unsigned CW        = $clog2(2 * N_CH + 1);
  localparam int unsigned BIN_W     = $clog2(N_BINS);
  // Round-robin Vertex Finder Boards, and clock cycles per event on a link.
  localparam int unsigned N_VFB     = 4;
  localparam int unsigned SER_WORDS = 4;
  // Bunch-crossing identifier width (3564 crossings per LHC turn).
  localparam int unsigned BX_W      = 12;
  localparam int unsigned BX_PER_TURN = 3564;
  // Fixed Vertex Finder latency in 25 ns steps.
  localparam int unsigned VFB_LATENCY = 48;

  typedef logic [HW-1:0]  hbin_t;
  typedef logic [CW-1:0]  cbin_t;
  typedef logic [BIN_W-1:0] bin_idx_t;
  typedef logic [BX_W-1:0] bx_t;

  typedef hbin_t [N_BINS-1:0] half_hist_t;
  typedef cbin_t [N_BINS-1:0] hist_t;

  // Hits of one event, the input of one Vertex Finder.
  typedef struct packed {
    logic [N_CH-1:0] a_left;
    logic [N_CH-1:0] a_right;
    logic [N_CH-1:0] b_left;
    logic [N_CH-1:0] b_right;
  } event_hits_t;

  // One peak of the histogram.
  typedef struct packed {
    bin_idx_t bin;
    cbin_t    height;
  } peak_t;

  // Result of one Vertex Finder for one event.
  typedef struct packed {
    logic     valid;
    bx_t      bx;
    logic [1:0] nvtx;   // 0..3 vertices found
    logic     veto;     // more vertices than allowed
    peak_t    peak1;    // highest peak, first pass
    peak_t    peak2;    // highest peak after masking
    peak_t    peak3;    // next peak after masking
  } vfb_result_t;

  // Runtime configuration shared by all Vertex Finders.
  typedef struct packed {
    cbin_t      th_first;     // minimum height of the first vertex peak
    cbin_t      th_other;     // minimum height of the second and third peaks
    logic [2:0] excl_radius;  // bins around peak 2 not searched for peak 3
    logic [1:0] max_vertices; // veto when more vertices than this are found
  } vf_config_t;

  // Monitor chain of one Vertex Finder: the result register followed by the
  // first-pass register {bx, peak1}, shifted out as one word.
  localparam int unsigned SPY1_W      = BX_W + $bits(peak_t);
  localparam int unsigned SPY_CHAIN_W = $bits(vfb_result_t) + SPY1_W;

  localparam int RIGHT_TO_LEFT [N_BINS] = '{
    -1,  0,  1,  2,  3,  4,  5,  6,  7,  8,  9,  9, 10, 11, 12, 13,
    14, 15, 16, 16, 17, 18, 19, 20, 21, 21, 22, 23, 24, 25, 26, 26,
    27, 28, 29, 30, 30, 31, 32, 33, 33, 34, 35, 36, 36, 37, 38, 39
  };

endpackage
