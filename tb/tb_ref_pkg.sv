// Reference model and stimulus helpers shared by the pile-up veto
// testbenches.
//
// The model recomputes the vertex finding directly from its definition,
// pair by pair over the full coincidence matrix (no shifts, no popcounts),
// so that it is independent of how the RTL is built:
//   - a pair (A[a], B[b]) of one half falls in diagonal d = b - a;
//   - left-half bin p holds diagonal D_MIN + p, right-half diagonal
//     D_MIN + j is added to bin RIGHT_TO_LEFT[j];
//   - peak: highest count, lowest bin on ties, bin 0 if all counts are 0;
//   - masking clears both hits of every pair that fell in the peak bin.
// gen_event builds events with a given number of vertices: each vertex is a
// bin, each of its tracks is a pair of hits on one of that bin's diagonals in
// a random half, and noise hits are added on top.
package tb_ref_pkg;
  import pu_pkg::*;

  typedef int unsigned hist_arr_t [N_BINS];

  function automatic void ref_hist(input event_hits_t h, output hist_arr_t c);
    for (int p = 0; p < int'(N_BINS); p++) c[p] = 0;
    for (int a = 0; a < int'(N_CH); a++) begin
      for (int b = 0; b < int'(N_CH); b++) begin
        int j;
        j = b - a - int'(D_MIN);
        if (j >= 0 && j < int'(N_BINS)) begin
          if (h.a_left[a] && h.b_left[b]) c[j]++;
          if (h.a_right[a] && h.b_right[b] && RIGHT_TO_LEFT[j] >= 0) c[RIGHT_TO_LEFT[j]]++;
        end
      end
    end
  endfunction

  function automatic peak_t ref_peak(input hist_arr_t c, input bit excl_en,
                                     input int center, input int radius);
    int unsigned maxv;
    peak_t pk;
    maxv = 0;
    pk = '0;
    for (int i = 0; i < int'(N_BINS); i++)
      if (!(excl_en && (i - center <= radius) && (center - i <= radius)) && c[i] > maxv)
        maxv = c[i];
    if (maxv != 0) begin
      for (int i = int'(N_BINS) - 1; i >= 0; i--)
        if (!(excl_en && (i - center <= radius) && (center - i <= radius)) && c[i] == maxv)
          pk.bin = bin_idx_t'(i);
      pk.height = cbin_t'(maxv);
    end
    return pk;
  endfunction

  function automatic event_hits_t ref_mask(input event_hits_t h, input int p);
    event_hits_t m;
    m = h;
    for (int a = 0; a < int'(N_CH); a++) begin
      for (int b = 0; b < int'(N_CH); b++) begin
        int j;
        j = b - a - int'(D_MIN);
        if (j >= 0 && j < int'(N_BINS)) begin
          if (j == p && h.a_left[a] && h.b_left[b]) begin
            m.a_left[a] = 1'b0;
            m.b_left[b] = 1'b0;
          end
          if (RIGHT_TO_LEFT[j] == p && h.a_right[a] && h.b_right[b]) begin
            m.a_right[a] = 1'b0;
            m.b_right[b] = 1'b0;
          end
        end
      end
    end
    return m;
  endfunction

  // Full Vertex Finder result for one event (valid and bx left at 0).
  function automatic vfb_result_t ref_vertex(input event_hits_t h, input vf_config_t cfg);
    vfb_result_t r;
    hist_arr_t c1, c2;
    event_hits_t m;
    int n;
    r = '0;
    ref_hist(h, c1);
    r.peak1 = ref_peak(c1, 1'b0, 0, 0);
    m = ref_mask(h, int'(r.peak1.bin));
    ref_hist(m, c2);
    r.peak2 = ref_peak(c2, 1'b0, 0, 0);
    r.peak3 = ref_peak(c2, 1'b1, int'(r.peak2.bin), int'(cfg.excl_radius));
    n = 0;
    if (r.peak1.height >= cfg.th_first) begin
      n = 1;
      if (r.peak2.height >= cfg.th_other) begin
        n = 2;
        if (r.peak3.height >= cfg.th_other) n = 3;
      end
    end
    r.nvtx = 2'(n);
    r.veto = n > int'(cfg.max_vertices);
    return r;
  endfunction

  // One track of a vertex in bin p: a hit pair on one of p's diagonals.
  function automatic void add_track(inout event_hits_t h, input int p);
    int js[$];
    int j, a, d;
    bit right;
    right = ($urandom % 2) == 1;
    if (right) begin
      for (int k = 0; k < int'(N_BINS); k++) if (RIGHT_TO_LEFT[k] == p) js.push_back(k);
      if (js.size() == 0) right = 1'b0;
    end
    j = right ? js[$urandom % js.size()] : p;
    d = j + int'(D_MIN);
    a = $urandom % (int'(N_CH) - d);
    if (right) begin
      h.a_right[a]   = 1'b1;
      h.b_right[a+d] = 1'b1;
    end else begin
      h.a_left[a]    = 1'b1;
      h.b_left[a+d]  = 1'b1;
    end
  endfunction

  // Event with vertices in vbins vbins[], tracks[i] tracks each, n_noise noise hits.
  function automatic event_hits_t gen_event(input int vbins[$], input int tracks[$],
                                            input int n_noise);
    event_hits_t h;
    h = '0;
    foreach (vbins[i]) for (int t = 0; t < tracks[i]; t++) add_track(h, vbins[i]);
    for (int k = 0; k < n_noise; k++) begin int x; x = $urandom % $bits(event_hits_t); h[x] = 1'b1; end
    return h;
  endfunction
endpackage
