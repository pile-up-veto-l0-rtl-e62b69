// Vertex-finding efficiency of vertex_finder on generated crossings.
//
// Three samples of 300 crossings each go through the Vertex Finder at one
// event per 4 cycles:
//   1. one vertex with 15-40 tracks;
//   2. two vertices with similar multiplicities (15-40 tracks each);
//   3. two vertices with very different multiplicities: 30-40 tracks and
//      6-10 tracks, the case the masking step is for.
// The two vertices of a crossing are at least 6 bins apart. Tracks are
// smeared: the plane-B channel is off by one from the ideal diagonal with
// probability 1/4, standing in for multiple scattering and strip
// granularity. A uniform background of 24 random hits per crossing is added.
// A vertex counts as found if one of the peaks that passed its threshold
// lies within one bin of it.
//
// The system description states an efficiency close to 100% for the vertex
// with the highest track multiplicity. Pass limits (this bench's choice, set
// below the values measured with this design):
//   - samples 1 and 3: the dominant vertex is found in at least 95%;
//   - sample 2: each of the two similar vertices in at least 70%;
//   - sample 3: the small vertex in at least 40%, and in at least twice as
//     many crossings as when peaks 2 and 3 are taken from the first-pass
//     histogram without masking.
// Measured with this design: 100%, 99.7%; 90% and 82%; 56% against 22%.
// The small-vertex efficiency is limited by smeared tracks of the large
// vertex: they sit one diagonal off the masked one, survive masking, and
// form a residual peak next to it.
// Every result is also checked against the reference model. Timing is not
// checked here (tb_vertex_finder does that).
module tb_vertex_efficiency;
  import pu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  vf_config_t cfg;
  logic link_valid = 1'b0, link_first = 1'b0;
  bx_t link_bx = '0;
  logic [63:0] link_a = '0, link_b = '0;
  vfb_result_t result;
  logic spy_sout, spy_captured;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vertex_finder dut (.clk, .rst_n, .cfg, .link_valid, .link_first, .link_bx,
                     .link_a, .link_b, .result, .spy_arm(1'b0), .spy_bx('0),
                     .spy_shift(1'b0), .spy_sout, .spy_captured);

  localparam int N_EV = 300;

  // watchdog
  initial begin
    repeat (3 * N_EV * 4 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { vfb_result_t r; int big; int minor; } exp_t;
  exp_t expq [$];
  int found_big [3], found_minor [3], found_minor_nomask, n_res [3];
  int sample;

  function automatic bit near(input bin_idx_t b, input int truth);
    return (int'(b) - truth <= 1) && (truth - int'(b) <= 1);
  endfunction

  // a vertex counts as found if one of the peaks that passed its threshold
  // is within one bin of it
  function automatic bit found(input vfb_result_t r, input int truth);
    return (r.nvtx >= 2'd1 && near(r.peak1.bin, truth)) ||
           (r.nvtx >= 2'd2 && near(r.peak2.bin, truth)) ||
           (r.nvtx >= 2'd3 && near(r.peak3.bin, truth));
  endfunction

  // one smeared track of a vertex in left-half bin p
  function automatic void smeared_track(inout event_hits_t h, input int p);
    int js[$], j, a, d, s;
    bit right;
    right = ($urandom % 2) == 1;
    if (right) begin
      foreach (RIGHT_TO_LEFT[k]) if (RIGHT_TO_LEFT[k] == p) js.push_back(k);
      if (js.size() == 0) right = 1'b0;
    end
    j = right ? js[$urandom % js.size()] : p;
    d = j + int'(D_MIN);
    s = ($urandom % 4 == 0) ? (($urandom % 2 == 1) ? 1 : -1) : 0;
    a = 1 + $urandom % (int'(N_CH) - d - 2);
    if (right) begin h.a_right[a] = 1'b1; h.b_right[a + d + s] = 1'b1; end
    else       begin h.a_left[a]  = 1'b1; h.b_left[a + d + s]  = 1'b1; end
  endfunction

  // result checker and efficiency counters
  initial begin
    forever begin
      @(negedge clk);
      if (result.valid) begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (result !== e.r) begin
          failures++;
          if (failures < 10) $display("FAIL: result differs from the reference model");
        end
        n_res[sample]++;
        if (found(result, e.big)) found_big[sample]++;
        if (e.minor >= 0 && found(result, e.minor)) found_minor[sample]++;
      end
    end
  end

  initial begin
    cfg = '{th_first: cbin_t'(4), th_other: cbin_t'(4), excl_radius: 3'd2, max_vertices: 2'd1};
    foreach (found_big[i]) begin found_big[i] = 0; found_minor[i] = 0; n_res[i] = 0; end
    found_minor_nomask = 0;
    sample = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int smp = 0; smp < 3; smp++) begin
      for (int n = 0; n < N_EV; n++) begin
        event_hits_t h;
        exp_t e;
        int pb, ps, nb, ns;
        logic [2*N_CH-1:0] pa, pbv;
        h = '0;
        pb = $urandom % N_BINS;
        do ps = $urandom % N_BINS; while ((ps - pb) < 6 && (pb - ps) < 6);
        nb = (smp == 2) ? 30 + $urandom % 11 : 15 + $urandom % 26;
        ns = (smp == 0) ? 0 : (smp == 1) ? 15 + $urandom % 26 : 6 + $urandom % 5;
        if (ns > nb) begin int t; t = nb; nb = ns; ns = t; t = pb; pb = ps; ps = t; end
        for (int t = 0; t < nb; t++) smeared_track(h, pb);
        for (int t = 0; t < ns; t++) smeared_track(h, ps);
        for (int k = 0; k < 24; k++) begin int x; x = $urandom % $bits(event_hits_t); h[x] = 1'b1; end
        e.r = ref_vertex(h, cfg);
        e.r.valid = 1'b1;
        e.r.bx = bx_t'(n);
        e.big = pb;
        e.minor = (smp == 0) ? -1 : ps;
        if (smp == 2) begin
          // the same search without masking: peaks 2 and 3 taken from the
          // first-pass histogram, outside the exclusion window of the peak
          // before them, with the same thresholds
          hist_arr_t c1;
          peak_t p1, p2, p3;
          ref_hist(h, c1);
          p1 = ref_peak(c1, 1'b0, 0, 0);
          p2 = ref_peak(c1, 1'b1, int'(p1.bin), int'(cfg.excl_radius));
          p3 = ref_peak(c1, 1'b1, int'(p2.bin), int'(cfg.excl_radius));
          if ((p2.height >= cfg.th_other && near(p2.bin, ps)) ||
              (p2.height >= cfg.th_other && p3.height >= cfg.th_other &&
               (int'(p3.bin) - int'(p1.bin) > int'(cfg.excl_radius) ||
                int'(p1.bin) - int'(p3.bin) > int'(cfg.excl_radius)) && near(p3.bin, ps)))
            found_minor_nomask++;
        end
        expq.push_back(e);
        pa  = {h.a_left, h.a_right};
        pbv = {h.b_left, h.b_right};
        for (int w = 0; w < int'(SER_WORDS); w++) begin
          link_valid = 1'b1; link_first = (w == 0); link_bx = bx_t'(n);
          link_a = pa[w*64 +: 64]; link_b = pbv[w*64 +: 64];
          @(negedge clk);
        end
        link_valid = 1'b0;
      end
      repeat (int'(VFB_LATENCY) + 5) @(negedge clk);
      $display("sample %0d: results %0d, largest vertex found %0d, second vertex found %0d",
               smp + 1, n_res[smp], found_big[smp], found_minor[smp]);
      sample++;
    end
    $display("sample 3 without masking: second vertex found %0d", found_minor_nomask);
    for (int smp = 0; smp < 3; smp++) begin
      checks++;
      if (n_res[smp] != N_EV) begin failures++; $display("FAIL: sample %0d lost results", smp + 1); end
    end
    checks += 6;
    if (found_big[0] * 100 < 95 * N_EV) begin
      failures++; $display("FAIL: single-vertex efficiency %0d/%0d", found_big[0], N_EV);
    end
    if (found_big[2] * 100 < 95 * N_EV) begin
      failures++; $display("FAIL: dominant-vertex efficiency %0d/%0d", found_big[2], N_EV);
    end
    if (found_big[1] * 100 < 70 * N_EV || found_minor[1] * 100 < 70 * N_EV) begin
      failures++; $display("FAIL: similar vertices found %0d and %0d of %0d", found_big[1], found_minor[1], N_EV);
    end
    if (found_minor[2] * 100 < 40 * N_EV) begin
      failures++; $display("FAIL: small vertex found in %0d/%0d", found_minor[2], N_EV);
    end
    if (found_minor_nomask * 2 > found_minor[2]) begin
      failures++; $display("FAIL: masking gives no gain (%0d vs %0d)", found_minor[2], found_minor_nomask);
    end
    if (found_minor[0] != 0) begin
      failures++; $display("FAIL: a second vertex was credited in the one-vertex sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
