// Vertex Finder Board: finds up to three primary vertices of one event.
//
// Input side: two serial links, one from each Multiplexer Board (plane A and
// plane B). An event arrives as SER_WORDS words of 64 bits per link on
// consecutive cycles, word 0 first and flagged by link_first, carrying the
// event's bunch-crossing number. Word k holds bits [64k+63:64k] of the
// 256-bit plane vector {left half, right half}. After the last word the
// event is registered (cycle 0).
//
// Algorithm, one pipeline stage per step:
//   1  coincidence histograms of the left and right halves   (coinc_hist x2)
//   2  left + corrected right histogram                      (half_combine)
//   3  highest peak -> peak1                                 (peak_finder)
//   4  hits that made up peak1 removed in both planes        (hit_masker)
//   5  coincidence histograms of the masked hits             (coinc_hist x2)
//   6  combined histogram                                    (half_combine)
//   7  highest peak -> peak2                                 (peak_finder)
//   8  highest peak outside +-excl_radius of peak2 -> peak3  (peak_finder)
//   9  vertex count: peak1 counts if >= th_first, peak2 and then peak3 count
//      if >= th_other; veto if the count exceeds max_vertices
// A delay line then pads the result so that it appears exactly VFB_LATENCY
// (48) cycles after cycle 0, which keeps the trigger latency fixed.
// The pipeline takes a new event every cycle; in the system it gets one
// every SER_WORDS cycles.
//
// Two monitor registers (vfb_monitor) watch the crossing spy_bx after
// spy_arm: one in the first pass captures {bx, peak1} when peak1 is found
// (stage 3), one at the output captures the result. They form one chain:
// while spy_shift is set, spy_sout gives the SPY_CHAIN_W-bit word
// {first-pass word, result}, least significant bit first. spy_captured is
// set once both have captured.
//
// The two passes, masking and the search for second and third peaks follow
// the described board; the exact stage split, the threshold rule and the
// link format are this design's choices. Both FPGAs of the board are
// merged into one module.
module vertex_finder
  import pu_pkg::*;
#(
  parameter int unsigned LATENCY = VFB_LATENCY
) (
  input  logic        clk,
  input  logic        rst_n,
  input  vf_config_t  cfg,
  // link from the plane-A Multiplexer Board
  input  logic        link_valid,
  input  logic        link_first,
  input  bx_t         link_bx,
  input  logic [63:0] link_a,
  // link from the plane-B Multiplexer Board (same timing as plane A)
  input  logic [63:0] link_b,
  output vfb_result_t result,
  // monitor register
  input  logic        spy_arm,
  input  bx_t         spy_bx,
  input  logic        spy_shift,
  output logic        spy_sout,
  output logic        spy_captured
);
  localparam int unsigned PIPE = 9;  // stages 1..9 above
  localparam int unsigned PAD  = LATENCY - PIPE;

  // ---------------------------------------------------------------- deserialiser
  logic [2*N_CH-65:0] sh_a, sh_b;  // words received so far
  logic [$clog2(SER_WORDS+1)-1:0] word_cnt;
  bx_t         ev_bx;
  logic        ev_valid;
  event_hits_t ev_hits;
  bx_t         bx_hold;
  logic [2*N_CH-1:0] full_a, full_b;

  // Plane vector with the current word placed on top of the ones received.
  assign full_a = {link_a, sh_a};
  assign full_b = {link_b, sh_b};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh_a     <= '0;
      sh_b     <= '0;
      word_cnt <= '0;
      ev_valid <= 1'b0;
      ev_hits  <= '0;
      ev_bx    <= '0;
      bx_hold  <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (link_valid) begin
        sh_a <= full_a[2*N_CH-1:64];
        sh_b <= full_b[2*N_CH-1:64];
        if (link_first) begin
          word_cnt <= 1;
          bx_hold  <= link_bx;
        end else begin
          word_cnt <= word_cnt + 1'b1;
        end
        if (!link_first && word_cnt == $bits(word_cnt)'(SER_WORDS - 1)) begin
          ev_valid        <= 1'b1;
          ev_bx           <= bx_hold;
          ev_hits.a_left  <= full_a[2*N_CH-1:N_CH];
          ev_hits.a_right <= full_a[N_CH-1:0];
          ev_hits.b_left  <= full_b[2*N_CH-1:N_CH];
          ev_hits.b_right <= full_b[N_CH-1:0];
        end
      end
    end
  end

  // ---------------------------------------------------------------- pass 1
  half_hist_t hl1, hr1, hl2, hr2;
  hist_t      h1, h2, h2_d;
  logic       v_hl1, v_hr1, v_h1, v_p1, v_m, v_hl2, v_hr2, v_h2, v_p2, v_p3;
  peak_t      pk1, pk2, pk3, pk1_d, pk2_d;
  event_hits_t hits_d3, hits_m;

  coinc_hist u_hist1_l (.clk, .rst_n, .in_valid(ev_valid),
    .hits_a(ev_hits.a_left), .hits_b(ev_hits.b_left), .out_valid(v_hl1), .hist(hl1));
  coinc_hist u_hist1_r (.clk, .rst_n, .in_valid(ev_valid),
    .hits_a(ev_hits.a_right), .hits_b(ev_hits.b_right), .out_valid(v_hr1), .hist(hr1));
  half_combine u_comb1 (.clk, .rst_n, .in_valid(v_hl1 & v_hr1),
    .hist_l(hl1), .hist_r(hr1), .out_valid(v_h1), .hist(h1));
  peak_finder u_peak1 (.clk, .rst_n, .in_valid(v_h1), .hist(h1),
    .excl_en(1'b0), .excl_center('0), .excl_radius('0), .out_valid(v_p1), .peak(pk1));

  // hits wait three stages for peak1
  pipe_delay #(.WIDTH($bits(event_hits_t)), .DEPTH(3)) u_hits_dly (
    .clk, .rst_n, .din(ev_hits), .dout(hits_d3));

  hit_masker u_mask (.clk, .rst_n, .in_valid(v_p1), .hits(hits_d3),
    .peak_bin(pk1.bin), .out_valid(v_m), .hits_masked(hits_m));

  // ---------------------------------------------------------------- pass 2
  coinc_hist u_hist2_l (.clk, .rst_n, .in_valid(v_m),
    .hits_a(hits_m.a_left), .hits_b(hits_m.b_left), .out_valid(v_hl2), .hist(hl2));
  coinc_hist u_hist2_r (.clk, .rst_n, .in_valid(v_m),
    .hits_a(hits_m.a_right), .hits_b(hits_m.b_right), .out_valid(v_hr2), .hist(hr2));
  half_combine u_comb2 (.clk, .rst_n, .in_valid(v_hl2 & v_hr2),
    .hist_l(hl2), .hist_r(hr2), .out_valid(v_h2), .hist(h2));
  peak_finder u_peak2 (.clk, .rst_n, .in_valid(v_h2), .hist(h2),
    .excl_en(1'b0), .excl_center('0), .excl_radius('0), .out_valid(v_p2), .peak(pk2));

  pipe_delay #(.WIDTH($bits(hist_t)), .DEPTH(1)) u_h2_dly (
    .clk, .rst_n, .din(h2), .dout(h2_d));

  peak_finder u_peak3 (.clk, .rst_n, .in_valid(v_p2), .hist(h2_d),
    .excl_en(1'b1), .excl_center(pk2.bin), .excl_radius(cfg.excl_radius),
    .out_valid(v_p3), .peak(pk3));

  pipe_delay #(.WIDTH($bits(peak_t)), .DEPTH(5)) u_pk1_dly (
    .clk, .rst_n, .din(pk1), .dout(pk1_d));
  pipe_delay #(.WIDTH($bits(peak_t)), .DEPTH(1)) u_pk2_dly (
    .clk, .rst_n, .din(pk2), .dout(pk2_d));

  // ---------------------------------------------------------------- decision
  bx_t         bx_d;
  vfb_result_t res_q;
  logic        c1, c2, c3;
  logic [1:0]  nvtx_c;

  pipe_delay #(.WIDTH(BX_W), .DEPTH(PIPE - 1)) u_bx_dly (
    .clk, .rst_n, .din(ev_bx), .dout(bx_d));

  always_comb begin
    c1 = pk1_d.height >= cfg.th_first;
    c2 = c1 && (pk2_d.height >= cfg.th_other);
    c3 = c2 && (pk3.height >= cfg.th_other);
    nvtx_c = 2'(c1) + 2'(c2) + 2'(c3);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_q <= '0;
    end else begin
      res_q.valid <= v_p3;
      res_q.bx    <= bx_d;
      res_q.nvtx  <= nvtx_c;
      res_q.veto  <= nvtx_c > cfg.max_vertices;
      res_q.peak1 <= pk1_d;
      res_q.peak2 <= pk2_d;
      res_q.peak3 <= pk3;
    end
  end

  pipe_delay #(.WIDTH($bits(vfb_result_t)), .DEPTH(PAD)) u_pad (
    .clk, .rst_n, .din(res_q), .dout(result));

  // ---- monitor chain ----
  bx_t  bx_p1;
  logic spy1_sout, spy1_captured, spy0_captured;

  pipe_delay #(.WIDTH(BX_W), .DEPTH(3)) u_bx_p1_dly (
    .clk, .rst_n, .din(ev_bx), .dout(bx_p1));

  vfb_monitor #(.WIDTH(SPY1_W)) u_spy1 (.clk, .rst_n, .arm(spy_arm), .spy_bx,
    .valid(v_p1), .bx(bx_p1), .data({bx_p1, pk1}), .shift(spy_shift), .sin(1'b0),
    .sout(spy1_sout), .captured(spy1_captured));

  vfb_monitor u_spy (.clk, .rst_n, .arm(spy_arm), .spy_bx, .valid(result.valid),
    .bx(result.bx), .data(result), .shift(spy_shift), .sin(spy1_sout),
    .sout(spy_sout), .captured(spy0_captured));

  assign spy_captured = spy0_captured & spy1_captured;

  // link rule: a new event starts only after the previous one is complete
  always_ff @(posedge clk) begin
    if (rst_n && link_valid && link_first) begin
      assert (word_cnt == '0 || word_cnt == $bits(word_cnt)'(SER_WORDS))
        else $error("vertex_finder: event started before the previous one was complete");
    end
  end
endmodule
