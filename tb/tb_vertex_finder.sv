// Self-checking testbench of vertex_finder: events with 0 to 3 generated
// vertices plus noise are sent over the two links in the 4-word format,
// back to back (one event every 4 cycles, as in the crate) and with gaps.
// Each result is compared field by field with the reference model of
// tb_ref_pkg and must appear exactly 48 cycles after the cycle that took
// the last word of its event. The testbench also counts how often the
// mechanisms of the algorithm were exercised: masking that changed the
// second histogram, a third peak found next to the second, each vertex
// count, and the veto; one that never happened is a failure.
module tb_vertex_finder;
  import pu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  vf_config_t cfg;
  logic link_valid = 1'b0, link_first = 1'b0;
  bx_t link_bx = '0;
  logic [63:0] link_a = '0, link_b = '0;
  vfb_result_t result;
  logic spy_arm = 1'b0, spy_shift = 1'b0, spy_sout, spy_captured;
  bx_t spy_bx = bx_t'(123);
  vfb_result_t spy_exp = '0, spy_got;
  logic [SPY1_W-1:0] spy1_got;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vertex_finder dut (.clk, .rst_n, .cfg, .link_valid, .link_first, .link_bx,
                     .link_a, .link_b, .result, .spy_arm, .spy_bx, .spy_shift,
                     .spy_sout, .spy_captured);

  localparam int N_EVENTS = 400;

  initial begin
    repeat (N_EVENTS * 8 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { vfb_result_t r; int due; } exp_t;
  exp_t expq [$];
  int n_nvtx [4];
  int n_veto, n_masked, n_third, n_got;

  // result checker
  initial begin
    forever begin
      @(negedge clk);
      if (result.valid) begin
        exp_t e;
        n_got++;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: unexpected result", cyc);
        end else begin
          e = expq.pop_front();
          if (cyc != e.due) begin
            failures++;
            $display("FAIL: result at cycle %0d, expected at %0d", cyc, e.due);
          end
          checks++;
          if (result !== e.r) begin
            failures++;
            if (failures < 10)
              $display("FAIL bx %0d: nvtx %0d/%0d veto %0d/%0d p1 %0d:%0d/%0d:%0d p2 %0d:%0d/%0d:%0d p3 %0d:%0d/%0d:%0d",
                e.r.bx, result.nvtx, e.r.nvtx, result.veto, e.r.veto,
                result.peak1.bin, result.peak1.height, e.r.peak1.bin, e.r.peak1.height,
                result.peak2.bin, result.peak2.height, e.r.peak2.bin, e.r.peak2.height,
                result.peak3.bin, result.peak3.height, e.r.peak3.bin, e.r.peak3.height);
          end
          if (result.bx == spy_bx) spy_exp = result;
          n_nvtx[result.nvtx]++;
          if (result.veto) n_veto++;
        end
      end
    end
  end

  task automatic send(input event_hits_t h, input int bx);
    logic [2*N_CH-1:0] pa, pb;
    exp_t e;
    hist_arr_t c1, c2;
    pa = {h.a_left, h.a_right};
    pb = {h.b_left, h.b_right};
    for (int w = 0; w < int'(SER_WORDS); w++) begin
      link_valid = 1'b1;
      link_first = (w == 0);
      link_bx    = (w == 0) ? bx_t'(bx) : bx_t'($urandom);
      link_a     = pa[w*64 +: 64];
      link_b     = pb[w*64 +: 64];
      if (w == int'(SER_WORDS) - 1) begin
        e.r = ref_vertex(h, cfg);
        e.r.valid = 1'b1;
        e.r.bx = bx_t'(bx);
        e.due = cyc + 1 + int'(VFB_LATENCY);
        expq.push_back(e);
        // mechanism counters
        ref_hist(h, c1);
        ref_hist(ref_mask(h, int'(e.r.peak1.bin)), c2);
        if (c1 != c2) n_masked++;
        if (e.r.peak3.height != 0 &&
            ((int'(e.r.peak3.bin) - int'(e.r.peak2.bin)) <= int'(cfg.excl_radius) + 2) &&
            ((int'(e.r.peak2.bin) - int'(e.r.peak3.bin)) <= int'(cfg.excl_radius) + 2)) n_third++;
      end
      @(negedge clk);
    end
    link_valid = 1'b0;
    link_first = 1'b0;
  endtask

  initial begin
    cfg = '{th_first: cbin_t'(4), th_other: cbin_t'(4), excl_radius: 3'd2, max_vertices: 2'd1};
    n_veto = 0; n_masked = 0; n_third = 0; n_got = 0;
    foreach (n_nvtx[i]) n_nvtx[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    spy_arm = 1'b1;
    @(negedge clk);
    spy_arm = 1'b0;
    for (int n = 0; n < N_EVENTS; n++) begin
      int nv, vb[$], tr[$];
      vb.delete();
      tr.delete();
      nv = $urandom % 4;
      for (int v = 0; v < nv; v++) begin
        vb.push_back($urandom % N_BINS);
        tr.push_back(3 + $urandom % 10);
      end
      send(gen_event(vb, tr, $urandom % 24), n);
      if (n % 10 == 9) repeat ($urandom % 6) @(negedge clk);
    end
    repeat (int'(VFB_LATENCY) + 10) @(negedge clk);
    checks++;
    if (n_got != N_EVENTS || expq.size() != 0) begin
      failures++;
      $display("FAIL: %0d results for %0d events", n_got, N_EVENTS);
    end
    // read the monitor register back serially
    checks++;
    if (!spy_captured) begin failures++; $display("FAIL: monitor did not capture"); end
    // chain: the result first, then the first-pass word {bx, peak1}
    spy_shift = 1'b1;
    for (int i = 0; i < $bits(vfb_result_t); i++) begin
      spy_got[i] = spy_sout;
      @(negedge clk);
    end
    for (int i = 0; i < int'(SPY1_W); i++) begin
      spy1_got[i] = spy_sout;
      @(negedge clk);
    end
    spy_shift = 1'b0;
    checks += 2;
    if (spy_got !== spy_exp || !spy_exp.valid) begin
      failures++; $display("FAIL: monitor word differs from the result of bx %0d", spy_bx);
    end
    if (spy1_got !== {spy_exp.bx, spy_exp.peak1}) begin
      failures++; $display("FAIL: first-pass monitor word differs for bx %0d", spy_bx);
    end
    $display("mechanisms: nvtx0=%0d nvtx1=%0d nvtx2=%0d nvtx3=%0d veto=%0d masking=%0d third-near-second=%0d",
             n_nvtx[0], n_nvtx[1], n_nvtx[2], n_nvtx[3], n_veto, n_masked, n_third);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_nvtx[i] == 0) begin failures++; $display("FAIL: no event with %0d vertices", i); end
    end
    checks += 3;
    if (n_veto == 0)   begin failures++; $display("FAIL: veto never set"); end
    if (n_masked == 0) begin failures++; $display("FAIL: masking never changed a histogram"); end
    if (n_third == 0)  begin failures++; $display("FAIL: third peak never next to the excluded window"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
