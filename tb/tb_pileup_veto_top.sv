// End-to-end testbench of pileup_veto_top at its default sizes.
//
// Phase 1: one event per bunch crossing for more than a full LHC turn
// (3564 crossings), with a few idle crossings, a stretch with 75 ns bunch
// spacing (one filled crossing in three), a turn-start pulse and random L0
// accepts. Phase 2: test mode, where patterns loaded into the
// Test Board are played at full speed, and the monitor register of the
// board that processed one chosen crossing is read back over the Test
// Board.
//
// A monitor at the multiplexer inputs computes, for every crossing that
// enters, the expected result with the reference model of tb_ref_pkg; each
// L0 result must match and leave the crate exactly 54 cycles after its hits
// entered, in crossing order. Also checked: the spare board shadows board
// 3 without a mismatch, no sequence error, every luminosity snapshot equals
// the vertex classes of its period, every DAQ event is the accepted
// crossing of both planes, and the monitor word equals the L0 result of its
// crossing. Each mechanism must be seen at least once: every vertex count,
// veto and no veto, every round-robin board, masking changing the second
// pass, bunch counter wrap and restart, luminosity snapshots, DAQ readout,
// test-mode playback and the monitor readback.
module tb_pileup_veto_top;
  import pu_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_CROSS   = 3900;
  localparam int TOP_DELAY = 54;
  localparam int L0_LAT    = 160;
  localparam int N_TEST    = 60;

  logic clk = 1'b0, rst_n = 1'b0, turn_start = 1'b0, in_valid = 1'b0;
  logic [2*N_CH-1:0] hits_a = '0, hits_b = '0;
  vf_config_t cfg;
  logic spare_en = 1'b1;
  logic [1:0] spare_sel = 2'd3;
  logic [31:0] lumi_period = 32'd1000;
  vfb_result_t l0_result;
  logic seq_error, lumi_snap;
  logic [31:0] spare_checks, spare_mismatches;
  logic [3:0][31:0] lumi_counts;
  logic l0_accept = 1'b0;
  logic [1:0] daq_valid, daq_overflow;
  logic [2*N_CH-1:0] daq_hits_a, daq_hits_b;
  bx_t [1:0] daq_bx;
  logic [1:0][4:0] daq_level;
  logic test_mode = 1'b0, vme_we = 1'b0, sw_trigger = 1'b0, spy_arm = 1'b0, spy_shift = 1'b0;
  logic [11:0] vme_addr = '0;
  logic [31:0] vme_wdata = '0, vme_rdata;
  logic [8:0] n_pat = '0;
  logic tp_busy;
  bx_t spy_bx = '0;
  logic [2:0] spy_sel = '0;
  logic [1:0] vme_raddr = '0;
  logic [N_VFB:0] spy_captured;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pileup_veto_top dut (.clk, .rst_n, .turn_start, .in_valid, .hits_a, .hits_b, .cfg,
    .spare_en, .spare_sel, .lumi_period, .l0_result, .seq_error,
    .spare_checks, .spare_mismatches, .lumi_counts, .lumi_snap,
    .l0_accept, .daq_valid, .daq_hits_a, .daq_hits_b, .daq_bx, .daq_level, .daq_overflow,
    .test_mode, .vme_we, .vme_addr, .vme_wdata, .sw_trigger, .n_pat, .tp_busy,
    .spy_arm, .spy_bx, .spy_sel, .spy_shift, .vme_raddr, .vme_rdata, .spy_captured);

  initial begin
    repeat (N_CROSS + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // bunch-crossing number model: restarts on turn_start, wraps at 3564
  int bxm = 0, bx_now_m;
  always_comb bx_now_m = turn_start ? 0 : bxm;
  always @(posedge clk) if (rst_n) bxm <= (bx_now_m == BX_PER_TURN - 1) ? 0 : bx_now_m + 1;

  typedef struct { vfb_result_t r; int due; int board; } exp_t;
  typedef struct { logic [2*N_CH-1:0] a, b; bx_t bx; } xing_t;
  exp_t expq [$];
  xing_t seen_x [int];     // crossings entered, by cycle
  xing_t daqq [$];
  vfb_result_t by_bx [int];
  int n_nvtx [4];
  int n_board [N_VFB];
  int n_veto, n_noveto, n_masked, n_got, n_wrap, n_restart, n_snap, n_sent, n_spare_exp;
  int n_daq, n_test_sent, n_test_got, rr;
  int unsigned cls [4];

  // input monitor: what enters the Multiplexer Boards, and the L0 accepts
  initial begin
    rr = 0; n_sent = 0; n_spare_exp = 0; n_masked = 0; n_wrap = 0; n_restart = 0; n_test_sent = 0;
    forever begin
      @(negedge clk);
      #1;
      if (rst_n) begin
        if (turn_start && bxm != 0) n_restart++;
        if (!turn_start && bxm == BX_PER_TURN - 1) n_wrap++;
        if (dut.src_valid) begin
          event_hits_t h;
          exp_t e;
          hist_arr_t c1, c2;
          {h.a_left, h.a_right} = dut.src_hits_a;
          {h.b_left, h.b_right} = dut.src_hits_b;
          e.r = ref_vertex(h, cfg);
          e.r.valid = 1'b1;
          e.r.bx = bx_t'(bx_now_m);
          e.due = cyc + TOP_DELAY;
          e.board = rr;
          expq.push_back(e);
          if (rr == int'(spare_sel)) n_spare_exp++;
          rr = (rr + 1) % N_VFB;
          n_sent++;
          if (test_mode) n_test_sent++;
          ref_hist(h, c1);
          ref_hist(ref_mask(h, int'(e.r.peak1.bin)), c2);
          if (c1 != c2) n_masked++;
        end
        seen_x[cyc] = '{a: dut.src_hits_a, b: dut.src_hits_b, bx: bx_t'(bx_now_m)};
        if (l0_accept) daqq.push_back(seen_x[cyc - L0_LAT]);
      end
    end
  end

  // output checker
  initial begin
    n_veto = 0; n_noveto = 0; n_got = 0; n_snap = 0; n_daq = 0; n_test_got = 0;
    foreach (n_nvtx[i]) n_nvtx[i] = 0;
    foreach (n_board[i]) n_board[i] = 0;
    foreach (cls[i]) cls[i] = 0;
    forever begin
      @(negedge clk);
      if (lumi_snap) begin
        n_snap++;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (lumi_counts[i] != cls[i]) begin
            failures++;
            $display("FAIL lumi snapshot %0d class %0d: %0d expected %0d", n_snap, i, lumi_counts[i], cls[i]);
          end
          cls[i] = 0;
        end
      end
      if (daq_valid != 2'b00) begin
        xing_t x;
        checks++;
        n_daq++;
        if (daqq.size() == 0) begin
          failures++; $display("FAIL: unexpected DAQ event");
        end else begin
          x = daqq.pop_front();
          if (daq_valid != 2'b11 || daq_hits_a !== x.a || daq_hits_b !== x.b ||
              daq_bx[0] !== x.bx || daq_bx[1] !== x.bx) begin
            failures++; $display("FAIL: DAQ event bx %0d/%0d expected bx %0d", daq_bx[0], daq_bx[1], x.bx);
          end
        end
      end
      if (l0_result.valid) begin
        exp_t e;
        n_got++;
        checks++;
        by_bx[int'(l0_result.bx)] = l0_result;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: unexpected result", cyc);
        end else begin
          e = expq.pop_front();
          if (cyc != e.due || l0_result !== e.r) begin
            failures++;
            if (failures < 10)
              $display("FAIL bx %0d: at %0d (due %0d) nvtx %0d/%0d veto %0d/%0d p1 %0d/%0d",
                       e.r.bx, cyc, e.due, l0_result.nvtx, e.r.nvtx, l0_result.veto, e.r.veto,
                       l0_result.peak1.bin, e.r.peak1.bin);
          end
          n_nvtx[l0_result.nvtx]++;
          n_board[e.board]++;
          if (test_mode) n_test_got++;
          if (l0_result.veto) n_veto++; else n_noveto++;
          cls[l0_result.nvtx]++;
        end
      end
    end
  end

  function automatic event_hits_t random_event();
    int nv, vb[$], tr[$];
    nv = $urandom % 4;
    for (int k = 0; k < nv; k++) begin
      vb.push_back($urandom % N_BINS);
      tr.push_back(3 + $urandom % 10);
    end
    return gen_event(vb, tr, $urandom % 24);
  endfunction

  initial begin
    vfb_result_t spy_word;
    logic [95:0] spy_chain;
    int spy_board, spy_cross;
    cfg = '{th_first: cbin_t'(4), th_other: cbin_t'(4), excl_radius: 3'd2, max_vertices: 2'd1};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // ---------------------------------------------------------- phase 1
    for (int c = 0; c < N_CROSS; c++) begin
      event_hits_t h;
      h = random_event();
      // crossings 3000-3299: 75 ns bunch spacing, a filled crossing every third cycle
      in_valid   = (c >= 3000 && c < 3300) ? (c % 3 == 0) : ((c % 211) != 100);
      turn_start = (c == 200);
      l0_accept  = (c >= L0_LAT) && (c < N_CROSS - 100) && (($urandom % 64) == 0);
      hits_a = {h.a_left, h.a_right};
      hits_b = {h.b_left, h.b_right};
      @(negedge clk);
    end
    in_valid = 1'b0;
    turn_start = 1'b0;
    l0_accept = 1'b0;
    repeat (TOP_DELAY + 10) @(negedge clk);

    // ---------------------------------------------------------- phase 2
    test_mode = 1'b1;
    for (int p = 0; p < N_TEST; p++) begin
      event_hits_t h;
      logic [511:0] v;
      h = random_event();
      v = {h.a_left, h.a_right, h.b_left, h.b_right};
      for (int w = 0; w < 16; w++) begin
        vme_we = 1'b1; vme_addr = 12'(p * 16 + w); vme_wdata = v[w*32 +: 32];
        @(negedge clk);
      end
    end
    vme_we = 1'b0;
    // arm the monitors for the 10th test pattern
    spy_cross = bxm + 4 + 9;   // trigger next cycle, first pattern at the multiplexers 3 cycles later
    spy_bx = bx_t'(spy_cross % BX_PER_TURN);
    spy_board = (rr + 9) % N_VFB;
    spy_arm = 1'b1;
    @(negedge clk);
    spy_arm = 1'b0;
    sw_trigger = 1'b1; n_pat = 9'(N_TEST);
    @(negedge clk);
    sw_trigger = 1'b0;
    while (tp_busy) @(negedge clk);
    repeat (TOP_DELAY + 10) @(negedge clk);
    // shift the chosen board's monitor into the Test Board and read it
    checks++;
    if (spy_captured[spy_board] !== 1'b1) begin failures++; $display("FAIL: monitor of board %0d empty", spy_board); end
    spy_sel = 3'(spy_board);
    spy_shift = 1'b1;
    repeat (SPY_CHAIN_W) @(negedge clk);
    spy_shift = 1'b0;
    for (int w = 0; w < 3; w++) begin
      vme_raddr = 2'(w); #1 spy_chain[w*32 +: 32] = vme_rdata;
    end
    spy_word = spy_chain[$bits(vfb_result_t)-1:0];
    checks += 2;
    if (!by_bx.exists(int'(spy_bx)) || spy_word !== by_bx[int'(spy_bx)]) begin
      failures++; $display("FAIL: monitor word of bx %0d differs from its L0 result", spy_bx);
    end
    if (spy_chain[SPY_CHAIN_W-1:$bits(vfb_result_t)] !== {spy_word.bx, spy_word.peak1}) begin
      failures++; $display("FAIL: first-pass monitor word of bx %0d differs", spy_bx);
    end
    @(negedge clk);

    checks += 6;
    if (n_got != n_sent || expq.size() != 0) begin
      failures++; $display("FAIL: %0d results for %0d events", n_got, n_sent);
    end
    if (seq_error) begin failures++; $display("FAIL: sequence error"); end
    if (spare_checks != 32'(n_spare_exp)) begin
      failures++; $display("FAIL: %0d spare checks, expected %0d", spare_checks, n_spare_exp);
    end
    if (spare_mismatches != 0) begin failures++; $display("FAIL: spare mismatches %0d", spare_mismatches); end
    if (daqq.size() != 0 || daq_overflow != 2'b00) begin
      failures++; $display("FAIL: %0d DAQ events missing, overflow %b", daqq.size(), daq_overflow);
    end
    if (n_test_sent != N_TEST) begin failures++; $display("FAIL: %0d test patterns entered", n_test_sent); end

    $display("mechanisms: nvtx0=%0d nvtx1=%0d nvtx2=%0d nvtx3=%0d veto=%0d no-veto=%0d masking=%0d",
             n_nvtx[0], n_nvtx[1], n_nvtx[2], n_nvtx[3], n_veto, n_noveto, n_masked);
    $display("mechanisms: boards=%0d/%0d/%0d/%0d spare-checks=%0d bx-wrap=%0d turn-restart=%0d lumi-snapshots=%0d",
             n_board[0], n_board[1], n_board[2], n_board[3], spare_checks, n_wrap, n_restart, n_snap);
    $display("mechanisms: daq-events=%0d test-mode-results=%0d monitor-readback=1", n_daq, n_test_got);
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (n_nvtx[i] == 0)  begin failures++; $display("FAIL: no event with %0d vertices", i); end
      if (n_board[i] == 0) begin failures++; $display("FAIL: board %0d never used", i); end
    end
    checks += 9;
    if (n_veto == 0)       begin failures++; $display("FAIL: veto never set"); end
    if (n_noveto == 0)     begin failures++; $display("FAIL: veto always set"); end
    if (n_masked == 0)     begin failures++; $display("FAIL: masking never mattered"); end
    if (spare_checks == 0) begin failures++; $display("FAIL: spare never checked"); end
    if (n_wrap == 0)       begin failures++; $display("FAIL: bunch counter never wrapped"); end
    if (n_restart == 0)    begin failures++; $display("FAIL: turn start never restarted the counter"); end
    if (n_snap < 3)        begin failures++; $display("FAIL: %0d luminosity snapshots", n_snap); end
    if (n_daq < 10)        begin failures++; $display("FAIL: only %0d DAQ events", n_daq); end
    if (n_test_got != N_TEST) begin failures++; $display("FAIL: %0d test-mode results", n_test_got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
