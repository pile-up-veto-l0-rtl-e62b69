// Pile-up veto processor crate.
//
// Two Multiplexer Boards, one per detector plane (A and B, 256 comparator
// channels each: 128 per detector half), receive the hits of every bunch
// crossing and deal the events round-robin over four Vertex Finder Boards,
// serialised over four cycles per event. A fifth, spare Vertex Finder gets a
// copy of the events of one selectable board. Each Vertex Finder finds up to
// three vertices with a fixed latency of 48 cycles. The Output Board puts
// the results back into crossing order for the L0 decision unit, compares
// the spare with the board it shadows and counts vertex classes for the
// luminosity measurement.
//
// Timing: hits presented in cycle t (in_valid) give l0_result in cycle
// t + 1 (multiplexer) + 4 (link words) + 48 (Vertex Finder) + 1 (Output
// Board) = t + 54, one result per crossing.
//
// Each Multiplexer Board also keeps its plane's input for the L0 latency
// and sends the crossings accepted by L0 (l0_accept, 160 cycles after the
// crossing) through a 16-event derandomiser to the daq_* outputs.
//
// Test mode: with test_mode set, the hits come from the Test Board
// (test_pattern_gen) instead of the inputs: patterns loaded over the
// vme_* write port are played at full speed on sw_trigger. The monitor
// registers of every Vertex Finder capture the first-pass word and the
// result of crossing spy_bx after spy_arm; spy_shift shifts the chain of
// the board chosen by spy_sel into the Test Board, where vme_rdata reads it
// back as 32-bit words.
//
// The split into boards and their roles follow the described crate; the
// front end (silicon planes, readout chips, optical links) and the slow
// control host are outside this module: the hits and configuration enter as
// plain ports.
module pileup_veto_top
  import pu_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      turn_start,   // LHC turn marker (VALID pulse)
  input  logic                      in_valid,
  input  logic [2*N_CH-1:0]         hits_a,       // plane A {left, right}
  input  logic [2*N_CH-1:0]         hits_b,       // plane B {left, right}
  input  vf_config_t                cfg,
  input  logic                      spare_en,
  input  logic [$clog2(N_VFB)-1:0]  spare_sel,
  input  logic [31:0]               lumi_period,
  output vfb_result_t               l0_result,
  output logic                      seq_error,
  output logic [31:0]               spare_checks,
  output logic [31:0]               spare_mismatches,
  output logic [3:0][31:0]          lumi_counts,
  output logic                      lumi_snap,
  // L0-accepted copy of the input for the DAQ, per plane (0 = A, 1 = B)
  input  logic                      l0_accept,
  output logic [1:0]                daq_valid,
  output logic [2*N_CH-1:0]         daq_hits_a,
  output logic [2*N_CH-1:0]         daq_hits_b,
  output bx_t  [1:0]                daq_bx,
  output logic [1:0][4:0]           daq_level,
  output logic [1:0]                daq_overflow,
  // Test Board
  input  logic                      test_mode,
  input  logic                      vme_we,
  input  logic [11:0]               vme_addr,
  input  logic [31:0]               vme_wdata,
  input  logic                      sw_trigger,
  input  logic [8:0]                n_pat,
  output logic                      tp_busy,
  input  logic                      spy_arm,
  input  bx_t                       spy_bx,
  input  logic [2:0]                spy_sel,
  input  logic                      spy_shift,
  input  logic [1:0]                vme_raddr,
  output logic [31:0]               vme_rdata,
  output logic [N_VFB:0]            spy_captured
);
  logic [N_VFB:0]       a_valid, a_first, b_valid, b_first;
  bx_t   [N_VFB:0]      a_bx, b_bx;
  logic [N_VFB:0][63:0] a_data, b_data;
  vfb_result_t [N_VFB:0] res;

  // hit source: detector inputs or Test Board patterns
  logic              tp_valid, src_valid;
  logic [2*N_CH-1:0] tp_hits_a, tp_hits_b, src_hits_a, src_hits_b;
  logic [N_VFB:0]    spy_sout;
  logic              spy_bit;

  assign src_valid  = test_mode ? tp_valid  : in_valid;
  assign src_hits_a = test_mode ? tp_hits_a : hits_a;
  assign src_hits_b = test_mode ? tp_hits_b : hits_b;
  assign spy_bit    = (spy_sel <= 3'(N_VFB)) ? spy_sout[spy_sel] : 1'b0;

  test_pattern_gen u_test (.clk, .rst_n, .vme_we, .vme_addr, .vme_wdata, .sw_trigger, .n_pat,
    .busy(tp_busy), .out_valid(tp_valid), .hits_a(tp_hits_a), .hits_b(tp_hits_b),
    .spy_shift, .spy_sin(spy_bit), .vme_raddr, .vme_rdata);

  mux_board u_mux_a (.clk, .rst_n, .turn_start, .in_valid(src_valid), .hits(src_hits_a),
    .spare_en, .spare_sel,
    .link_valid(a_valid), .link_first(a_first), .link_bx(a_bx), .link_data(a_data),
    .l0_accept, .daq_valid(daq_valid[0]), .daq_hits(daq_hits_a), .daq_bx(daq_bx[0]),
    .daq_level(daq_level[0]), .daq_overflow(daq_overflow[0]));
  mux_board u_mux_b (.clk, .rst_n, .turn_start, .in_valid(src_valid), .hits(src_hits_b),
    .spare_en, .spare_sel,
    .link_valid(b_valid), .link_first(b_first), .link_bx(b_bx), .link_data(b_data),
    .l0_accept, .daq_valid(daq_valid[1]), .daq_hits(daq_hits_b), .daq_bx(daq_bx[1]),
    .daq_level(daq_level[1]), .daq_overflow(daq_overflow[1]));

  for (genvar k = 0; k <= N_VFB; k++) begin : g_vfb
    vertex_finder u_vf (.clk, .rst_n, .cfg,
      .link_valid(a_valid[k]), .link_first(a_first[k]), .link_bx(a_bx[k]),
      .link_a(a_data[k]), .link_b(b_data[k]), .result(res[k]),
      .spy_arm, .spy_bx, .spy_shift(spy_shift && spy_sel == 3'(k)),
      .spy_sout(spy_sout[k]), .spy_captured(spy_captured[k]));

    // both Multiplexer Boards run in lock step
    always_ff @(posedge clk) begin
      if (rst_n) begin
        assert (a_valid[k] == b_valid[k] && a_first[k] == b_first[k] && a_bx[k] == b_bx[k])
          else $error("pileup_veto_top: plane links %0d out of step", k);
      end
    end
  end

  output_board u_out (.clk, .rst_n, .res, .spare_en, .spare_sel, .lumi_period,
    .l0_result, .seq_error, .spare_checks, .spare_mismatches, .lumi_counts, .lumi_snap);
endmodule
