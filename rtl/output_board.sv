// Output Board: puts the Vertex Finder results back into bunch-crossing
// order, checks the spare board and keeps the luminosity counts.
//
// The round-robin Vertex Finders deliver their results with a fixed latency,
// so at most one of them has a result in any cycle and they take turns in
// the order 0,1,..,N_VFB-1. The board forwards the result of the board
// whose turn it is to the L0 decision unit (l0_result, one cycle later) and
// advances the turn. A result from another board, or two results in one
// cycle, sets the sticky seq_error flag and is not forwarded.
// When spare_en is set the spare board (input N_VFB) processes the same
// events as board spare_sel and delivers in the same cycle; the two results
// are compared field by field and spare_checks / spare_mismatches count
// the comparisons and the differences.
// Every forwarded result also goes to lumi_counter (vertex classes per
// period).
//
// De-multiplexing, the spare check and the luminosity counting follow the
// described Output Board; the error flag and counters are this design's
// choices.
module output_board
  import pu_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  vfb_result_t [N_VFB:0]     res,
  input  logic                      spare_en,
  input  logic [$clog2(N_VFB)-1:0]  spare_sel,
  input  logic [31:0]               lumi_period,
  output vfb_result_t               l0_result,
  output logic                      seq_error,
  output logic [31:0]               spare_checks,
  output logic [31:0]               spare_mismatches,
  output logic [3:0][31:0]          lumi_counts,
  output logic                      lumi_snap
);
  localparam int unsigned RR_W = $clog2(N_VFB);

  logic [RR_W-1:0]   turn;
  logic [N_VFB-1:0]  valid_vec;
  logic              good;

  always_comb begin
    for (int k = 0; k < int'(N_VFB); k++) valid_vec[k] = res[k].valid;
    good = (valid_vec == (N_VFB'(1) << turn));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      turn             <= '0;
      l0_result        <= '0;
      seq_error        <= 1'b0;
      spare_checks     <= '0;
      spare_mismatches <= '0;
    end else begin
      l0_result <= '0;
      if (valid_vec != '0) begin
        if (good) begin
          l0_result <= res[turn];
          turn      <= (turn == RR_W'(N_VFB - 1)) ? '0 : turn + 1'b1;
        end else begin
          seq_error <= 1'b1;
        end
      end
      if (spare_en && res[N_VFB].valid) begin
        spare_checks <= spare_checks + 32'd1;
        if (res[N_VFB] != res[spare_sel]) spare_mismatches <= spare_mismatches + 32'd1;
      end
    end
  end

  lumi_counter u_lumi (
    .clk, .rst_n,
    .ev_valid(l0_result.valid), .nvtx(l0_result.nvtx), .period(lumi_period),
    .counts(lumi_counts), .snap_valid(lumi_snap));
endmodule
