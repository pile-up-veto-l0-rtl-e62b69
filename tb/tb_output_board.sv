// Self-checking testbench of output_board: the four round-robin boards
// deliver random results one per cycle in turn, with idle cycles between
// some of them, and the spare board delivers a copy of board 1's results,
// sometimes corrupted. Checked: every result is forwarded one cycle later
// in order, the spare comparisons and mismatches are counted, the
// luminosity snapshot matches the forwarded vertex classes, and a result
// from the wrong board raises seq_error and is not forwarded.
module tb_output_board;
  import pu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  vfb_result_t [N_VFB:0] res = '0;
  logic spare_en = 1'b1;
  logic [1:0] spare_sel = 2'd1;
  logic [31:0] lumi_period = 32'd100;
  vfb_result_t l0_result;
  logic seq_error, lumi_snap;
  logic [31:0] spare_checks, spare_mismatches;
  logic [3:0][31:0] lumi_counts;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  output_board dut (.clk, .rst_n, .res, .spare_en, .spare_sel, .lumi_period, .l0_result,
                    .seq_error, .spare_checks, .spare_mismatches, .lumi_counts, .lumi_snap);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vfb_result_t rand_result(int bx);
    vfb_result_t r;
    r = vfb_result_t'({$urandom, $urandom, $urandom});
    r.valid = 1'b1;
    r.bx = bx_t'(bx);
    return r;
  endfunction

  initial begin
    int turn, n_spare, n_bad, snaps, cyc;
    int unsigned cls [4];
    vfb_result_t sent, prev;
    bit prev_valid;
    turn = 0; n_spare = 0; n_bad = 0; snaps = 0; prev_valid = 0; cyc = 0;
    foreach (cls[i]) cls[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      res = '0;
      sent = '0;
      if (t % 13 != 7) begin
        sent = rand_result(t);
        res[turn] = sent;
        if (turn == 1) begin
          res[N_VFB] = sent;
          if ($urandom % 4 == 0) begin
            res[N_VFB].nvtx = ~sent.nvtx;
            n_bad++;
          end
          n_spare++;
        end
        turn = (turn + 1) % N_VFB;
      end
      @(negedge clk);
      cyc++;
      // forwarded result of this cycle's input
      checks++;
      if (l0_result !== sent) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: forwarded result differs", t);
      end
      // a snapshot holds the results forwarded before this cycle
      if (lumi_snap) begin
        snaps++;
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (lumi_counts[i] != cls[i]) begin
            failures++;
            $display("FAIL snapshot %0d class %0d: %0d expected %0d", snaps, i, lumi_counts[i], cls[i]);
          end
          cls[i] = 0;
        end
      end
      if (sent.valid) cls[sent.nvtx]++;
    end
    checks += 3;
    if (seq_error) begin failures++; $display("FAIL: seq_error in order"); end
    if (spare_checks != 32'(n_spare)) begin failures++; $display("FAIL: spare checks %0d exp %0d", spare_checks, n_spare); end
    if (spare_mismatches != 32'(n_bad) || n_bad == 0) begin failures++; $display("FAIL: mismatches %0d exp %0d", spare_mismatches, n_bad); end
    checks++;
    if (snaps < 3) begin failures++; $display("FAIL: only %0d snapshots", snaps); end
    // a result from the wrong board
    res = '0;
    res[(turn + 1) % N_VFB] = rand_result(999);
    @(negedge clk);
    res = '0;
    checks += 2;
    if (!seq_error) begin failures++; $display("FAIL: wrong board not flagged"); end
    if (l0_result.valid) begin failures++; $display("FAIL: wrong board result forwarded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
