// Self-checking testbench of hit_masker: events with vertices and noise and
// purely random hit patterns, masked at random and at the true vertex bins;
// the masked hits are compared with the pair-by-pair reference of
// tb_ref_pkg, and the result must appear one cycle after the input.
module tb_hit_masker;
  import pu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  event_hits_t hits = '0, hits_masked;
  bin_idx_t peak_bin = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hit_masker dut (.clk, .rst_n, .in_valid, .hits, .peak_bin, .out_valid, .hits_masked);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    event_hits_t h, e;
    int p, removed;
    int none[$];
    removed = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      p = $urandom % N_BINS;
      if (t % 2 == 0) h = gen_event({p, int'($urandom % N_BINS)}, {8, 4}, 20);
      else            h = gen_event(none, none, 60);
      e = ref_mask(h, p);
      if (e != h) removed++;
      @(negedge clk);
      hits = h; peak_bin = bin_idx_t'(p); in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid !== 1'b1 || hits_masked !== e) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d bin %0d: masked hits differ", t, p);
      end
    end
    // the masking must really have removed hits in most events
    checks++;
    if (removed < 150) begin
      failures++;
      $display("FAIL: only %0d events had hits removed", removed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
