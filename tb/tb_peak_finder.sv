// Self-checking testbench of peak_finder: random histograms, some with
// deliberate ties and some all zero, searched with and without an exclusion
// window; bin and height are compared with the reference search of
// tb_ref_pkg, and the result must appear one cycle after the input.
module tb_peak_finder;
  import pu_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  hist_t hist = '0;
  logic excl_en = 1'b0;
  bin_idx_t excl_center = '0;
  logic [2:0] excl_radius = '0;
  peak_t peak;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  peak_finder dut (.clk, .rst_n, .in_valid, .hist, .excl_en, .excl_center, .excl_radius,
                   .out_valid, .peak);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist_arr_t c;
    peak_t e;
    bit en;
    int ctr, rad;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < int'(N_BINS); i++) c[i] = (t % 50 == 0) ? 0 : $urandom % 40;
      if (t % 3 == 0) begin          // a tie between two bins at the top
        int x, y;
        x = $urandom % N_BINS; y = $urandom % N_BINS;
        c[x] = 60; c[y] = 60;
      end
      en  = (t % 2) == 1;
      ctr = $urandom % N_BINS;
      rad = $urandom % 8;
      e = ref_peak(c, en, ctr, rad);
      @(negedge clk);
      for (int i = 0; i < int'(N_BINS); i++) hist[i] = cbin_t'(c[i]);
      excl_en = en; excl_center = bin_idx_t'(ctr); excl_radius = 3'(rad);
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid !== 1'b1 || peak !== e) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d: got bin %0d h %0d, expected bin %0d h %0d (excl %0d c%0d r%0d)",
                   t, peak.bin, peak.height, e.bin, e.height, en, ctr, rad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
