// Self-checking testbench of half_combine: random left and right half
// histograms (including all-zero and all-maximum ones); each combined bin is
// compared with the left bin plus every right bin that maps onto it, and
// the result must appear one cycle after the input.
module tb_half_combine;
  import pu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  half_hist_t hl = '0, hr = '0;
  hist_t hist;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  half_combine dut (.clk, .rst_n, .in_valid, .hist_l(hl), .hist_r(hr), .out_valid, .hist);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    half_hist_t l, r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < int'(N_BINS); i++) begin
        l[i] = (t == 0) ? '0 : (t == 1) ? hbin_t'(N_CH) : hbin_t'($urandom % (N_CH + 1));
        r[i] = (t == 0) ? '0 : (t == 1) ? hbin_t'(N_CH) : hbin_t'($urandom % (N_CH + 1));
      end
      @(negedge clk);
      hl = l; hr = r; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid !== 1'b1) begin
        failures++;
        $display("FAIL t=%0d: out_valid missing", t);
      end
      for (int p = 0; p < int'(N_BINS); p++) begin
        int unsigned e;
        e = int'(l[p]);
        foreach (RIGHT_TO_LEFT[j]) if (RIGHT_TO_LEFT[j] == p) e += int'(r[j]);
        checks++;
        if (hist[p] != cbin_t'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d bin %0d: got %0d expected %0d", t, p, hist[p], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
