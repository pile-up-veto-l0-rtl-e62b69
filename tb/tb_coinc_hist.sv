// Self-checking testbench of coinc_hist: random hit patterns of varying
// density, each histogram bin compared with a pair-by-pair count over the
// coincidence matrix; the result must appear exactly one cycle after the
// input.
module tb_coinc_hist;
  import pu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [N_CH-1:0] hits_a = '0, hits_b = '0;
  half_hist_t hist;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coinc_hist dut (.clk, .rst_n, .in_valid, .hits_a, .hits_b, .out_valid, .hist);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned pairs(input logic [N_CH-1:0] a, input logic [N_CH-1:0] b, input int d);
    int unsigned n = 0;
    for (int i = 0; i < int'(N_CH); i++)
      for (int k = 0; k < int'(N_CH); k++)
        if (a[i] && b[k] && (k - i == d)) n++;
    return n;
  endfunction

  initial begin
    logic [N_CH-1:0] ea, eb;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      int dens;
      dens = (t < 4) ? t * 40 : 1 + $urandom % 60;   // includes empty and dense inputs
      ea = '0; eb = '0;
      if (t == 2) begin ea = '1; eb = '1; end
      else for (int k = 0; k < dens; k++) begin
        ea[$urandom % N_CH] = 1'b1;
        eb[$urandom % N_CH] = 1'b1;
      end
      @(negedge clk);
      hits_a = ea; hits_b = eb; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid !== 1'b1) begin
        failures++;
        $display("FAIL t=%0d: out_valid not set one cycle after input", t);
      end
      for (int i = 0; i < int'(N_BINS); i++) begin
        int unsigned exp_n;
        exp_n = pairs(ea, eb, int'(D_MIN) + i);
        checks++;
        if (hist[i] != hbin_t'(exp_n)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d bin %0d: got %0d expected %0d", t, i, hist[i], exp_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
