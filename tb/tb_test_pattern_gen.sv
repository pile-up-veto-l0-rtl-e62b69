// Self-checking testbench of test_pattern_gen: random patterns are written
// word by word over the load bus, a software trigger plays back the first
// n of them and every played pattern is compared with what was loaded,
// back to back at one per cycle; a second, shorter run follows. Then a
// random word is shifted in on the monitor input and read back as 32-bit
// words.
module tb_test_pattern_gen;
  import pu_pkg::*;

  localparam int NP = 256;
  localparam int SPY_W = SPY_CHAIN_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic vme_we = 1'b0, sw_trigger = 1'b0, spy_shift = 1'b0, spy_sin = 1'b0;
  logic [11:0] vme_addr = '0;
  logic [31:0] vme_wdata = '0, vme_rdata;
  logic [8:0] n_pat = '0;
  logic [1:0] vme_raddr = '0;
  logic busy, out_valid;
  logic [2*N_CH-1:0] hits_a, hits_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_pattern_gen dut (.clk, .rst_n, .vme_we, .vme_addr, .vme_wdata, .sw_trigger, .n_pat,
                        .busy, .out_valid, .hits_a, .hits_b, .spy_shift, .spy_sin,
                        .vme_raddr, .vme_rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [511:0] pats [NP];

  task automatic play(input int n);
    int got, first_at, t;
    got = 0; first_at = -1; t = 0;
    sw_trigger = 1'b1; n_pat = 9'(n);
    @(negedge clk);
    sw_trigger = 1'b0;
    while (busy && t < 1000) begin
      if (out_valid) begin
        checks++;
        if (first_at < 0) first_at = t;
        if ({hits_a, hits_b} !== pats[got] || t != first_at + got) begin
          failures++;
          if (failures < 10) $display("FAIL: pattern %0d at %0d", got, t);
        end
        got++;
      end
      @(negedge clk);
      t++;
    end
    checks += 2;
    if (got != n) begin failures++; $display("FAIL: %0d patterns played, expected %0d", got, n); end
    if (first_at != 2) begin failures++; $display("FAIL: first pattern %0d cycles after trigger", first_at); end
  endtask

  initial begin
    logic [SPY_W-1:0] sw;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NP; p++) begin
      for (int w = 0; w < 16; w++) pats[p][w*32 +: 32] = $urandom;
      for (int w = 0; w < 16; w++) begin
        vme_we = 1'b1; vme_addr = 12'(p * 16 + w); vme_wdata = pats[p][w*32 +: 32];
        @(negedge clk);
      end
    end
    vme_we = 1'b0;
    play(200);
    play(7);
    // monitor readback
    sw = SPY_W'({$urandom, $urandom, $urandom});
    spy_shift = 1'b1;
    for (int i = 0; i < SPY_W; i++) begin
      spy_sin = sw[i];
      @(negedge clk);
    end
    spy_shift = 1'b0;
    for (int w = 0; w < (SPY_W + 31) / 32; w++) begin
      logic [95:0] swx;
      swx = 96'(sw);
      vme_raddr = 2'(w);
      #1;
      checks++;
      if (vme_rdata !== swx[w*32 +: 32]) begin
        failures++; $display("FAIL: monitor word %0d = %h", w, vme_rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
