// Self-checking testbench of vfb_monitor: a stream of random words tagged
// with bunch numbers; after arming, the register must capture the word of
// the first matching crossing only, ignore later matches, and shift it out
// least significant bit first. Bits fed to the chain input while shifting
// must follow the captured word out (chaining of registers). Repeated for
// several bunch numbers.
module tb_vfb_monitor;
  import pu_pkg::*;

  localparam int W = $bits(vfb_result_t);
  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0, valid = 1'b0, shift = 1'b0, sin = 1'b0;
  bx_t spy_bx = '0, bx = '0;
  logic [W-1:0] data = '0;
  logic sout, captured;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vfb_monitor dut (.clk, .rst_n, .arm, .spy_bx, .valid, .bx, .data, .shift, .sin, .sout, .captured);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_w, got, d, chain;
    bit seen;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      spy_bx = bx_t'($urandom % 64);
      arm = 1'b1;
      @(negedge clk);
      arm = 1'b0;
      checks++;
      if (captured) begin failures++; $display("FAIL: captured right after arming"); end
      seen = 0;
      for (int c = 0; c < 200; c++) begin
        d = W'({$urandom, $urandom});
        valid = ($urandom % 3) != 0;
        bx = bx_t'(c % 64);
        data = d;
        if (valid && !seen && bx == spy_bx) begin exp_w = d; seen = 1; end
        @(negedge clk);
      end
      valid = 1'b0;
      checks++;
      if (captured !== seen) begin failures++; $display("FAIL: captured=%0d seen=%0d", captured, seen); end
      chain = W'({$urandom, $urandom});
      shift = 1'b1;
      for (int i = 0; i < W; i++) begin
        got[i] = sout;
        sin = chain[i];
        @(negedge clk);
      end
      if (seen) begin
        checks++;
        if (got !== exp_w) begin failures++; $display("FAIL round %0d: shifted word differs", r); end
      end
      for (int i = 0; i < W; i++) begin
        got[i] = sout;
        sin = 1'b0;
        @(negedge clk);
      end
      shift = 1'b0;
      checks++;
      if (got !== chain) begin failures++; $display("FAIL round %0d: chain input not passed on", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
