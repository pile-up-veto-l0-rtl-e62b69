// Self-checking testbench of l0_buffer at its default sizes: random hits
// every cycle, L0 accepts arriving exactly 160 cycles after their crossing
// at random (average below the 36-cycle readout time) and in bursts of 16
// consecutive accepts. Every event read out must be the accepted crossing,
// in order, with at least 36 cycles between readouts and no overflow. A
// final burst too long for the derandomiser must set the overflow flag.
module tb_l0_buffer;
  import pu_pkg::*;

  localparam int LAT = 160, DEPTH = 16, RD = 36, W = 2 * N_CH;

  logic clk = 1'b0, rst_n = 1'b0, l0_accept = 1'b0;
  logic [W-1:0] hits = '0;
  bx_t bx = '0;
  logic daq_valid, overflow;
  logic [W-1:0] daq_hits;
  bx_t daq_bx;
  logic [4:0] level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  l0_buffer dut (.clk, .rst_n, .hits, .bx, .l0_accept, .daq_valid, .daq_hits, .daq_bx,
                 .level, .overflow);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] sent_hits [int];
  typedef struct { logic [W-1:0] h; bx_t bx; } ev_t;
  ev_t expq [$];
  int last_rd = -1000, n_rd = 0, max_level = 0;

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 9000; cyc++) begin
      bit acc;
      logic [W-1:0] h;
      for (int w = 0; w < W / 32; w++) h[w*32 +: 32] = $urandom;
      sent_hits[cyc] = h;
      acc = 1'b0;
      if (cyc >= LAT) begin
        if (cyc < 1300 || (cyc >= 2700 && cyc < 3300) || (cyc >= 4700 && cyc < 6000))
          acc = ($urandom % 50) == 0;   // quiet before each burst so it may be 16 long
        // bursts of 16 consecutive accepts
        if ((cyc >= 2000 && cyc < 2016) || (cyc >= 4000 && cyc < 4016)) acc = 1'b1;
        // a burst the derandomiser cannot hold
        if (cyc >= 7000 && cyc < 7040) acc = 1'b1;
      end
      if (acc && cyc < 7000) expq.push_back('{h: sent_hits[cyc - LAT], bx: bx_t'(cyc - LAT)});
      hits = h; bx = bx_t'(cyc); l0_accept = acc;
      @(negedge clk);
      if (int'(level) > max_level) max_level = int'(level);
      if (daq_valid) begin
        checks++;
        if (cyc - last_rd < RD) begin
          failures++;
          $display("FAIL: readouts %0d cycles apart", cyc - last_rd);
        end
        last_rd = cyc;
        n_rd++;
        if (cyc < 7000) begin
          ev_t e;
          checks++;
          e = expq.pop_front();
          if (daq_hits !== e.h || daq_bx !== e.bx) begin
            failures++;
            if (failures < 10) $display("FAIL: read bx %0d expected bx %0d", daq_bx, e.bx);
          end
        end
      end
      if (cyc == 6990) begin
        checks += 2;
        if (overflow) begin failures++; $display("FAIL: overflow with legal bursts"); end
        if (expq.size() != 0) begin failures++; $display("FAIL: %0d events not read", expq.size()); end
      end
    end
    $display("readouts=%0d max-level=%0d overflow=%0d", n_rd, max_level, overflow);
    checks += 2;
    if (!overflow) begin failures++; $display("FAIL: overflow not flagged"); end
    if (max_level < 15) begin failures++; $display("FAIL: derandomiser never nearly full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
