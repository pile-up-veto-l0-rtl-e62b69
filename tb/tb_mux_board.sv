// Self-checking testbench of mux_board: random hits every cycle with some
// idle cycles, a turn-start pulse and a natural wrap of the bunch counter
// at 3564; the spare link shadows board 2. Every link is compared cycle by
// cycle with a schedule built by the testbench: event n goes to board
// n mod 4, its four 64-bit words appear in the four cycles after it was
// taken, low word first.
module tb_mux_board;
  import pu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, turn_start = 1'b0, in_valid = 1'b0;
  logic [2*N_CH-1:0] hits = '0;
  logic spare_en = 1'b1;
  logic [1:0] spare_sel = 2'd2;
  logic [N_VFB:0] link_valid, link_first;
  bx_t [N_VFB:0] link_bx;
  logic [N_VFB:0][63:0] link_data;
  logic daq_valid, daq_overflow;       // the L0 buffer is tested on its own
  logic [2*N_CH-1:0] daq_hits;
  bx_t daq_bx;
  logic [4:0] daq_level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mux_board dut (.clk, .rst_n, .turn_start, .in_valid, .hits, .spare_en, .spare_sel,
                 .link_valid, .link_first, .link_bx, .link_data, .l0_accept(1'b0),
                 .daq_valid, .daq_hits, .daq_bx, .daq_level, .daq_overflow);

  localparam int CYCLES = 4200;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic first; bx_t bx; logic [63:0] data; } word_t;
  word_t sched [N_VFB+1][int];   // expected word per link, keyed by cycle

  int wraps;

  initial begin
    int rr, bxc, bx_now, taken;
    logic [2*N_CH-1:0] h;
    rr = 0; bxc = 0; wraps = 0; taken = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      bit v, ts;
      v  = (c % 97) != 50;              // a few idle crossings
      ts = (c == 300);                  // one turn-start pulse
      for (int w = 0; w < 8; w++) h[w*32 +: 32] = $urandom;
      bx_now = ts ? 0 : bxc;
      if (!ts && bxc == BX_PER_TURN - 1) wraps++;
      bxc = (bx_now == BX_PER_TURN - 1) ? 0 : bx_now + 1;
      if (v) begin
        for (int w = 0; w < int'(SER_WORDS); w++) begin
          word_t x;
          x.first = (w == 0); x.bx = bx_t'(bx_now); x.data = h[w*64 +: 64];
          sched[rr][c + 1 + w] = x;
          if (rr == 2) sched[N_VFB][c + 1 + w] = x;
        end
        rr = (rr + 1) % N_VFB;
        taken++;
      end
      in_valid = v; turn_start = ts; hits = h;
      @(negedge clk);
      // compare all links for the cycle just clocked (cycle c + 1)
      for (int k = 0; k <= int'(N_VFB); k++) begin
        checks++;
        if (sched[k].exists(c + 1)) begin
          word_t x;
          x = sched[k][c + 1];
          if (!link_valid[k] || link_first[k] !== x.first || link_data[k] !== x.data ||
              (x.first && link_bx[k] !== x.bx)) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d link %0d: valid %0d first %0d bx %0d (exp %0d first %0d)",
                                        c + 1, k, link_valid[k], link_first[k], link_bx[k], x.bx, x.first);
          end
        end else if (link_valid[k]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d link %0d: unexpected word", c + 1, k);
        end
      end
    end
    checks++;
    if (wraps == 0 || taken < CYCLES - 50) begin
      failures++;
      $display("FAIL: bunch counter never wrapped (%0d) or too few events (%0d)", wraps, taken);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
