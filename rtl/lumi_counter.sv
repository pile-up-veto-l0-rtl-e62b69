// Luminosity monitor: counts events by their number of vertices.
//
// For every result (ev_valid) the counter of its class is incremented:
// 0, 1, 2 or 3-and-more vertices. A period counter counts clock cycles; at
// the end of each period of `period` cycles (5 to 60 s, that is 2e8 to
// 2.4e9 cycles at 40 MHz, fits in 32 bits) the four counts, including an
// event of that last cycle, are copied to `counts`, snap_valid pulses for
// one cycle and counting restarts from zero. The snapshot stays readable
// by slow control for the whole next period.
//
// Counting the vertex classes over 5-60 s periods follows the described
// Output Board; register widths and the snapshot scheme are this design's
// choices. Counters saturate rather than wrap.
module lumi_counter
  import pu_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ev_valid,
  input  logic [1:0]             nvtx,
  input  logic [31:0]            period,      // cycles per period, >= 1
  output logic [3:0][CNT_W-1:0]  counts,      // last completed period
  output logic                   snap_valid
);
  logic [3:0][CNT_W-1:0] run, run_next;
  logic [31:0]           tick;
  logic                  period_end;

  assign period_end = (tick >= period - 32'd1);

  always_comb begin
    run_next = run;
    if (ev_valid && run[nvtx] != '1) run_next[nvtx] = run[nvtx] + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run        <= '0;
      tick       <= '0;
      counts     <= '0;
      snap_valid <= 1'b0;
    end else begin
      snap_valid <= period_end;
      if (period_end) begin
        counts <= run_next;
        run    <= '0;
        tick   <= '0;
      end else begin
        run    <= run_next;
        tick   <= tick + 32'd1;
      end
    end
  end
endmodule
