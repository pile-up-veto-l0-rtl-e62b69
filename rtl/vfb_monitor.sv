// Monitor ("spy") register of the Vertex Finder.
//
// While armed, the register captures the WIDTH-bit word `data` in the first
// cycle that `valid` is set and `bx` equals `spy_bx`, then sets `captured`
// and disarms. The captured word can then be shifted out serially, least
// significant bit first: while `shift` is set, `sout` presents the current
// bit and the register moves one place per cycle, taking `sin` in at the top
// so that several registers can be chained. `arm` re-arms it (and clears
// `captured`).
//
// Registers that capture part of the data stream and are shifted out to the
// test board are described for the prototype Vertex Finder; the trigger on
// a bunch number and the serial order are this design's choices.
module vfb_monitor
  import pu_pkg::*;
#(
  parameter int unsigned WIDTH = $bits(vfb_result_t)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arm,
  input  bx_t              spy_bx,
  input  logic             valid,
  input  bx_t              bx,
  input  logic [WIDTH-1:0] data,
  input  logic             shift,
  input  logic             sin,
  output logic             sout,
  output logic             captured
);
  logic [WIDTH-1:0] spy;
  logic             armed;

  assign sout = spy[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      spy      <= '0;
      armed    <= 1'b0;
      captured <= 1'b0;
    end else if (arm) begin
      armed    <= 1'b1;
      captured <= 1'b0;
    end else if (armed && valid && bx == spy_bx) begin
      spy      <= data;
      armed    <= 1'b0;
      captured <= 1'b1;
    end else if (shift) begin
      spy <= {sin, spy[WIDTH-1:1]};
    end
  end
endmodule
