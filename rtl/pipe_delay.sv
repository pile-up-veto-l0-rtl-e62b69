// Fixed-length delay line: a chain of DEPTH registers of WIDTH bits.
//
// dout equals din as it was DEPTH clock cycles earlier. DEPTH = 0 is a
// plain wire. Registers are cleared by the active-low synchronous reset, so
// nothing undefined leaves the line after reset. Used to keep side-band data
// (hits, bunch-crossing numbers, earlier peaks) aligned with the pipelined
// datapath, and to pad the Vertex Finder to its fixed trigger latency.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= din;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end
    assign dout = stage[DEPTH-1];
  end
endmodule
