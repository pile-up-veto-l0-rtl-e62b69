// Test Board: stores event patterns loaded over a VME-style bus, plays them
// into the processor at full speed on a software trigger, and collects the
// serial data of the Vertex Finder monitor registers for readback.
//
// Pattern memory: N_PAT patterns of 512 bits ({plane A, plane B}, each
// {left, right}), written as 32-bit words: address = pattern * 16 + word,
// word 0 holding bits [31:0] of plane B's right half and word 15 the top of
// plane A. On sw_trigger the board sends patterns 0 .. n_pat-1, one per
// cycle, on out_valid / hits_a / hits_b, with `busy` set until the last one
// has left. Memory read is synchronous, so the first pattern appears two
// cycles after the trigger.
//
// Monitor readback: with spy_shift set, one bit per cycle from the selected
// monitor register (spy_sin) is shifted into a SPY_W-bit register, least
// significant bit first; vme_rdata returns 32-bit word vme_raddr of it.
//
// Storing patterns loaded over VME, sending them at full speed on a
// software trigger and reading the shifted monitor data back are described
// for the prototype test set-up; memory size and bus layout are this
// design's choices.
module test_pattern_gen
  import pu_pkg::*;
#(
  parameter int unsigned N_PAT = 256,
  parameter int unsigned SPY_W = SPY_CHAIN_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // pattern load
  input  logic              vme_we,
  input  logic [$clog2(N_PAT*16)-1:0] vme_addr,
  input  logic [31:0]       vme_wdata,
  // playback
  input  logic              sw_trigger,
  input  logic [$clog2(N_PAT+1)-1:0] n_pat,
  output logic              busy,
  output logic              out_valid,
  output logic [2*N_CH-1:0] hits_a,
  output logic [2*N_CH-1:0] hits_b,
  // monitor readback
  input  logic              spy_shift,
  input  logic              spy_sin,
  input  logic [$clog2((SPY_W+31)/32)-1:0] vme_raddr,
  output logic [31:0]       vme_rdata
);
  localparam int unsigned PW = $clog2(N_PAT);
  localparam int unsigned SW = ((SPY_W + 31) / 32) * 32;

  logic [15:0][31:0] pat_mem [N_PAT];
  logic [PW-1:0]     rd_ptr;
  logic [PW:0]       remaining;
  logic              rd_en, rd_q;
  logic [15:0][31:0] rd_data;

  always_ff @(posedge clk) begin
    if (vme_we) pat_mem[vme_addr[PW+3:4]][vme_addr[3:0]] <= vme_wdata;
    if (rd_en)  rd_data <= pat_mem[rd_ptr];
  end

  assign rd_en = (remaining != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      remaining <= '0;
      rd_q      <= 1'b0;
      out_valid <= 1'b0;
      hits_a    <= '0;
      hits_b    <= '0;
    end else begin
      if (sw_trigger && remaining == '0) begin
        rd_ptr    <= '0;
        remaining <= (PW+1)'(n_pat);
      end else if (rd_en) begin
        rd_ptr    <= rd_ptr + 1'b1;
        remaining <= remaining - 1'b1;
      end
      rd_q      <= rd_en;
      out_valid <= rd_q;
      if (rd_q) {hits_a, hits_b} <= rd_data;
    end
  end

  assign busy = (remaining != '0) || rd_q || out_valid;

  // monitor readback
  logic [SW-1:0] spy_in;

  always_ff @(posedge clk) begin
    if (!rst_n) spy_in <= '0;
    else if (spy_shift) spy_in <= {spy_sin, spy_in[SW-1:1]};
  end

  // after SPY_W shifts the first bit received sits at SW-SPY_W
  logic [SW-1:0] spy_aligned;
  assign spy_aligned = spy_in >> (SW - SPY_W);
  assign vme_rdata   = spy_aligned[vme_raddr*32 +: 32];
endmodule
