// L0 buffer and derandomiser: the copy of a plane's input data kept for the
// data-acquisition chain.
//
// Every cycle the crossing's hit bits and bunch number are written into a
// circular buffer of L0_LATENCY entries (4.0 us at 25 ns = 160), so each
// crossing stays in it for exactly the L0 latency. The L0 accept for a
// crossing arrives L0_LATENCY cycles after its hits; in that cycle the slot
// about to be overwritten holds that crossing, and it is copied into the
// derandomiser, a FIFO of DERAND_DEPTH (16) events. The derandomiser is
// read out at one event per READOUT_CYCLES (900 ns = 36 cycles): daq_valid
// pulses with the event on daq_hits / daq_bx. An accept that finds the
// FIFO full sets the sticky overflow flag and is lost; with at most 16
// consecutive accepts, as the L0 trigger rules allow, this cannot happen.
//
// Timing: accept in cycle t -> event in the FIFO at t+2; the first readout
// can follow in the next cycle. The circular buffer is not cleared by
// reset: an accept in the first L0_LATENCY cycles after reset returns
// whatever the memory held.
//
// The buffer depths, latency and readout time are the front-end L0
// parameters of the system; placing the buffer on the Multiplexer Board
// follows the described plan; the parallel output format is this design's
// choice.
module l0_buffer
  import pu_pkg::*;
#(
  parameter int unsigned W              = 2 * N_CH,
  parameter int unsigned L0_LATENCY     = 160,
  parameter int unsigned DERAND_DEPTH   = 16,
  parameter int unsigned READOUT_CYCLES = 36
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        hits,
  input  bx_t                 bx,
  input  logic                l0_accept,
  output logic                daq_valid,
  output logic [W-1:0]        daq_hits,
  output bx_t                 daq_bx,
  output logic [$clog2(DERAND_DEPTH+1)-1:0] level,
  output logic                overflow
);
  localparam int unsigned AW = $clog2(L0_LATENCY);
  localparam int unsigned FW = $clog2(DERAND_DEPTH);
  localparam int unsigned TW = $clog2(READOUT_CYCLES);

  typedef struct packed {
    bx_t          bx;
    logic [W-1:0] hits;
  } entry_t;

  // ------------------------------------------------------------ L0 pipeline
  entry_t          pipe_mem [L0_LATENCY];
  logic [AW-1:0]   wp;
  entry_t          old_q;
  logic            acc_q;

  always_ff @(posedge clk) begin
    old_q <= pipe_mem[wp];                 // the crossing written L0_LATENCY ago
    pipe_mem[wp] <= '{bx: bx, hits: hits};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      acc_q <= 1'b0;
    end else begin
      wp    <= (wp == AW'(L0_LATENCY - 1)) ? '0 : wp + 1'b1;
      acc_q <= l0_accept;
    end
  end

  // ------------------------------------------------------------ derandomiser
  entry_t          fifo [DERAND_DEPTH];
  logic [FW-1:0]   head, tail;
  logic [TW-1:0]   timer;
  logic            push, pop;

  assign push = acc_q && (level != $bits(level)'(DERAND_DEPTH));
  assign pop  = (timer == '0) && (level != '0);

  always_ff @(posedge clk) begin
    if (push) fifo[tail] <= old_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head      <= '0;
      tail      <= '0;
      level     <= '0;
      timer     <= '0;
      overflow  <= 1'b0;
      daq_valid <= 1'b0;
      daq_hits  <= '0;
      daq_bx    <= '0;
    end else begin
      daq_valid <= pop;
      if (pop) begin
        daq_hits <= fifo[head].hits;
        daq_bx   <= fifo[head].bx;
        head     <= (head == FW'(DERAND_DEPTH - 1)) ? '0 : head + 1'b1;
        timer    <= TW'(READOUT_CYCLES - 1);
      end else if (timer != '0) begin
        timer <= timer - 1'b1;
      end
      if (push) tail <= (tail == FW'(DERAND_DEPTH - 1)) ? '0 : tail + 1'b1;
      level <= level + $bits(level)'(push) - $bits(level)'(pop);
      if (acc_q && !push) overflow <= 1'b1;
    end
  end
endmodule
