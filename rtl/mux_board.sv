// Multiplexer Board: spreads the bunch crossings of one detector plane over
// the Vertex Finder Boards.
//
// Every clock cycle (one 25 ns bunch crossing) with in_valid set, the
// board takes the 256 hit bits of its plane ({left half, right half}) and
// hands the event to the next Vertex Finder in round-robin order
// 0,1,..,N_VFB-1,0,... The event is sent over that board's link as
// SER_WORDS words of 64 bits on SER_WORDS consecutive cycles, low word
// first, with link_first on word 0 and the bunch-crossing number beside it.
// Since each Vertex Finder gets one event in N_VFB and N_VFB = SER_WORDS,
// every link can be busy all the time. When spare_en is set, the events of
// board spare_sel are also sent over link N_VFB to the spare Vertex Finder,
// so that its results can be checked.
//
// The bunch-crossing counter runs from 0 to BX_PER_TURN-1 and restarts at
// 0 in the cycle the turn_start pulse is seen, which keeps the boards of
// the crate in step with the LHC turn.
//
// Timing: an event accepted in cycle t appears on its link in cycles
// t+1 .. t+SER_WORDS.
//
// The board also keeps a copy of its input for the data-acquisition chain:
// an l0_buffer holds every crossing for the L0 latency and passes the
// crossings accepted by L0 (l0_accept) through its derandomiser to the daq_*
// outputs.
//
// Round-robin routing, the spare board and the turn-start pulse follow the
// described system; the link word format is this design's choice.
module mux_board
  import pu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             turn_start,
  input  logic             in_valid,
  input  logic [2*N_CH-1:0] hits,
  input  logic             spare_en,
  input  logic [$clog2(N_VFB)-1:0] spare_sel,
  // links 0..N_VFB-1 to the round-robin boards, link N_VFB to the spare
  output logic [N_VFB:0]       link_valid,
  output logic [N_VFB:0]       link_first,
  output bx_t   [N_VFB:0]      link_bx,
  output logic [N_VFB:0][63:0] link_data,
  // L0-accepted copy of the input for the DAQ
  input  logic             l0_accept,
  output logic             daq_valid,
  output logic [2*N_CH-1:0] daq_hits,
  output bx_t              daq_bx,
  output logic [4:0]       daq_level,
  output logic             daq_overflow
);
  localparam int unsigned RR_W = $clog2(N_VFB);
  localparam int unsigned CNT_W = $clog2(SER_WORDS);

  bx_t bx_cnt, bx_now;
  logic [RR_W-1:0] rr;

  // per link: remaining words and the words still to send
  logic [N_VFB:0][2*N_CH-65:0] pend;
  logic [N_VFB:0][CNT_W:0]     left_words;

  assign bx_now = turn_start ? '0 : bx_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bx_cnt <= '0;
      rr     <= '0;
    end else begin
      bx_cnt <= (bx_now == bx_t'(BX_PER_TURN - 1)) ? '0 : bx_now + 1'b1;
      if (in_valid) rr <= (rr == RR_W'(N_VFB - 1)) ? '0 : rr + 1'b1;
    end
  end

  l0_buffer u_l0buf (.clk, .rst_n, .hits, .bx(bx_now), .l0_accept,
    .daq_valid, .daq_hits, .daq_bx, .level(daq_level), .overflow(daq_overflow));

  for (genvar k = 0; k <= N_VFB; k++) begin : g_link
    logic take;
    if (k < N_VFB) begin : g_main
      assign take = in_valid && (rr == RR_W'(k));
    end else begin : g_spare
      assign take = in_valid && spare_en && (rr == spare_sel);
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        link_valid[k] <= 1'b0;
        link_first[k] <= 1'b0;
        link_bx[k]    <= '0;
        link_data[k]  <= '0;
        pend[k]       <= '0;
        left_words[k] <= '0;
      end else if (take) begin
        link_valid[k] <= 1'b1;
        link_first[k] <= 1'b1;
        link_bx[k]    <= bx_now;
        link_data[k]  <= hits[63:0];
        pend[k]       <= hits[2*N_CH-1:64];
        left_words[k] <= (CNT_W+1)'(SER_WORDS - 1);
      end else if (left_words[k] != '0) begin
        link_valid[k] <= 1'b1;
        link_first[k] <= 1'b0;
        link_data[k]  <= pend[k][63:0];
        pend[k]       <= pend[k] >> 64;
        left_words[k] <= left_words[k] - 1'b1;
      end else begin
        link_valid[k] <= 1'b0;
        link_first[k] <= 1'b0;
      end
    end

    // a link must have finished its previous event before it takes a new one
    always_ff @(posedge clk) begin
      if (rst_n && take) begin
        assert (left_words[k] == '0)
          else $error("mux_board: link %0d overrun", k);
      end
    end
  end
endmodule
