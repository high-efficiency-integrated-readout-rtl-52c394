`timescale 1ns/1ps
// line_decoder: recovers, from the comparison lines alone, the priority word
// of the pixel that each channel has been given, so that no address bus is
// needed.
//
// At every step the lines form groups of adjacent lines; initially one group
// holds all NUM_CH lines. Inside a group the lines are numbered I = 1, 2, ...
// from the L5 side, and the pixel routed to line I is the I-th highest
// priority among the pixels of the group. Every line of a group carries the
// same level N (the number of pixels in the group whose current priority bit
// is 1), so line I belongs to the high half H_P when N >= I and to the low
// half L_P otherwise. Its comparison result r = (N >= I) is therefore the
// priority bit, at this step, of the pixel that will end on that line. Where
// a line with r = 1 sits above a line with r = 0, the group splits there and
// both halves are renumbered from 1 at the next step.
//
// Implementation: one boundary flip-flop between each pair of adjacent lines
// records the splits made so far (the XNOR/FF2/AND of each line in the
// published circuit); the threshold of each line is one plus the number of lines above
// it in the same group, which selects one of the comparators of that line
// (one for L5 up to five for L1, fifteen in all). The results are shifted
// into one PRIO_BITS register per channel, MSB first. `first` marks the first
// step of a selection and clears the boundaries; one cycle after `last`,
// `valid` rises with the complete words in `prio`. A line that no pixel
// reached repeats the word of the line above it; whether a channel was used
// is known from the channel itself.
//
// The grouping rule, the thresholds and the per-step extraction follow the
// published circuit; the register arrangement and the strobes are this design's.
module line_decoder
  import router_pkg::*;
#(
  parameter int unsigned PRIO_BITS = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,               // a comparison step on this set of lines
  input  logic                 first,              // first step of a selection
  input  logic                 last,               // final step
  input  level_t               level [NUM_CH],     // resolved levels of L5..L1 (index 4..0)
  output logic [PRIO_BITS-1:0] prio  [NUM_CH],     // decoded priority per channel
  output logic                 valid
);

  logic [NUM_CH-2:0] bnd, bnd_eff, bnd_next;   // bnd[k]: split between line k+1 and line k
  level_t            thr [NUM_CH];             // threshold index I of each line
  chmask_t           result;                   // comparison result of each line

  always_comb begin
    bnd_eff = first ? '0 : bnd;
    thr[NUM_CH-1] = level_t'(1);
    for (int k = NUM_CH - 2; k >= 0; k--)
      thr[k] = bnd_eff[k] ? level_t'(1) : thr[k+1] + 1'b1;
    for (int k = 0; k < NUM_CH; k++)
      result[k] = (level[k] >= thr[k]);
    for (int k = 0; k < NUM_CH - 1; k++)
      bnd_next[k] = bnd_eff[k] | (result[k+1] & ~result[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bnd   <= '0;
      valid <= 1'b0;
      for (int k = 0; k < NUM_CH; k++) prio[k] <= '0;
    end else begin
      valid <= step && last;
      if (step) begin
        bnd <= bnd_next;
        for (int k = 0; k < NUM_CH; k++)
          prio[k] <= {prio[k][PRIO_BITS-2:0], result[k]};
      end
    end
  end

endmodule
