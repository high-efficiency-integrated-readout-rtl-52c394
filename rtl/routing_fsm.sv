`timescale 1ns/1ps
// routing_fsm: the per-pixel state register SR5-1 and its update logic.
//
// Each bit of the state register stands for one shared channel (MSB = F-TAC 5,
// LSB = F-TAC 1); a set bit means the pixel may still be routed to that
// channel. A selection begins with `start`, which sets every bit. On each
// comparison step (`step`) the pixel:
//   1. draws current from every line whose state bit is set, if its current
//      priority bit is 1 (`req`);
//   2. reads, through the analog multiplexer, the line that corresponds to the
//      most significant set bit of its state, and turns the level found there
//      into a thermometric code (level N gives N ones from the MSB, five ones
//      for N >= 5);
//   3. right-shifts that code so that its MSB lines up with the first set bit
//      of the state, and ANDs it into the state (priority bit 1) or ANDs its
//      complement (priority bit 0). This is the XNOR-plus-AND gate of each
//      flip-flop.
// After all steps, a pixel whose state is non-zero owns the channel of its
// most significant set bit (`route`); a zero state means the photon is lost.
// Every line of a group carries the same level, so reading the first line of
// the group is enough.
//
// The algorithm follows the published circuit. The `step`/`start` strobes, the reset
// value (all zero, no channel) and the digital level input standing for the
// five in-pixel comparators are this design's choices.
module routing_fsm
  import router_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,               // begin a selection: state <= 11111
  input  logic    step,                // one comparison step at this Clock_HF edge
  input  logic    prio_bit,            // current priority bit Bi
  input  level_t  level [NUM_CH],      // levels of the pixel's set of lines
  output chmask_t req,                 // current generators switched onto L5..L1
  output chmask_t state,               // SR5-1
  output chmask_t route                // one-hot channel owned by the pixel (or zero)
);

  int unsigned lead;                   // index of the first set state bit
  chmask_t     therm, therm_sh, next_state;

  always_comb begin
    lead       = first_one(state);
    therm      = thermo(level[lead]);
    therm_sh   = therm >> (NUM_CH - 1 - lead);
    next_state = prio_bit ? (state & therm_sh) : (state & ~therm_sh);
  end

  assign req   = (step && prio_bit) ? state : '0;
  assign route = (state != '0) ? chmask_t'(1 << first_one(state)) : '0;

  always_ff @(posedge clk) begin
    if (!rst_n)     state <= '0;
    else if (start) state <= '1;
    else if (step)  state <= next_state;
  end

endmodule
