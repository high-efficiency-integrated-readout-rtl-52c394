`timescale 1ns/1ps
// ring_oscillator: behavioural model of the gated ring oscillator that times
// the per-pixel delay line. It is not synthesizable logic: on silicon it is a
// chain of fully differential inverting stages whose delay sets the timing.
//
// An odd number of inverting stages (STAGES, nine on the prototype) is closed
// into a loop through an AND gate (AND1); the model keeps the ring's timing,
// one lap of STAGES stage delays per half period, rather than each stage. While `en` is low the AND output is
// low and the ring rests with `osc` high. When `en` rises the ring starts:
// `osc` falls after STAGES stage delays and rises again after 2*STAGES, so the
// first rising edge of `osc` comes one full oscillation period after `en`.
// Dropping `en` stops the ring within one lap.
//
// The topology and the nine stages follow the published circuit. The stage delay is
// derived from the prototype figures (28 ns for two laps of nine stages, i.e.
// 28 / 36 ns per stage); jitter, mismatch and supply effects are not modelled.
module ring_oscillator #(
  parameter int unsigned STAGES         = 9,
  parameter real         STAGE_DELAY_NS = 28.0 / 36.0
) (
  input  logic en,     // oscillation enable (output of the input flip-flop)
  output logic osc     // ring output, clocks the delay-line counter
);

  localparam real LAP_NS = STAGES * STAGE_DELAY_NS;   // one trip round the ring

  // The ring is modelled lap by lap rather than stage by stage: a change of
  // the AND1 output takes one lap to reach the ring output, and while the
  // ring runs each lap inverts the output. A lap that has started always
  // completes, so the ring comes to rest with its output high.
  initial osc = 1'b1;

  always begin
    wait (en);
    while (en) begin
      #(LAP_NS) osc = 1'b0;
      #(LAP_NS) osc = 1'b1;
    end
  end

endmodule
