`timescale 1ns/1ps
// delay_line_ctrl: control logic of the per-pixel delay line, which holds a
// photon's timing edge while the routing selection runs.
//
// A rising edge on `photon` sets the input flip-flop (`armed`), which enables
// the ring oscillator (`ring_en`, the AND1 input). A counter clocked by the
// ring output `osc` counts oscillation periods. When it reaches DELAY_CYCLES
// the output `out` goes high (AND2). When the ring output falls again, half a
// ring period later (AND3), the input flip-flop is cleared, which ends the
// output pulse and stops the ring. The ring finishes its lap and comes to
// rest with one more rising edge, which clears the counter; until then AND3
// holds the flip-flop clear.
//
// The rising edge of `out` follows the photon by DELAY_CYCLES ring periods;
// the pulse is half a ring period (7 ns) wide, shorter than a 12.5 ns laser
// period, so that pulses of consecutive periods on a shared channel line stay
// apart. `busy` is high from the photon until the counter is clear again;
// photons arriving meanwhile are ignored.
//
// The flip-flop, counter and the two decoding gates follow the published circuit,
// whose prototype uses two cycles. The published circuit clears the flip-flop one full
// cycle after the output rises; clearing it on the falling ring edge, for a
// shorter pulse, is this design's choice, as are the asynchronous `rst` and
// the generic comparison against DELAY_CYCLES, and clearing the counter on
// the ring's resting edge. The input flip-flop is cleared through its
// asynchronous reset by its own count: this self-timed pulse is the intended
// circuit, and the ring phase keeps the clear free of glitches.
module delay_line_ctrl #(
  parameter int unsigned DELAY_CYCLES = 2
) (
  input  logic rst,       // asynchronous clear
  input  logic photon,    // SPAD pulse, rising edge is the timing event
  input  logic osc,       // ring oscillator output
  output logic ring_en,   // enables the ring (AND1)
  output logic out,       // delayed photon edge (AND2)
  output logic busy       // delay line occupied
);

  localparam int unsigned CW = $clog2(DELAY_CYCLES + 1);

  logic          armed;
  logic          clr;
  logic [CW-1:0] cnt;

  assign clr = rst | ((cnt == CW'(DELAY_CYCLES)) & ~osc);   // AND3

  always_ff @(posedge photon or posedge clr) begin
    if (clr) armed <= 1'b0;
    else     armed <= 1'b1;
  end

  always_ff @(posedge osc or posedge rst) begin
    if (rst)         cnt <= '0;
    else if (!armed) cnt <= '0;          // resting edge after the output cycle
    else             cnt <= cnt + 1'b1;
  end

  assign ring_en = armed;
  assign out     = armed & (cnt == CW'(DELAY_CYCLES));   // AND2
  assign busy    = armed | (cnt != '0);   // includes the ring's last lap

endmodule
