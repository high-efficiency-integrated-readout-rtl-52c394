`timescale 1ns/1ps
// priority_generator: the per-pixel source of routing priorities.
//
// A PRIO_BITS-wide counter advances once per excitation period (on `tick`,
// the last Clock_HF cycle of a laser period). During a start-up phase the
// counters are switched on one after the other: pixel n starts counting when
// the enable it receives from pixel n-1 (`en_in`) is high, and hands the
// enable on to pixel n+1 one period later through `en_out`. Pixel n therefore
// always holds the count of pixel 1 minus (n-1), so every pixel has a
// different value while all advance together.
//
// When the pixel takes part in a selection (`capture` high on a `tick`), the
// count of the period just ended is copied into a shift register with its bit
// order reversed, so that the fastest-toggling counter bit becomes the most
// significant priority bit and no pixel keeps a high priority for long.
// During the selection, `shift` moves the register left once per Clock_HF
// step and `prio_bit` presents the current bit, most significant first.
//
// The counter, the chained start-up, the bit reversal and the serial
// extraction follow the published circuit. The single clock with a `tick` strobe in
// place of a separate laser-synchronous clock, and the synchronous active-low
// reset, are this design's choices.
module priority_generator #(
  parameter int unsigned PRIO_BITS = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick,      // last Clock_HF cycle of the excitation period
  input  logic                 en_in,     // start-up enable from the previous pixel (EN_ext for the first)
  output logic                 en_out,    // start-up enable to the next pixel
  input  logic                 capture,   // load the reversed count at this tick
  input  logic                 shift,     // one comparison step
  output logic                 prio_bit,  // current priority bit (Bi)
  output logic [PRIO_BITS-1:0] count      // counter value of the current period
);

  logic [PRIO_BITS-1:0] shreg;

  function automatic logic [PRIO_BITS-1:0] bitrev(input logic [PRIO_BITS-1:0] v);
    logic [PRIO_BITS-1:0] r;
    for (int i = 0; i < PRIO_BITS; i++) r[i] = v[PRIO_BITS-1-i];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      en_out <= 1'b0;
    end else if (tick) begin
      en_out <= en_in;
      if (en_in) count <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                shreg <= '0;
    else if (tick && capture)  shreg <= bitrev(count);
    else if (shift)            shreg <= {shreg[PRIO_BITS-2:0], 1'b0};
  end

  assign prio_bit = shreg[PRIO_BITS-1];

endmodule
