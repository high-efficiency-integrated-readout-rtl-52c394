`timescale 1ns/1ps
// address_recovery: turns the decoded priority words into pixel addresses.
//
// Pixel n (counted from 0 along the start-up chain) starts its priority
// counter n periods after the first pixel, so in every period its count is
// the first pixel's count minus n, modulo 2^PRIO_BITS. Its priority is that
// count bit-reversed. Given the first pixel's count for the period of the
// selection (`stamp`), the address of the pixel routed to channel k is
//     addr[k] = stamp - bitreverse(prio[k])   (mod 2^PRIO_BITS).
// The result is registered: `addr_valid` follows `prio_valid` by one cycle.
//
// Deriving the address from the priority and the elapsed time follows the
// published circuit; the formula is the one implied by this design's start-up chain.
module address_recovery
  import router_pkg::*;
#(
  parameter int unsigned PRIO_BITS = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 prio_valid,
  input  logic [PRIO_BITS-1:0] prio  [NUM_CH],
  input  logic [PRIO_BITS-1:0] stamp,
  output logic                 addr_valid,
  output logic [PRIO_BITS-1:0] addr  [NUM_CH]
);

  function automatic logic [PRIO_BITS-1:0] bitrev(input logic [PRIO_BITS-1:0] v);
    logic [PRIO_BITS-1:0] r;
    for (int i = 0; i < PRIO_BITS; i++) r[i] = v[PRIO_BITS-1-i];
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr_valid <= 1'b0;
      for (int k = 0; k < NUM_CH; k++) addr[k] <= '0;
    end else begin
      addr_valid <= prio_valid;
      if (prio_valid)
        for (int k = 0; k < NUM_CH; k++)
          addr[k] <= stamp - bitrev(prio[k]);
    end
  end

endmodule
