`timescale 1ns/1ps
// spad_router_top: smart router between a SPAD array and a few shared
// time-measurement channels for time-correlated single photon counting.
//
// NUM_PIXELS pixel cells (32x32 by default) share NUM_CH = 5 channel lines
// (`ftac_start`, one per F-TAC converter) and NUM_SETS sets of five
// multilevel comparison lines. In every laser period, all pixels that saw a
// photon compete, one priority bit per Clock_HF step, for the five channels;
// the five highest priorities win, highest on F-TAC 5, and the others are
// dropped. Priorities rotate every period, so each pixel wins equally often
// on average. While the selection runs, each photon's edge waits in its
// pixel's delay line; it then appears on the winning channel line with a
// fixed delay, ready for the converter.
//
// The same comparison lines tell the outside which pixel reached which
// channel: a line_decoder per set rebuilds each winner's priority word and
// address_recovery turns it into a pixel address. `sel_valid` pulses once per
// finished selection with `sel_addr[k]` / `sel_prio[k]` for channel k
// (index 4 = F-TAC 5); an address is meaningful only for a channel that
// received a pulse. Addresses are right once start-up is over (`ready`):
// `en_ext` must be raised once and held, after which the priority counters
// are enabled one pixel per period along the array.
//
// Timing: Clock_HF = HF_PER_PERIOD cycles per laser period (5 -> 400 MHz at
// 80 MHz), phase-locked to the laser. A photon seen in period p is selected in
// the next PRIO_BITS cycles, decoded one cycle later and its address appears
// one cycle after that; its channel pulse leaves DELAY_CYCLES ring periods
// (14 ns each) after the photon.
//
// Channel count, priority width, array size, the selection algorithm, the
// pipelined line sets, the decoder and the ring-oscillator delay line follow
// the published circuit. The clock ratio, the number of delay cycles (four, so that
// the delay covers a two-period selection) and the read-out ports are this
// design's choices.
module spad_router_top
  import router_pkg::*;
#(
  parameter int unsigned NUM_PIXELS     = 1024,
  parameter int unsigned PRIO_BITS      = 10,
  parameter int unsigned HF_PER_PERIOD  = 5,
  parameter int unsigned NUM_SETS       = (PRIO_BITS + HF_PER_PERIOD - 1) / HF_PER_PERIOD,
  parameter int unsigned DELAY_CYCLES   = 4,
  parameter int unsigned RING_STAGES    = 9,
  parameter real         STAGE_DELAY_NS = 28.0 / 36.0
) (
  input  logic                 clk_hf,
  input  logic                 rst_n,
  input  logic                 en_ext,
  input  logic [NUM_PIXELS-1:0] photon,
  output chmask_t              ftac_start,
  output logic                 ready,
  output logic                 tick,
  output logic [PRIO_BITS-1:0] ref_count,   // priority count of the first pixel this period
  output level_t               line_level [NUM_SETS][NUM_CH],
  output logic                 sel_valid,
  output logic [PRIO_BITS-1:0] sel_addr [NUM_CH],
  output logic [PRIO_BITS-1:0] sel_prio [NUM_CH]
);

  localparam int unsigned CSW = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1;

  logic [CSW-1:0]       cur_set;
  logic [NUM_SETS-1:0]  step_en, first, last;
  logic [PRIO_BITS-1:0] stamp [NUM_SETS];

  logic [NUM_PIXELS:0]  en_chain;
  chmask_t              req      [NUM_PIXELS][NUM_SETS];
  chmask_t              chan_out [NUM_PIXELS];

  logic [PRIO_BITS-1:0] dec_prio  [NUM_SETS][NUM_CH];
  logic [NUM_SETS-1:0]  dec_valid;

  logic [PRIO_BITS-1:0] mux_prio  [NUM_CH];
  logic [PRIO_BITS-1:0] mux_stamp;
  logic                 mux_valid;

  selection_sequencer #(.PRIO_BITS(PRIO_BITS), .HF_PER_PERIOD(HF_PER_PERIOD),
                        .NUM_SETS(NUM_SETS)) u_seq (
    .clk(clk_hf), .rst_n, .en_ext, .tick, .cur_set, .step_en, .first, .last,
    .ref_count, .stamp);

  assign en_chain[0] = en_ext;

  for (genvar p = 0; p < NUM_PIXELS; p++) begin : g_pix
    pixel_cell #(.PRIO_BITS(PRIO_BITS), .NUM_SETS(NUM_SETS), .DELAY_CYCLES(DELAY_CYCLES),
                 .RING_STAGES(RING_STAGES), .STAGE_DELAY_NS(STAGE_DELAY_NS)) u_pix (
      .clk(clk_hf), .rst_n, .tick, .cur_set, .step_en, .last,
      .en_in(en_chain[p]), .en_out(en_chain[p+1]),
      .photon(photon[p]), .level(line_level), .req(req[p]),
      .chan_out(chan_out[p]));
  end

  assign ready = en_chain[NUM_PIXELS];

  comparison_lines #(.NUM_PIXELS(NUM_PIXELS), .NUM_SETS(NUM_SETS)) u_lines (
    .req, .level(line_level));

  // Shared channel lines: wired-OR of the gated delay-line outputs.
  always_comb begin
    ftac_start = '0;
    for (int p = 0; p < NUM_PIXELS; p++) ftac_start |= chan_out[p];
  end

  for (genvar s = 0; s < NUM_SETS; s++) begin : g_dec
    line_decoder #(.PRIO_BITS(PRIO_BITS)) u_dec (
      .clk(clk_hf), .rst_n, .step(step_en[s]), .first(first[s]), .last(last[s]),
      .level(line_level[s]), .prio(dec_prio[s]), .valid(dec_valid[s]));
  end

  // At most one set finishes per cycle; pass its words on.
  always_comb begin
    mux_valid = 1'b0;
    mux_stamp = '0;
    for (int k = 0; k < NUM_CH; k++) mux_prio[k] = '0;
    for (int s = 0; s < NUM_SETS; s++)
      if (dec_valid[s]) begin
        mux_valid = 1'b1;
        mux_stamp = stamp[s];
        for (int k = 0; k < NUM_CH; k++) mux_prio[k] = dec_prio[s][k];
      end
  end

  address_recovery #(.PRIO_BITS(PRIO_BITS)) u_addr (
    .clk(clk_hf), .rst_n, .prio_valid(mux_valid), .prio(mux_prio), .stamp(mux_stamp),
    .addr_valid(sel_valid), .addr(sel_addr));

  always_ff @(posedge clk_hf) begin
    if (!rst_n) for (int k = 0; k < NUM_CH; k++) sel_prio[k] <= '0;
    else if (mux_valid) sel_prio <= mux_prio;
  end

endmodule
