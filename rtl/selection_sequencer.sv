`timescale 1ns/1ps
// selection_sequencer: timing of the excitation periods and of the pipelined
// selections.
//
// Clock_HF runs at HF_PER_PERIOD cycles per laser period and is assumed to be
// phase-locked to the laser. The sequencer divides it down and raises `tick`
// in the last Clock_HF cycle of every period; at that edge the pixels that saw
// a photon in the period join a new selection. A selection takes PRIO_BITS
// steps, one per Clock_HF cycle, so when PRIO_BITS > HF_PER_PERIOD it runs
// over several periods. To start a selection in every period anyway, NUM_SETS
// sets of comparison lines are used in rotation: the selection of the period
// ending at a tick uses set `cur_set`, and set s is busy during the PRIO_BITS
// cycles that follow its start (`step_en[s]`, with `first[s]` on the first
// step and `last[s]` on the final one).
//
// `ref_count` mirrors the priority counter of the first pixel, which starts
// counting on the first tick with `en_ext` high. Its value for the period of
// the selection running on set s is kept and, at the final step, copied to
// `stamp[s]`, where it stays while that selection's result is decoded even
// though the set may already have started its next selection.
//
// Sharing the lines between overlapping selections follows the published circuit's
// pipeline; the round-robin allocation, the phase-locked single clock and the
// sizes (five Clock_HF cycles per period, two sets) are this design's choices.
module selection_sequencer #(
  parameter int unsigned PRIO_BITS     = 10,
  parameter int unsigned HF_PER_PERIOD = 5,
  parameter int unsigned NUM_SETS      = (PRIO_BITS + HF_PER_PERIOD - 1) / HF_PER_PERIOD
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en_ext,
  output logic                        tick,
  output logic [(NUM_SETS > 1 ? $clog2(NUM_SETS) : 1)-1:0] cur_set,
  output logic [NUM_SETS-1:0]         step_en,
  output logic [NUM_SETS-1:0]         first,
  output logic [NUM_SETS-1:0]         last,
  output logic [PRIO_BITS-1:0]        ref_count,
  output logic [PRIO_BITS-1:0]        stamp [NUM_SETS]
);

  localparam int unsigned PW = $clog2(HF_PER_PERIOD + 1);
  localparam int unsigned SW = $clog2(PRIO_BITS + 1);
  localparam int unsigned CSW = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1;

  logic [PW-1:0] phase;
  logic [SW-1:0] step_cnt [NUM_SETS];
  logic [PRIO_BITS-1:0] stamp_run [NUM_SETS];

  assign tick = (phase == PW'(HF_PER_PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      cur_set   <= '0;
      ref_count <= '0;
    end else begin
      phase <= tick ? '0 : phase + 1'b1;
      if (tick) begin
        cur_set <= (cur_set == CSW'(NUM_SETS - 1)) ? '0 : cur_set + 1'b1;
        if (en_ext) ref_count <= ref_count + 1'b1;
      end
    end
  end

  for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        step_en[s]  <= 1'b0;
        step_cnt[s] <= '0;
        stamp_run[s] <= '0;
        stamp[s]    <= '0;
      end else begin
        if (last[s]) stamp[s] <= stamp_run[s];
        if (tick && cur_set == CSW'(s)) begin
          step_en[s]   <= 1'b1;
          step_cnt[s]  <= '0;
          stamp_run[s] <= ref_count;
        end else if (step_en[s]) begin
          step_cnt[s] <= step_cnt[s] + 1'b1;
          if (last[s]) step_en[s] <= 1'b0;
        end
      end
    end
    assign first[s] = step_en[s] && step_cnt[s] == '0;
    assign last[s]  = step_en[s] && step_cnt[s] == SW'(PRIO_BITS - 1);
  end

  // A set must be free again when its turn comes round.
  initial assert (NUM_SETS * HF_PER_PERIOD >= PRIO_BITS)
    else $error("selection_sequencer: NUM_SETS too small for PRIO_BITS steps");

endmodule
