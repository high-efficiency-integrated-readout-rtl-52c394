`timescale 1ns/1ps
// comparison_lines: the shared multilevel comparison lines, one set of NUM_CH
// lines (L5..L1) per pipeline stage.
//
// On silicon each line is a pull-up resistor crossing the whole array; every
// pixel that requests the line switches on a current source, and each source
// lowers the line voltage by one step (about 220 mV with 300 ohm and 730 uA).
// Comparators with thresholds between the steps turn the voltage back into
// the number of active sources, and since only five thresholds exist the
// result saturates at five. This module is the digital equivalent of that
// wired sum: for every set and every line it counts the requesting pixels and
// clips the count at NUM_CH. It is purely combinational, which matches the
// lines settling within one Clock_HF step.
//
// The summing on a resistor, the five levels and the saturation follow the
// published circuit; representing voltages by their resolved counts is this design's
// choice (the analog values themselves are not modelled).
module comparison_lines
  import router_pkg::*;
#(
  parameter int unsigned NUM_PIXELS = 1024,
  parameter int unsigned NUM_SETS   = 2
) (
  input  chmask_t req   [NUM_PIXELS][NUM_SETS],  // per pixel, per set of lines
  output level_t  level [NUM_SETS][NUM_CH]
);

  localparam int unsigned CW = $clog2(NUM_PIXELS + 1);

  for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
    for (genvar k = 0; k < NUM_CH; k++) begin : g_line
      logic [NUM_PIXELS-1:0] sources;   // current generators on this line
      logic [CW-1:0]         n;
      for (genvar p = 0; p < NUM_PIXELS; p++) begin : g_pix
        assign sources[p] = req[p][s][k];
      end
      assign n = CW'($countones(sources));
      assign level[s][k] = (n > CW'(NUM_CH)) ? level_t'(NUM_CH) : level_t'(n);
    end
  end

endmodule
