`timescale 1ns/1ps
// tb_comparison_lines: random current-source patterns on 40 pixels and two
// sets of lines. Each line's level must equal the number of requesting
// pixels, clipped at five (the number of comparator thresholds). Sparse and
// dense patterns are mixed so that every level 0..5 and the clipping occur.
module tb_comparison_lines;
  import router_pkg::*;
  localparam int unsigned NP = 40, NS = 2;

  chmask_t req [NP][NS];
  level_t  level [NS][NUM_CH];
  int checks = 0, failures = 0;
  int seen [NUM_CH+1];

  comparison_lines #(.NUM_PIXELS(NP), .NUM_SETS(NS)) dut (.req, .level);

  initial begin
    for (int l = 0; l <= NUM_CH; l++) seen[l] = 0;
    for (int t = 0; t < 2000; t++) begin
      int density;
      density = 1 + ($urandom % 40);   // percent of sources switched on
      for (int p = 0; p < NP; p++)
        for (int s = 0; s < NS; s++)
          for (int k = 0; k < NUM_CH; k++)
            req[p][s][k] = (($urandom % 100) < density);
      #1;
      for (int s = 0; s < NS; s++)
        for (int k = 0; k < NUM_CH; k++) begin
          int n;
          n = 0;
          for (int p = 0; p < NP; p++) n += req[p][s][k];
          if (n > NUM_CH) n = NUM_CH;
          seen[n]++;
          checks++;
          if (int'(level[s][k]) != n) begin
            failures++;
            $display("FAIL: trial %0d set %0d line %0d level %0d exp %0d", t, s, k, level[s][k], n);
          end
        end
    end
    for (int l = 0; l <= NUM_CH; l++) begin
      checks++;
      if (seen[l] == 0) begin failures++; $display("FAIL: level %0d never produced", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
