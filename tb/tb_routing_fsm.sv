`timescale 1ns/1ps
// tb_routing_fsm: a small array of routing FSMs sharing one set of
// comparison lines.
//  1. The published six-pixel example: priorities chosen so
//     that A > B > C > D > E > F; the state registers must follow the
//     published table step by step (11111 -> ... ) and end with A..E on
//     F-TAC 5..1 and F lost.
//  2. Random trials with 1..8 competing pixels and distinct 10-bit
//     priorities: the k-th highest priority must own channel 5-k (k < 5) and
//     all others must end with an empty state register.
module tb_routing_fsm;
  import router_pkg::*;
  localparam int unsigned NP = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0] start, step, bits;
  chmask_t req [NP][1];
  chmask_t state [NP], route [NP];
  level_t  level [1][NUM_CH];
  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  for (genvar i = 0; i < NP; i++) begin : g
    routing_fsm dut (.clk, .rst_n, .start(start[i]), .step(step[i]), .prio_bit(bits[i]),
                     .level(level[0]), .req(req[i][0]), .state(state[i]), .route(route[i]));
  end
  comparison_lines #(.NUM_PIXELS(NP), .NUM_SETS(1)) u_lines (.req, .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Run one selection; prio[i] holds nbits bits, MSB first; act marks competitors.
  task automatic run(input logic [9:0] prio [NP], input int nbits, input logic [NP-1:0] act,
                     input bit table_check);
    chmask_t exp_tab [6][6];
    exp_tab[0] = '{5'b11111, 5'b11110, 5'b11100, 5'b10000, 5'b10000, 5'b10000};
    exp_tab[1] = '{5'b11111, 5'b11110, 5'b11100, 5'b01100, 5'b01000, 5'b01000};
    exp_tab[2] = '{5'b11111, 5'b11110, 5'b11100, 5'b01100, 5'b00100, 5'b00100};
    exp_tab[3] = '{5'b11111, 5'b11110, 5'b00010, 5'b00010, 5'b00010, 5'b00010};
    exp_tab[4] = '{5'b11111, 5'b00001, 5'b00001, 5'b00001, 5'b00001, 5'b00001};
    exp_tab[5] = '{5'b11111, 5'b00001, 5'b00001, 5'b00000, 5'b00000, 5'b00000};
    @(negedge clk);
    start = act; step = '0;
    @(negedge clk);
    start = '0;
    for (int b = 0; b < nbits; b++) begin
      if (table_check)
        for (int i = 0; i < 6; i++)
          check(state[i] == exp_tab[i][b], $sformatf("table: pixel %0d step %0d state %b exp %b",
                i, b + 1, state[i], exp_tab[i][b]));
      for (int i = 0; i < NP; i++) bits[i] = prio[i][nbits-1-b];
      step = act;
      @(negedge clk);
    end
    if (table_check)
      for (int i = 0; i < 6; i++)
        check(state[i] == exp_tab[i][5], $sformatf("table: pixel %0d final state %b", i, state[i]));
    step = '0; bits = '0;
  endtask

  logic [9:0] pr [NP];
  logic [NP-1:0] act;

  initial begin
    start = '0; step = '0; bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // 1. published example
    pr = '{10'b11100, 10'b11010, 10'b11000, 10'b10000, 10'b00100, 10'b00000, 10'd0, 10'd0};
    run(pr, 5, 8'b0011_1111, 1'b1);
    for (int i = 0; i < 5; i++)
      check(route[i] == chmask_t'(1 << (4 - i)), $sformatf("example route pixel %0d = %b", i, route[i]));
    check(route[5] == '0, "example: pixel F lost");
    // 2. random trials
    for (int t = 0; t < 300; t++) begin
      int n, rank;
      n = 1 + ($urandom % NP);
      act = '0;
      for (int i = 0; i < n; i++) act[i] = 1'b1;
      // distinct priorities
      for (int i = 0; i < NP; i++) begin
        bit dup;
        do begin
          pr[i] = 10'($urandom);
          dup = 1'b0;
          for (int j = 0; j < i; j++) if (pr[j] == pr[i]) dup = 1'b1;
        end while (dup);
      end
      run(pr, 10, act, 1'b0);
      for (int i = 0; i < n; i++) begin
        rank = 0;
        for (int j = 0; j < n; j++) if (pr[j] > pr[i]) rank++;
        if (rank < NUM_CH)
          check(route[i] == chmask_t'(1 << (NUM_CH - 1 - rank)),
                $sformatf("trial %0d pixel %0d rank %0d route %b", t, i, rank, route[i]));
        else
          check(state[i] == '0, $sformatf("trial %0d pixel %0d rank %0d should be lost", t, i, rank));
      end
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
