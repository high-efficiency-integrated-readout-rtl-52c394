`timescale 1ns/1ps
// tb_line_decoder: the decoder sees only the line levels of a selection and
// must name, per channel, the priority of the pixel that won it: the highest
// priority on F-TAC 5, the next on F-TAC 4, and so on. Line levels are
// produced by a behavioural model of the pixels written in this testbench;
// the expected words come from sorting the priorities. Runs the six-pixel
// published six-pixel example with 5-bit words, then random 10-bit
// selections with 1..12 pixels, back to back so that `first` must clear the
// previous groups. Counts selections that split a group and selections with
// more pixels than channels.
module tb_line_decoder;
  import router_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, n_split = 0, n_over = 0;
  always #1 clk = ~clk;

  logic step5, first5, last5, valid5;   level_t lv5 [NUM_CH];  logic [4:0] pr5 [NUM_CH];
  logic step10, first10, last10, valid10; level_t lv10 [NUM_CH]; logic [9:0] pr10 [NUM_CH];

  line_decoder #(.PRIO_BITS(5)) dut5 (.clk, .rst_n, .step(step5), .first(first5), .last(last5),
    .level(lv5), .prio(pr5), .valid(valid5));
  line_decoder #(.PRIO_BITS(10)) dut10 (.clk, .rst_n, .step(step10), .first(first10), .last(last10),
    .level(lv10), .prio(pr10), .valid(valid10));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Behavioural pixels: compute the levels of step b and advance the states.
  function automatic void pixels_step(input int n, input logic [9:0] pr [16], input int nbits,
                                      input int b, inout chmask_t st [16], output level_t lv [NUM_CH]);
    int cnt [NUM_CH];
    for (int k = 0; k < NUM_CH; k++) cnt[k] = 0;
    for (int i = 0; i < n; i++)
      if (pr[i][nbits-1-b])
        for (int k = 0; k < NUM_CH; k++) if (st[i][k]) cnt[k]++;
    for (int k = 0; k < NUM_CH; k++) lv[k] = level_t'(cnt[k] > NUM_CH ? NUM_CH : cnt[k]);
    for (int i = 0; i < n; i++) begin
      int lead; chmask_t t;
      if (st[i] == '0) continue;
      lead = 0;
      for (int k = 0; k < NUM_CH; k++) if (st[i][k]) lead = k;
      t = '0;
      for (int j = 0; j < int'(lv[lead]); j++) t[lead - j] = 1'b1;   // aligned code
      st[i] = pr[i][nbits-1-b] ? (st[i] & t) : (st[i] & ~t);
    end
  endfunction

  task automatic selection(input int n, input logic [9:0] pr [16], input int nbits);
    chmask_t st [16];
    level_t lv [NUM_CH];
    logic [9:0] srt [16];
    bit split;
    split = 0;
    for (int i = 0; i < 16; i++) st[i] = '1;
    for (int b = 0; b < nbits; b++) begin
      pixels_step(n, pr, nbits, b, st, lv);
      for (int k = 1; k < NUM_CH; k++) if (lv[k] != 0 && lv[k] < NUM_CH) split = 1;
      if (nbits == 5) begin lv5 = lv; step5 = 1; first5 = (b == 0); last5 = (b == nbits - 1); end
      else            begin lv10 = lv; step10 = 1; first10 = (b == 0); last10 = (b == nbits - 1); end
      @(negedge clk);
    end
    step5 = 0; first5 = 0; last5 = 0; step10 = 0; first10 = 0; last10 = 0;
    check(nbits == 5 ? valid5 : valid10, "valid after the last step");
    // expected: priorities sorted in descending order
    for (int i = 0; i < n; i++) srt[i] = pr[i];
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        if (srt[j] > srt[i]) begin logic [9:0] x; x = srt[i]; srt[i] = srt[j]; srt[j] = x; end
    for (int r = 0; r < n && r < NUM_CH; r++) begin
      logic [9:0] got;
      got = (nbits == 5) ? 10'(pr5[NUM_CH-1-r]) : pr10[NUM_CH-1-r];
      check(got == srt[r], $sformatf("n=%0d rank %0d: decoded %b exp %b", n, r, got, srt[r]));
    end
    if (split) n_split++;
    if (n > NUM_CH) n_over++;
  endtask

  logic [9:0] pr [16];

  initial begin
    step5 = 0; first5 = 0; last5 = 0; step10 = 0; first10 = 0; last10 = 0;
    for (int k = 0; k < NUM_CH; k++) begin lv5[k] = '0; lv10[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    pr = '{default: 10'd0};
    pr[0] = 10'b11100; pr[1] = 10'b11010; pr[2] = 10'b11000;
    pr[3] = 10'b10000; pr[4] = 10'b00100; pr[5] = 10'b00000;
    selection(6, pr, 5);
    for (int t = 0; t < 400; t++) begin
      int n;
      n = 1 + ($urandom % 12);
      for (int i = 0; i < 16; i++) begin
        bit dup;
        do begin
          pr[i] = 10'($urandom);
          dup = 0;
          for (int j = 0; j < i; j++) if (pr[j] == pr[i]) dup = 1;
        end while (dup);
      end
      selection(n, pr, 10);
    end
    check(n_split > 50, $sformatf("group splits in %0d selections", n_split));
    check(n_over > 50, $sformatf("overflow in %0d selections", n_over));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
