`timescale 1ns/1ps
// tb_pixel_cell: one pixel cell at 400 MHz Clock_HF (five cycles per 12.5 ns
// laser period, two sets of lines), timed by a selection_sequencer. The line
// levels seen by the pixel are its own current sources plus a number of
// virtual competitors set by the testbench:
//  * alone, a photon must leave on F-TAC 5 exactly DELAY_CYCLES ring periods
//    (4 x 14 ns) after the photon, and on no other channel;
//  * the bits the pixel puts on the lines during the ten steps must be its
//    period count, bit-reversed (MSB of the priority first);
//  * with five always-winning competitors the photon must be dropped unless
//    all of its priority bits are 1;
//  * a second photon while the delay line is busy must be ignored;
//  * selections must land on both sets of lines.
module tb_pixel_cell;
  import router_pkg::*;
  localparam real RING = 2.0 * 9 * 28.0 / 36.0;
  localparam real DELAY = 4 * RING;

  logic clk = 1'b0, rst_n = 1'b1, photon = 1'b0;
  logic tick; logic [0:0] cur_set; logic [1:0] step_en, first, last;
  logic [9:0] ref_count; logic [9:0] stamp [2];
  logic en_out;
  level_t  level [2][NUM_CH];
  chmask_t req [2], chan_out;
  int extra = 0;
  int checks = 0, failures = 0, sets_used [2];
  realtime t_out [$]; chmask_t ch_out [$];

  always #1.25 clk = ~clk;

  selection_sequencer u_seq (.clk, .rst_n, .en_ext(1'b1), .tick, .cur_set, .step_en, .first, .last,
    .ref_count, .stamp);
  pixel_cell dut (.clk, .rst_n, .tick, .cur_set, .step_en, .last, .en_in(1'b1), .en_out,
    .photon, .level, .req, .chan_out);

  always_comb
    for (int s = 0; s < 2; s++)
      for (int k = 0; k < NUM_CH; k++) begin
        automatic int n = int'(req[s][k]) + (step_en[s] ? extra : 0);
        level[s][k] = level_t'(n > NUM_CH ? NUM_CH : n);
      end

  always @(posedge (chan_out != '0)) begin t_out.push_back($realtime); ch_out.push_back(chan_out); end

  // record the bits the pixel drives during its selection
  logic [9:0] seen_bits; int nbits; int this_set;
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++)
      if (dut.state == dut.SELECT && step_en[s] && dut.set_id == 1'(s)) begin
        seen_bits = {seen_bits[8:0], req[s] != '0};
        nbits++;
        this_set = s;
      end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [9:0] rev(input logic [9:0] v);
    logic [9:0] r;
    for (int i = 0; i < 10; i++) r[9-i] = v[i];
    return r;
  endfunction

  // one photon at a random point of a period; returns after the delay line is free
  task automatic shot(input int competitors, input bit second);
    realtime t0; int n0; logic [9:0] cnt;
    extra = competitors;
    @(posedge clk); #(0.3 + ($urandom % 9) * 1.1);
    n0 = t_out.size(); nbits = 0; seen_bits = '0;
    t0 = $realtime;
    photon = 1'b1; #0.5 photon = 1'b0;
    // the count the pixel holds in this period (photon near the period end joins the next one)
    fork
      begin
        wait (dut.state == dut.SELECT);
        cnt = dut.u_prio.count - 1'b1;
      end
    join
    if (second) begin #20; photon = 1'b1; #0.5 photon = 1'b0; end
    wait (dut.state == dut.IDLE);
    #30;
    check(nbits == 10, $sformatf("ten comparison steps (%0d)", nbits));
    sets_used[this_set]++;
    if (competitors == 0) begin
      check(seen_bits == rev(cnt), $sformatf("priority bits %b exp %b", seen_bits, rev(cnt)));
      check(t_out.size() == n0 + 1, "one output pulse");
      if (t_out.size() == n0 + 1) begin
        check(ch_out[n0] == 5'b10000, $sformatf("routed to F-TAC 5 (%b)", ch_out[n0]));
        check(t_out[n0] - t0 > DELAY - 0.05 && t_out[n0] - t0 < DELAY + 0.05,
              $sformatf("delay %f exp %f", t_out[n0] - t0, DELAY));
      end
    end else begin
      check(t_out.size() == n0 + (seen_bits == 10'h3FF ? 1 : 0),
            $sformatf("with five winners the photon is dropped (bits %b)", seen_bits));
    end
  endtask

  initial begin
    sets_used = '{0, 0};
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    for (int i = 0; i < 12; i++) shot(0, i % 3 == 1);
    for (int i = 0; i < 6; i++) shot(5, 1'b0);
    check(sets_used[0] > 0 && sets_used[1] > 0, $sformatf("both line sets used (%0d/%0d)",
          sets_used[0], sets_used[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
