`timescale 1ns/1ps
// tb_priority_generator: three chained priority generators, as the first
// three pixels of an array. Checks the start-up sequence of the counters
// (pixel n starts one period after pixel n-1, so the counts of periods 1..6
// are 1..6, 0..5 and 0..4), the hand-over of the enable, and that a captured
// count comes out of the shift register bit-reversed, MSB first, one bit per
// shift.
module tb_priority_generator;
  localparam int unsigned B = 10;
  localparam int unsigned HF = 5;

  logic clk = 1'b0, rst_n = 1'b0, tick, en_ext = 1'b0;
  logic [3:0] en;
  logic [2:0] capture, shift, bits;
  logic [B-1:0] count [3];
  int checks = 0, failures = 0;
  int phase = 0;

  always #1 clk = ~clk;
  assign tick = (phase == HF - 1);
  always_ff @(posedge clk) phase <= (phase == HF - 1) ? 0 : phase + 1;

  assign en[0] = en_ext;
  for (genvar i = 0; i < 3; i++) begin : g
    priority_generator #(.PRIO_BITS(B)) dut (
      .clk, .rst_n, .tick, .en_in(en[i]), .en_out(en[i+1]),
      .capture(capture[i]), .shift(shift[i]), .prio_bit(bits[i]), .count(count[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask


  initial begin
    capture = '0; shift = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // align: raise EN_ext during some period
    @(negedge clk); while (!tick) @(negedge clk);
    @(negedge clk); en_ext = 1'b1;
    for (int p = 1; p <= 6; p++) begin
      // wait for the end of the period
      @(negedge clk); while (!tick) @(negedge clk);
      @(posedge clk); #0.1;
      for (int i = 0; i < 3; i++) begin
        automatic int exp = (p - i > 0) ? p - i : 0;
        check(count[i] == B'(exp), $sformatf("period %0d pixel %0d count %0d exp %0d", p, i+1, count[i], exp));
      end
      check(en[1] && (en[2] == (p >= 2)) && (en[3] == (p >= 3)), $sformatf("enable chain period %0d", p));
    end
    // capture pixel 1 (count 6) and pixel 3 (count 4) at the end of this period,
    // then shift ten times
    @(negedge clk); while (!tick) @(negedge clk);
    capture = 3'b101;
    @(negedge clk); capture = '0;
    for (int b = 0; b < B; b++) begin
      // bit b of the count appears at step b (reversed order)
      check(bits[0] == 1'((7 - 1) >> b), $sformatf("pixel1 shifted bit %0d", b));
      check(bits[2] == 1'((7 - 3) >> b), $sformatf("pixel3 shifted bit %0d", b));
      shift = 3'b101;
      @(negedge clk);
      shift = '0;
    end
    check(bits[0] == 1'b0 && bits[2] == 1'b0, "register empty after all bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
