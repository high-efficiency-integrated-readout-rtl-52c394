`timescale 1ns/1ps
// tb_fairness: equal readout probability under contention. All pixels of a
// 16-pixel array fire in the same period, at random intervals of 8..15
// periods, 300 times; only five can win each time. Because the priorities
// rotate every period, every pixel must win close to 5/16 of the bursts.
// Checks per burst: five distinct addresses and five channel pulses. At the
// end, every pixel's win count must lie within 40 % of the mean.
module tb_fairness;
  import router_pkg::*;
  localparam int unsigned NP = 16;
  localparam int unsigned BURSTS = 300;

  logic clk = 1'b0, rst_n = 1'b1, en_ext = 1'b0;
  logic [NP-1:0] photon = '0;
  chmask_t ftac_start;
  logic ready, tick, sel_valid;
  logic [9:0] ref_count;
  level_t line_level [2][NUM_CH];
  logic [9:0] sel_addr [NUM_CH], sel_prio [NUM_CH];
  int checks = 0, failures = 0;
  int wins [NP];
  int pulses = 0;

  always #1.25 clk = ~clk;

  spad_router_top #(.NUM_PIXELS(NP)) dut (.clk_hf(clk), .rst_n, .en_ext, .photon, .ftac_start,
    .ready, .tick, .ref_count, .line_level, .sel_valid, .sel_addr, .sel_prio);

  for (genvar k = 0; k < NUM_CH; k++) begin : g_mon
    always @(posedge ftac_start[k]) if (ready) pulses++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int mean, lo, hi;
    for (int i = 0; i < NP; i++) wins[i] = 0;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    en_ext = 1'b1;
    wait (ready);
    repeat (20) @(posedge clk);
    for (int b = 0; b < BURSTS; b++) begin
      int p0;
      bit [NP-1:0] seen;
      bit got;
      // start of a period
      @(posedge clk); while (!tick) @(posedge clk);
      #1.0;
      p0 = pulses;
      photon = '1;
      #0.5 photon = '0;
      // the burst's result is the first selection with five distinct
      // in-range addresses within the next three periods
      seen = '0;
      got = 1'b0;
      for (int c = 0; c < 30 && !got; c++) begin
        @(posedge clk);
        if (sel_valid) begin
          bit [NP-1:0] s;
          bit ok;
          s = '0; ok = 1'b1;
          for (int k = 0; k < NUM_CH; k++) begin
            if (int'(sel_addr[k]) >= NP || s[sel_addr[k][3:0]]) ok = 1'b0;
            else s[sel_addr[k][3:0]] = 1'b1;
          end
          if (ok) begin got = 1'b1; seen = s; end
        end
      end
      check(got, $sformatf("burst %0d: five distinct winners reported", b));
      for (int i = 0; i < NP; i++) if (seen[i]) wins[i]++;
      #60;
      check(pulses - p0 == NUM_CH, $sformatf("burst %0d: %0d channel pulses", b, pulses - p0));
      repeat (5 * ($urandom % 8)) @(posedge clk);   // 8..15 periods between bursts in all
    end
    mean = BURSTS * NUM_CH / NP;
    lo = mean * 6 / 10; hi = mean * 14 / 10;
    for (int i = 0; i < NP; i++) begin
      $display("pixel %2d won %0d of %0d bursts", i, wins[i], BURSTS);
      check(wins[i] >= lo && wins[i] <= hi, $sformatf("pixel %0d wins %0d outside %0d..%0d", i, wins[i], lo, hi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
