`timescale 1ns/1ps
// tb_delay_line_ctrl: the delay-line control with its ring oscillator, at
// two and four cycles. A photon edge must reappear at `out` after exactly
// DELAY_CYCLES ring periods (28 ns / 56 ns), as a pulse half a ring
// period wide; `busy` must cover photon to end of pulse; a second photon while busy
// must not produce a second pulse; after the line frees itself a new photon
// is delayed again with the same delay.
module tb_delay_line_ctrl;
  localparam real PERIOD = 2.0 * 9 * 28.0 / 36.0;   // 14 ns ring period

  logic rst = 1'b0;
  logic [1:0] photon = '0, osc, ring_en, out, busy;
  int checks = 0, failures = 0;
  realtime t_rise [2][$], t_fall [2][$];

  ring_oscillator u_r0 (.en(ring_en[0]), .osc(osc[0]));
  delay_line_ctrl #(.DELAY_CYCLES(2)) u_d0 (.rst, .photon(photon[0]), .osc(osc[0]),
    .ring_en(ring_en[0]), .out(out[0]), .busy(busy[0]));
  ring_oscillator u_r1 (.en(ring_en[1]), .osc(osc[1]));
  delay_line_ctrl #(.DELAY_CYCLES(4)) u_d1 (.rst, .photon(photon[1]), .osc(osc[1]),
    .ring_en(ring_en[1]), .out(out[1]), .busy(busy[1]));

  for (genvar i = 0; i < 2; i++) begin : g_mon
    always @(posedge out[i]) t_rise[i].push_back($realtime);
    always @(negedge out[i]) t_fall[i].push_back($realtime);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 0.05) && (b - a < 0.05);
  endfunction

  task automatic shot(input int i, input real extra_at, input bit extra);
    realtime t0;
    int n0;
    real d;
    d = (i == 0 ? 2 : 4) * PERIOD;
    n0 = t_rise[i].size();
    t0 = $realtime;
    photon[i] = 1'b1; #1 photon[i] = 1'b0;
    if (extra) begin
      #(extra_at - 1);
      check(busy[i], "busy while delaying");
      photon[i] = 1'b1; #1 photon[i] = 1'b0;   // ignored
    end
    #(d + 2 * PERIOD);
    check(!busy[i], $sformatf("line %0d free again", i));
    check(t_rise[i].size() == n0 + 1, $sformatf("line %0d: one pulse per accepted photon (%0d)", i,
          t_rise[i].size() - n0));
    if (t_rise[i].size() == n0 + 1) begin
      check(near(t_rise[i][n0] - t0, d), $sformatf("line %0d delay %f exp %f", i, t_rise[i][n0] - t0, d));
      check(near(t_fall[i][n0] - t_rise[i][n0], PERIOD / 2), $sformatf("line %0d width %f", i,
            t_fall[i][n0] - t_rise[i][n0]));
    end
  endtask

  initial begin
    #1 rst = 1'b1; #2 rst = 1'b0;
    #10;
    check(!busy[0] && !busy[1] && !out[0] && !out[1], "idle after reset");
    for (int r = 0; r < 6; r++) begin
      #(3.3 + r);
      shot(0, 5.0 + 3 * r, r[0]);
      #(1.7 * r);
      shot(1, 20.0 + 4 * r, r[0]);
    end
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
