`timescale 1ns/1ps
// tb_ring_oscillator: the nine-stage gated ring must rest high while
// disabled, give its first rising edge one period (2 x 9 stage delays,
// 14 ns with the prototype's stage delay) after the enable, keep that period,
// and stop when the enable drops.
module tb_ring_oscillator;
  logic en = 1'b0, osc;
  int checks = 0, failures = 0;
  realtime t_en, t_edge [4];
  int n_edges = 0;
  localparam real PERIOD = 2.0 * 9 * 28.0 / 36.0;   // 14 ns

  ring_oscillator dut (.en, .osc);

  always @(posedge osc) if (en && n_edges < 4) begin
    t_edge[n_edges] = $realtime;
    n_edges++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input real a, input real b);
    return (a - b < 0.05) && (b - a < 0.05);
  endfunction

  initial begin
    #50;
    check(osc == 1'b1, "rests high while disabled");
    t_en = $realtime;
    en = 1'b1;
    #(4.5 * PERIOD);
    check(n_edges == 4, $sformatf("%0d rising edges in 4.5 periods", n_edges));
    check(near(t_edge[0] - t_en, PERIOD), $sformatf("first edge after %f ns", t_edge[0] - t_en));
    for (int i = 1; i < 4; i++)
      check(near(t_edge[i] - t_edge[i-1], PERIOD), $sformatf("period %f ns", t_edge[i] - t_edge[i-1]));
    en = 1'b0;
    #(2 * PERIOD);
    check(osc == 1'b1, "stopped and back at rest");
    #(3 * PERIOD);
    check(osc == 1'b1 && n_edges == 4, "no oscillation while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
