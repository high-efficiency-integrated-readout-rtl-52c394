`timescale 1ns/1ps
// tb_prototype: the seven-pixel routing prototype. Seven pixels share five
// channels, priorities are 10 bits wide and the laser runs at 20 MHz
// (50 ns periods). The prototype has no pipeline: the ten selection steps
// fit in one period with a 200 MHz step clock (HF_PER_PERIOD = 10, one set
// of lines). Each delay line holds its photon for nine ring periods
// (126 ns), long enough for the selection of the following period to finish.
// Pixels are triggered at random times, as a test routine would, and the
// addresses read back from the lines are compared with the pixels that
// should have won. An independent model ranks the fired pixels by priority
// (the first pixel's count minus the pixel's place along the start-up chain,
// bit-reversed). Checked: the winner of every channel, each winner's pulse
// on its channel line 126 ns after its photon and no other pulse, and
// photons on busy pixels ignored. Mechanisms counted (each must occur):
// periods with no photon, with fewer photons than channels, with exactly
// five and with more than five; group splits; a photon
// on a busy pixel; the 10-bit counter wrapping.
module tb_prototype;
  import router_pkg::*;
  localparam int unsigned NP = 7;
  localparam int unsigned B = 10;
  localparam real RING = 2.0 * 9 * 28.0 / 36.0;
  localparam real DELAY = 9 * RING;
  localparam int unsigned PERIODS = 1100;

  logic clk = 1'b0, rst_n = 1'b1, en_ext = 1'b0;
  logic [NP-1:0] photon = '0;
  chmask_t ftac_start;
  logic ready, tick, sel_valid;
  logic [B-1:0] ref_count;
  level_t line_level [1][NUM_CH];
  logic [B-1:0] sel_addr [NUM_CH], sel_prio [NUM_CH];

  always #2.5 clk = ~clk;

  spad_router_top #(.NUM_PIXELS(NP), .HF_PER_PERIOD(10), .DELAY_CYCLES(9)) dut (.clk_hf(clk), .rst_n, .en_ext, .photon, .ftac_start, .ready, .tick,
    .ref_count, .line_level, .sel_valid, .sel_addr, .sel_prio);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [B-1:0] rev(input logic [B-1:0] v);
    logic [B-1:0] r;
    for (int i = 0; i < B; i++) r[B-1-i] = v[i];
    return r;
  endfunction

  // ---- record of each period's accepted photons ---------------------------
  typedef struct {
    int          n;
    int          pix [16];
    realtime     t   [16];
    logic [B-1:0] cnt;
  } period_t;
  period_t cur, q [$];
  realtime last_fire [NP];
  int m_none = 0, m_few = 0, m_five = 0, m_over = 0, m_split = 0, m_sat = 0;
  int m_set [2] = '{0, 0};
  int m_busy = 0, m_wrap = 0, n_results = 0, n_pulses = 0;
  bit started = 0;
  logic [B-1:0] prev_ref = '0;

  // expected pulses per channel
  realtime exp_t [NUM_CH][$];

  // a period ends at each clock edge with tick high
  always @(posedge clk) if (started && tick) begin
    period_t p;
    p = cur;
    p.cnt = ref_count;
    q.push_back(p);
    if (p.n == 0) m_none++;
    else if (p.n < NUM_CH) m_few++;
    else if (p.n == NUM_CH) m_five++;
    else m_over++;
    if (p.n > 0) m_set[dut.cur_set]++;
    if (ref_count < prev_ref) m_wrap++;
    prev_ref = ref_count;
    cur.n = 0;
  end

  always @(posedge clk) if (started)
    for (int s = 0; s < 1; s++)
      for (int k = 0; k < NUM_CH; k++) begin
        if (line_level[s][k] == level_t'(NUM_CH)) m_sat++;
        else if (line_level[s][k] != 0 && k != 0) m_split++;
      end

  // results: compare with the model
  always @(posedge clk) if (sel_valid && started) begin
    period_t p;
    int order [16];
    n_results++;
    check(q.size() > 0, "result without a period");
    if (q.size() > 0) begin
      p = q.pop_front();
      for (int i = 0; i < p.n; i++) order[i] = i;
      for (int i = 0; i < p.n; i++)
        for (int j = i + 1; j < p.n; j++)
          if (rev(B'(int'(p.cnt) - p.pix[order[j]])) > rev(B'(int'(p.cnt) - p.pix[order[i]]))) begin
            int x; x = order[i]; order[i] = order[j]; order[j] = x;
          end
      for (int r = 0; r < p.n && r < NUM_CH; r++) begin
        int k;
        k = NUM_CH - 1 - r;
        check(int'(sel_addr[k]) == p.pix[order[r]],
              $sformatf("channel %0d address %0d exp %0d (n=%0d)", k, sel_addr[k], p.pix[order[r]], p.n));
        exp_t[k].push_back(p.t[order[r]] + DELAY);
      end
    end
  end

  // channel pulses: each must match an expected one
  for (genvar k = 0; k < NUM_CH; k++) begin : g_mon
    always @(posedge ftac_start[k]) if (started) begin
      n_pulses++;
      if (exp_t[k].size() > 0 && $realtime - exp_t[k][0] < 0.1 && exp_t[k][0] - $realtime < 0.1) begin
        void'(exp_t[k].pop_front());
        check(1'b1, "pulse");
      end else begin
        check(1'b0, $sformatf("unexpected pulse on channel %0d", k));
      end
    end
  end

  // ---- stimulus ----------------------------------------------------------
  task automatic fire(input int i, input realtime when);
    photon[i] = 1'b1;
    #0.5 photon[i] = 1'b0;
  endtask

  initial begin
    cur.n = 0;
    for (int i = 0; i < NP; i++) last_fire[i] = -1000.0;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    started = 1;
    repeat (7) @(posedge clk);
    en_ext = 1'b1;
    wait (ready);
    // start recording at a period boundary
    for (int per = 0; per < PERIODS; per++) begin
      int want, got, busy_i;
      realtime base;
      // a new period starts just after this edge
      @(posedge clk); while (!tick) @(posedge clk);
      #0.2;                                        // clear of the period-end bookkeeping
      base = $realtime;
      // burst pattern: quiet, sparse, busy
      case ((per / 16) % 4)
        0: want = 0;
        1: want = $urandom % 4;
        2: want = 4 + ($urandom % 4);
        default: want = $urandom % 12;
      endcase
      if (per % 16 >= 12) want = 0;               // let the delay lines drain
      got = 0;
      busy_i = -1;
      for (int tries = 0; tries < 4 * NP && got < want && got < 16; tries++) begin
        int i;
        bit dup;
        i = $urandom % NP;
        dup = 0;
        for (int j = 0; j < cur.n; j++) if (cur.pix[j] == i) dup = 1;
        if (dup) continue;
        if ($realtime - last_fire[i] < 150.0) begin busy_i = i; continue; end
        cur.pix[cur.n] = i;
        cur.n++;
        got++;
      end
      fork
        begin
          for (int j = 0; j < cur.n; j++) begin
            automatic int jj = j;
            automatic realtime off = 0.4 + ($urandom % 40) * 0.1;
            cur.t[jj] = base + off;
            last_fire[cur.pix[jj]] = base + off;
            fork
              begin
                #(off);
                photon[cur.pix[jj]] = 1'b1;
                #0.5 photon[cur.pix[jj]] = 1'b0;
              end
            join_none
          end
          // a photon on a pixel whose delay line is busy: must be ignored
          if (busy_i >= 0 && $realtime - last_fire[busy_i] > 15.0 && $realtime - last_fire[busy_i] < 110.0) begin
            m_busy++;
            fork
              begin
                #2.0;
                photon[busy_i] = 1'b1;
                #0.5 photon[busy_i] = 1'b0;
              end
            join_none
          end
        end
      join
    end
    // drain
    repeat (80) @(posedge clk);
    for (int k = 0; k < NUM_CH; k++)
      check(exp_t[k].size() == 0, $sformatf("channel %0d: %0d expected pulses missing", k, exp_t[k].size()));
    check(q.size() <= 3, $sformatf("%0d periods without a result", q.size()));
    $display("results %0d pulses %0d | periods: none %0d few %0d five %0d over %0d | split %0d sat %0d | sets %0d/%0d | busy %0d | wrap %0d",
             n_results, n_pulses, m_none, m_few, m_five, m_over, m_split, m_sat, m_set[0], m_set[1], m_busy, m_wrap);
    check(m_none > 0, "a period without photons");
    check(m_few > 0, "a period with fewer photons than channels");
    check(m_five > 0, "a period with exactly five photons");
    check(m_over > 0, "a period with photons dropped");
    check(m_split > 0, "a group split on the lines");
    // no line can saturate here: the seven pixels have consecutive counts,
    // so at most four of them share any bit of their priority words
    check(m_sat == 0, "no saturated line with seven pixels");
    check(m_busy > 0, "a photon on a busy pixel");
    check(m_wrap > 0, "priority counter wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
