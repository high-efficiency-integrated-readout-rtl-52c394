`timescale 1ns/1ps
// tb_selection_sequencer: checks the sequencer cycle by cycle against an
// independent model at the default sizes (10 steps, 5 Clock_HF cycles per
// period, hence two sets of lines) and with 10 cycles per period (one set):
// one tick every HF_PER_PERIOD cycles, round-robin line sets, a 10-cycle
// step window per selection with first/last marks, the reference count
// advancing once per period after EN_ext, and the stamp of each finished
// selection. It also counts that the two sets really overlap in time.
module tb_selection_sequencer;
  logic clk = 1'b0, rst_n = 1'b0, en_ext = 1'b0;
  int checks = 0, failures = 0;
  int overlap = 0;

  always #1 clk = ~clk;

  // default configuration
  logic tick_a; logic [0:0] set_a; logic [1:0] st_a, fi_a, la_a;
  logic [9:0] ref_a; logic [9:0] stamp_a [2];
  selection_sequencer dut_a (.clk, .rst_n, .en_ext, .tick(tick_a), .cur_set(set_a),
    .step_en(st_a), .first(fi_a), .last(la_a), .ref_count(ref_a), .stamp(stamp_a));

  // single-set configuration (800 MHz equivalent)
  logic tick_b; logic [0:0] set_b; logic [0:0] st_b, fi_b, la_b;
  logic [9:0] ref_b; logic [9:0] stamp_b [1];
  selection_sequencer #(.HF_PER_PERIOD(10)) dut_b (.clk, .rst_n, .en_ext, .tick(tick_b),
    .cur_set(set_b), .step_en(st_b), .first(fi_b), .last(la_b), .ref_count(ref_b), .stamp(stamp_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // model of configuration A
  int cyc, m_phase, m_set, m_ref, m_cnt [2], m_stamp_run [2], m_stamp [2];
  bit m_act [2];
  // model of configuration B
  int b_phase, b_ref, b_cnt, b_run, b_stamp;
  bit b_act;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    m_phase = 0; m_set = 0; m_ref = 0; m_act = '{0, 0}; m_cnt = '{0, 0};
    m_stamp = '{0, 0}; m_stamp_run = '{0, 0};
    b_phase = 0; b_ref = 0; b_act = 0; b_cnt = 0; b_run = 0; b_stamp = 0;
    for (cyc = 0; cyc < 400; cyc++) begin
      if (cyc == 23) en_ext = 1'b1;
      // compare outputs in this cycle
      check(tick_a == (m_phase == 4), "A tick");
      check(set_a == 1'(m_set), "A cur_set");
      check(ref_a == 10'(m_ref), "A ref_count");
      for (int s = 0; s < 2; s++) begin
        check(st_a[s] == m_act[s], $sformatf("A step_en[%0d]", s));
        check(fi_a[s] == (m_act[s] && m_cnt[s] == 0), $sformatf("A first[%0d]", s));
        check(la_a[s] == (m_act[s] && m_cnt[s] == 9), $sformatf("A last[%0d]", s));
        check(stamp_a[s] == 10'(m_stamp[s]), $sformatf("A stamp[%0d]", s));
      end
      if (st_a == 2'b11) overlap++;
      check(tick_b == (b_phase == 9), "B tick");
      check(st_b[0] == b_act && la_b[0] == (b_act && b_cnt == 9) && fi_b[0] == (b_act && b_cnt == 0), "B window");
      check(stamp_b[0] == 10'(b_stamp) && ref_b == 10'(b_ref), "B stamp/ref");
      // advance the models (state at the coming edge)
      for (int s = 0; s < 2; s++) begin
        if (m_act[s] && m_cnt[s] == 9) begin m_stamp[s] = m_stamp_run[s]; m_act[s] = 0; end
        else if (m_act[s]) m_cnt[s]++;
      end
      if (m_phase == 4) begin
        m_act[m_set] = 1; m_cnt[m_set] = 0; m_stamp_run[m_set] = m_ref;
        m_set = 1 - m_set;
        if (en_ext) m_ref++;
      end
      m_phase = (m_phase == 4) ? 0 : m_phase + 1;
      if (b_act && b_cnt == 9) begin b_stamp = b_run; b_act = 0; end
      else if (b_act) b_cnt++;
      if (b_phase == 9) begin b_act = 1; b_cnt = 0; b_run = b_ref; if (en_ext) b_ref++; end
      b_phase = (b_phase == 9) ? 0 : b_phase + 1;
      @(negedge clk);
    end
    check(overlap > 100, $sformatf("two selections overlapped in %0d cycles", overlap));
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
