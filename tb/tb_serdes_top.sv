// End-to-end test of the three-wire serial link at its default size (N = 16).
//
// The transmitter's line levels are looped back to the receiver through a
// small channel model: 3 gate delays of flight time, 3/4 of the level in the
// first cycle plus 1/4 smeared into the next (a low-pass tail). Words come
// from a PRBS31 stream (x^31 + x^28 + 1), 16 bits at a time. They are
// offered in four phases: a back-to-back burst, a long idle gap, words with
// random gaps, and short bursts separated by idle gaps.
//
// Checks:
//   - every received word equals the word sent, in order;
//   - no wire pulses twice in a row, and each pulse carries the bit that
//     f_s assigns to it;
//   - at the peak rate, consecutive words arrive exactly 2*(N+1) gate delays
//     apart;
//   - the first pulse after an idle gap leaves a fixed 5 gate delays after
//     the word is accepted, so restarting costs no time;
//   - while idle, every output of the link holds still and no token in
//     either ring changes;
//   - switching activity is proportional to the data: every word costs
//     exactly 4*(N+1) token-rail transitions (each of the N+1 stages of both
//     rings raises one rail and lowers it again), at any rate.
// Each mechanism is counted: peak-rate words, idle stops with restarts,
// each of the six (state, bit) transitions, equalizer de-emphasis (a line
// above bias), ring revolutions through the Init State stage, and throttled
// words. A mechanism that never happens counts as a failure.
module tb_serdes_top;
  import tw_pkg::*;

  localparam int N        = 16;
  localparam int REV      = 2 * (N + 1);
  localparam int LAT_EXP  = 5;
  localparam int CH_D     = 3;
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] tx_word, rx_word;
  logic tx_valid, tx_ready, rx_valid;
  tok_t tx_bus;
  mv_t  tx_line [WIRES], rx_line [WIRES];

  always #1 clk = ~clk;

  serdes_top dut (.*);

  // ---------------- channel model ----------------
  mv_t dly [WIRES][CH_D+1];
  always_ff @(posedge clk) begin
    for (int w = 0; w < WIRES; w++) begin
      dly[w][0] <= rst_n ? tx_line[w] : mv_t'(0);
      for (int k = 1; k <= CH_D; k++) dly[w][k] <= dly[w][k-1];
    end
  end
  always_comb
    for (int w = 0; w < WIRES; w++)
      rx_line[w] = mv_t'((3 * int'(dly[w][CH_D-1]) + int'(dly[w][CH_D])) / 4);

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [N-1:0] sent_q [$];
  int n_sent = 0;
  int m_peak = 0, m_idle = 0, m_ffe = 0, m_wrap = 0, m_throttle = 0;
  int m_trans [6];
  int last_rx_cyc = -1;
  bit peak_phase = 0;
  bit idle_phase = 0;
  int accept_cyc = -1;
  bit want_lat = 0;
  logic [30:0] prbs = 31'h1234_5678;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic logic [N-1:0] next_word();
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) begin
      r[i] = prbs[30] ^ prbs[27];
      prbs = {prbs[29:0], r[i]};
    end
    return r;
  endfunction

  always @(posedge clk) cyc++;

  // sent words
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    sent_q.push_back(tx_word);
    n_sent++;
    if (want_lat) begin accept_cyc = cyc; want_lat = 0; end
  end

  // received words, order and peak spacing
  always @(posedge clk) if (rst_n && rx_valid) begin
    logic [N-1:0] exp_w;
    check(sent_q.size() > 0, "word received that was never sent");
    exp_w = (sent_q.size() > 0) ? sent_q.pop_front() : '0;
    check(rx_word == exp_w, $sformatf("word %h expected %h", rx_word, exp_w));
    m_wrap++;
    if (peak_phase && last_rx_cyc >= 0) begin
      check(cyc - last_rx_cyc == REV, $sformatf("peak word spacing %0d", cyc - last_rx_cyc));
      m_peak++;
    end
    last_rx_cyc = cyc;
  end

  // line protocol: transitions and restart latency
  tok_t bus_q = '0;
  int   state = 0;
  always @(posedge clk) if (rst_n) begin
    tok_t rise;
    rise = tx_bus & ~bus_q;
    bus_q <= tx_bus;
    if (rise != 0) begin
      int w;
      check($onehot(rise), "two wires rose together");
      w = 0;
      for (int k = 0; k < WIRES; k++) if (rise[k]) w = k;
      check(w != state, "same wire pulsed twice in a row");
      if (w != state) m_trans[state*2 + ((w - state + 2) % 3)]++;
      state = w;
      if (accept_cyc >= 0) begin
        check(cyc - accept_cyc == LAT_EXP, $sformatf("restart latency %0d", cyc - accept_cyc));
        accept_cyc = -1;
        m_idle++;
      end
    end
    for (int k = 0; k < WIRES; k++) if (tx_line[k] > 0) m_ffe++;
  end

  // switching activity of both rings' tokens
  tok_t tx_tok_q [N+1], rx_tok_q [N+1];
  int toggles = 0;
  int idle_toggles = 0;
  always @(posedge clk) begin
    int n;
    n = 0;
    for (int i = 0; i <= N; i++) begin
      n += $countones(dut.u_tx.tok[i] ^ tx_tok_q[i]);
      n += $countones(dut.u_rx.tok[i] ^ rx_tok_q[i]);
      tx_tok_q[i] <= dut.u_tx.tok[i];
      rx_tok_q[i] <= dut.u_rx.tok[i];
    end
    if (rst_n && cyc > 8) toggles += n;
    if (idle_phase) idle_toggles += n;
  end

  // idle: outputs hold still
  logic [N-1:0] rx_word_q;
  always @(posedge clk) if (rst_n && idle_phase) begin
    check(tx_bus == 0 && tx_line[0] == 0 && tx_line[1] == 0 && tx_line[2] == 0
          && !rx_valid && rx_word == rx_word_q && tx_ready, "activity while idle");
  end
  always @(posedge clk) rx_word_q <= rx_word;

  task automatic send(input int n, input int max_gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      tx_word  = next_word();
      tx_valid = 1'b1;
      while (!tx_ready) @(negedge clk);
      @(posedge clk);
      @(negedge clk);
      tx_valid = 1'b0;
      if (max_gap > 0) begin
        int g = $urandom_range(max_gap, 1);
        repeat (g) @(posedge clk);
        m_throttle++;
      end
    end
  endtask

  task automatic drain();
    repeat (6 * REV) @(posedge clk);
  endtask

  task automatic idle_gap(input int n);
    repeat (n) @(posedge clk);           // let the last word finish
    idle_phase = 1;
    repeat (n) @(posedge clk);
    idle_phase = 0;
    want_lat = 1;
  endtask

  initial begin
    tx_valid = 1'b0;
    tx_word  = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    // phase 1: peak burst
    want_lat = 1;
    peak_phase = 1;
    send(40, 0);
    drain();
    peak_phase = 0;
    // phase 2: idle gap, then throttled words
    idle_gap(300);
    send(30, 3 * REV);
    drain();
    // phase 3: short bursts between idle gaps
    for (int b = 0; b < 3; b++) begin
      idle_gap(200);
      last_rx_cyc = -1;
      send(4, 0);
      drain();
    end
    check(idle_toggles == 0, $sformatf("%0d token transitions while idle", idle_toggles));
    check(toggles == 4 * (N + 1) * n_sent,
          $sformatf("%0d token transitions for %0d words, expected %0d", toggles, n_sent, 4 * (N + 1) * n_sent));
    check(sent_q.size() == 0, $sformatf("%0d words never received", sent_q.size()));
    $display("sent=%0d token transitions=%0d", n_sent, toggles);
    $display("mechanisms: peak=%0d idle_restart=%0d ffe=%0d words=%0d throttled=%0d",
             m_peak, m_idle, m_ffe, m_wrap, m_throttle);
    $display("transitions: %0d %0d %0d %0d %0d %0d",
             m_trans[0], m_trans[1], m_trans[2], m_trans[3], m_trans[4], m_trans[5]);
    check(m_peak > 0, "peak-rate spacing never seen");
    check(m_idle > 0, "idle restart never seen");
    check(m_ffe > 0, "equalizer de-emphasis never seen");
    check(m_wrap > 1, "ring never completed two revolutions");
    check(m_throttle > 0, "throttled words never sent");
    for (int k = 0; k < 6; k++) check(m_trans[k] > 0, $sformatf("transition %0d never seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
