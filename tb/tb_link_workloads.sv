// Workload test of the serial link at its default size (N = 16).
//
// Part 1, rate sweep. PRBS31 words are sent at fixed word periods that
// correspond to 200 Mb/s ... 20 Gb/s, with 25 ps per gate delay and
// 34 gate delays per word at 20 Gb/s. For each rate the bench counts the
// token-rail transitions of both rings, its measure of dynamic energy. It
// prints transitions per word and per 1000 gate delays (proportional to
// power). It checks that every word arrives intact, that each word costs
// exactly 4*(N+1) = 68 transitions at every rate (energy per bit independent
// of rate), and that the ring does not switch between words.
//
// Part 2, jitter. At the peak rate (bit time T = 2 gate delays) the channel
// gives each pulse its own random extra flight time of 0 or 1 gate delay
// (T/2), per wire. Every word must still arrive intact.
module tb_link_workloads;
  import tw_pkg::*;

  localparam int N      = 16;
  localparam int REV    = 2 * (N + 1);
  localparam int CH_D   = 3;
  localparam int NRATES = 8;
  localparam int RATE_MBPS [NRATES] = '{200, 500, 1000, 2500, 5000, 10000, 15000, 20000};
  localparam int WORDS_PER_RATE = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] tx_word, rx_word;
  logic tx_valid, tx_ready, rx_valid;
  tok_t tx_bus;
  mv_t  tx_line [WIRES], rx_line [WIRES];

  always #1 clk = ~clk;

  serdes_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  logic [N-1:0] sent_q [$];
  logic [30:0] prbs = 31'h0bad_cafe;
  int n_rx = 0;
  bit jitter_on = 0;
  int n_jittered = 0;

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

  // channel: per-wire delay line; with jitter on, each pulse picks its own
  // extra delay of 0 or 1 when it leaves the driver (the line follows the
  // bus by one gate delay, so the choice is made one cycle ahead)
  mv_t dly [WIRES][CH_D+2];
  int  extra [WIRES];
  tok_t bus_q = '0;
  always_ff @(posedge clk) begin
    for (int w = 0; w < WIRES; w++) begin
      dly[w][0] <= rst_n ? tx_line[w] : mv_t'(0);
      for (int k = 1; k <= CH_D + 1; k++) dly[w][k] <= dly[w][k-1];
    end
  end
  always @(posedge clk) begin
    for (int w = 0; w < WIRES; w++)
      if (tx_bus[w] && !bus_q[w]) begin
        extra[w] = jitter_on ? int'($urandom_range(1, 0)) : 0;
        if (extra[w] != 0) n_jittered++;
      end
    bus_q <= tx_bus;
  end
  always_comb
    for (int w = 0; w < WIRES; w++)
      rx_line[w] = mv_t'((3 * int'(dly[w][CH_D-1+extra[w]]) + int'(dly[w][CH_D+extra[w]])) / 4);

  // words
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) sent_q.push_back(tx_word);
  always @(posedge clk) if (rst_n && rx_valid) begin
    logic [N-1:0] e;
    check(sent_q.size() > 0, "word received that was never sent");
    e = (sent_q.size() > 0) ? sent_q.pop_front() : '0;
    check(rx_word == e, $sformatf("word %h expected %h", rx_word, e));
    n_rx++;
  end

  // activity
  tok_t tx_tok_q [N+1], rx_tok_q [N+1];
  int toggles = 0;
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
  end

  task automatic send_word();
    @(negedge clk);
    tx_word  = next_word();
    tx_valid = 1'b1;
    while (!tx_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    tx_valid = 1'b0;
  endtask

  initial begin
    tx_valid = 1'b0;
    tx_word  = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);
    $display(" rate Mb/s | gate delays/word | transitions/word | transitions per 1000 gate delays");
    for (int r = 0; r < NRATES; r++) begin
      int period, t0, c0, w0, dt, dc, dw;
      period = (REV * 20000 + RATE_MBPS[r] - 1) / RATE_MBPS[r];
      t0 = toggles; c0 = cyc; w0 = n_rx;
      for (int k = 0; k < WORDS_PER_RATE; k++) begin
        int start;
        start = cyc;
        send_word();
        while (cyc - start < period) @(posedge clk);
      end
      repeat (3 * REV) @(posedge clk);            // let the last word land
      dt = toggles - t0; dc = cyc - c0; dw = n_rx - w0;
      $display(" %9d | %16d | %16.2f | %8.2f", RATE_MBPS[r], period,
               real'(dt) / real'(dw), 1000.0 * real'(dt) / real'(dc));
      check(dw == WORDS_PER_RATE, $sformatf("%0d Mb/s: %0d words received", RATE_MBPS[r], dw));
      check(dt == 4 * (N + 1) * dw, $sformatf("%0d Mb/s: %0d transitions for %0d words", RATE_MBPS[r], dt, dw));
    end
    // jitter at peak rate
    jitter_on = 1;
    repeat (2 * REV) @(posedge clk);
    for (int k = 0; k < 40; k++) send_word();
    repeat (4 * REV) @(posedge clk);
    jitter_on = 0;
    $display("jitter phase: %0d of the pulses delayed by T/2", n_jittered);
    check(n_jittered > 100, "jitter was not applied");
    check(sent_q.size() == 0, $sformatf("%0d words lost", sent_q.size()));
    check(n_rx == NRATES * WORDS_PER_RATE + 40, $sformatf("received %0d words", n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
