// Unit test of the receiver (token ring of sense amplifier cells and word
// output) at N = 16.
//
// A bench-side transmitter model encodes random words into line levels.
// The state starts at 0, each bit goes out on wire (s + 1 + bit) mod 3 as a
// -200 mV pulse two cycles wide, and the other wires stay at 0 mV. It sends
// at the transmitter's peak timing, one bit every 2 cycles with 2 extra
// cycles per word for the Init State hop, and also at slower random
// timings that a transmitter could produce (never less than 2 idle cycles
// after the last bit of a word). Checks:
//   - every word received equals the word encoded, in order;
//   - at peak timing, consecutive words arrive 2*(N+1) = 34 cycles apart,
//     so the receiver keeps pace with the transmitter;
//   - with no pulses, nothing is received.
module tb_serdes_rx;
  import tw_pkg::*;

  localparam int N   = 16;
  localparam int REV = 2 * (N + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  mv_t  line [WIRES];
  logic [N-1:0] word;
  logic valid;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  logic [N-1:0] sent_q [$];
  int   last_v = -1, n_peak = 0, n_rx = 0;
  bit   peak = 0;
  int   st = 0;

  always #1 clk = ~clk;

  serdes_rx dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && valid) begin
    logic [N-1:0] e;
    check(sent_q.size() > 0, "word received that was never sent");
    e = sent_q.size() ? sent_q.pop_front() : '0;
    check(word == e, $sformatf("word %h expected %h", word, e));
    if (peak && last_v >= 0) begin
      check(cyc - last_v == REV, $sformatf("word spacing %0d", cyc - last_v));
      n_peak++;
    end
    last_v = cyc;
    n_rx++;
  end

  task automatic pulse_bit(input int b, input int gap);
    int w;
    w = (st + 1 + b) % 3;
    line[w] = -200;
    repeat (2) @(negedge clk);
    line[w] = 0;
    repeat (gap) @(negedge clk);
    st = w;
  endtask

  // peak timing: a new pulse every 2 cycles, each 2 cycles wide
  task automatic send_peak(input int nwords);
    for (int k = 0; k < nwords; k++) begin
      logic [N-1:0] x;
      x = N'($urandom());
      sent_q.push_back(x);
      for (int i = 0; i < N; i++) begin
        int w;
        w = (st + 1 + int'(x[i])) % 3;
        for (int j = 0; j < WIRES; j++) line[j] = (j == w) ? mv_t'(-200) : mv_t'(0);
        @(negedge clk);
        @(negedge clk);
        st = w;
        if (i == N - 1) begin         // Init State hop: 2 more cycles
          for (int j = 0; j < WIRES; j++) line[j] = 0;
          @(negedge clk);
          @(negedge clk);
        end
      end
    end
    for (int j = 0; j < WIRES; j++) line[j] = 0;
  endtask

  task automatic send_slow(input int nwords);
    for (int k = 0; k < nwords; k++) begin
      logic [N-1:0] x;
      x = N'($urandom());
      sent_q.push_back(x);
      for (int i = 0; i < N; i++)
        // a transmitter always spends at least 2 cycles in its Init State
        // stage between the last bit of a word and the next one
        pulse_bit(x[i], (i == N - 1) ? $urandom_range(10, 2) : $urandom_range(10, 0));
    end
  endtask

  initial begin
    for (int j = 0; j < WIRES; j++) line[j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    check(n_rx == 0, "word received from an idle line");
    peak = 1;
    send_peak(10);
    repeat (2 * REV) @(negedge clk);
    peak = 0;
    send_slow(8);
    repeat (2 * REV) @(negedge clk);
    check(n_rx == 18, $sformatf("received %0d words, expected 18", n_rx));
    check(n_peak == 9, $sformatf("peak spacing seen %0d times", n_peak));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
