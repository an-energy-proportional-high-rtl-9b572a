// Unit test of the transmitter (word input, token ring, drivers, shared bus
// and equalizer) at N = 16.
//
// An independent decoder watches the shared bus. It starts in state 0, and
// each new pulse on wire w after state s stands for bit (w - s - 1) mod 3.
// Every 16 decoded bits make a word. Checks:
//   - decoded words equal the words accepted, in order;
//   - the bus is always 0 or one-hot, and no wire pulses twice in a row;
//   - during a back-to-back burst, bits inside a word are 2 cycles apart,
//     and the first bits of consecutive words are 2*(N+1) = 34 cycles apart;
//   - each line level equals the 4-tap sum over that wire's bus history;
//   - with no word offered, the bus stays quiet.
module tb_serdes_tx;
  import tw_pkg::*;

  localparam int N   = 16;
  localparam int REV = 2 * (N + 1);
  localparam int TAP [4] = '{-200, 40, 20, 10};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] word;
  logic valid, ready;
  tok_t bus;
  mv_t  line [WIRES];
  int   checks = 0, failures = 0;
  int   cyc = 0;
  logic [N-1:0] acc_q [$];
  bit   burst = 0, quiet = 0;
  int   n_words = 0, n_peak_words = 0;

  always #1 clk = ~clk;

  serdes_tx dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && valid && ready) acc_q.push_back(word);

  // decoder
  tok_t bus_q = '0;
  int   st = 0, nbit = 0, last_bit_cyc = -1, word_start = -1;
  logic [N-1:0] dec;
  bit   hist [WIRES][$];
  always @(posedge clk) if (rst_n) begin
    tok_t rise;
    check(bus == 0 || $onehot(bus), "bus not one-hot");
    if (quiet) check(bus == 0, "bus active while idle");
    rise = bus & ~bus_q;
    bus_q <= bus;
    if (rise != 0) begin
      int w, b;
      w = 0;
      for (int k = 0; k < WIRES; k++) if (rise[k]) w = k;
      check(w != st, "same wire twice in a row");
      b = (w - st + 2) % 3;
      dec[nbit] = b[0];
      if (burst && nbit > 0) check(cyc - last_bit_cyc == 2, $sformatf("bit spacing %0d", cyc - last_bit_cyc));
      if (nbit == 0) begin
        if (burst && word_start >= 0) begin
          check(cyc - word_start == REV, $sformatf("word spacing %0d", cyc - word_start));
          n_peak_words++;
        end
        word_start = cyc;
      end
      last_bit_cyc = cyc;
      st = w;
      nbit++;
      if (nbit == N) begin
        logic [N-1:0] e;
        nbit = 0;
        check(acc_q.size() > 0, "word decoded that was never accepted");
        e = acc_q.size() ? acc_q.pop_front() : '0;
        check(dec == e, $sformatf("decoded %h expected %h", dec, e));
        n_words++;
      end
    end
    // equalizer reference: line registered from the bus history
    for (int k = 0; k < WIRES; k++) begin
      int ev;
      ev = 0;
      for (int j = 0; j < 4; j++) if (hist[k].size() > 2*j && hist[k][2*j]) ev += TAP[j];
      check(int'(line[k]) == ev, $sformatf("line %0d = %0d expected %0d", k, line[k], ev));
      hist[k].push_front(bus[k]);
      if (hist[k].size() > 7) void'(hist[k].pop_back());
    end
  end

  task automatic send(input int n, input int gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      word  = N'($urandom());
      valid = 1'b1;
      while (!ready) @(negedge clk);
      @(negedge clk);
      valid = 1'b0;
      repeat (gap ? $urandom_range(gap, 0) : 0) @(negedge clk);
    end
  endtask

  initial begin
    valid = 1'b0; word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    quiet = 1;
    repeat (50) @(negedge clk);
    quiet = 0;
    burst = 1;
    send(12, 0);
    repeat (3 * REV) @(negedge clk);
    burst = 0;
    word_start = -1;
    send(12, 80);
    repeat (3 * REV) @(negedge clk);
    quiet = 1;
    repeat (50) @(negedge clk);
    check(n_words == 24, $sformatf("decoded %0d words", n_words));
    check(n_peak_words >= 10, "peak spacing seen too rarely");
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
