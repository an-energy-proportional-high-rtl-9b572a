// Unit test of the transmitter's word input.
//
// The bench offers random 16-bit words with random gaps on valid. It plays
// all 16 cells, each with its own four-phase handshake and random response
// times: a cell acknowledges a valid bit after 0-5 cycles and re-arms 0-7
// cycles after the bit returns to neutral. Each cell records the bits it
// receives. Checks:
//   - every bit slot is neutral or one-hot, never both rails;
//   - cell i receives bit i of every word accepted, in order;
//   - a new word is accepted while cells still hold bits of the previous one
//     (the holding register works as a one-word buffer).
module tb_tx_word_if;
  import tw_pkg::*;

  localparam int N = 16;
  localparam int WORDS = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] word, l_e;
  logic valid, ready;
  dr_t  l [N];
  int   checks = 0, failures = 0;
  logic [N-1:0] acc_q [$];
  logic [N-1:0] got [N][$];
  int   overlap = 0;

  always #1 clk = ~clk;

  tx_word_if #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n && valid && ready) begin
    acc_q.push_back(word);
    for (int i = 0; i < N; i++) if (l[i] != 2'b00) begin overlap++; break; end
  end

  always @(negedge clk) if (rst_n)
    for (int i = 0; i < N; i++) check(l[i] != 2'b11, "both rails high");

  for (genvar i = 0; i < N; i++) begin : g_cell
    initial begin
      l_e[i] = 1'b1;
      forever begin
        @(negedge clk);
        if (l[i] != 2'b00) begin
          repeat ($urandom_range(5, 0)) @(negedge clk);
          got[i].push_back(l[i][1]);
          l_e[i] = 1'b0;
          while (l[i] != 2'b00) @(negedge clk);
          repeat ($urandom_range(7, 0)) @(negedge clk);
          l_e[i] = 1'b1;
        end
      end
    end
  end

  initial begin
    valid = 1'b0; word = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      word  = N'($urandom());
      valid = 1'b1;
      while (!ready) @(negedge clk);
      @(negedge clk);
      valid = 1'b0;
      repeat ($urandom_range(3, 0)) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    check(acc_q.size() == WORDS, $sformatf("accepted %0d words", acc_q.size()));
    for (int i = 0; i < N; i++) begin
      check(got[i].size() == acc_q.size(), $sformatf("cell %0d got %0d bits", i, got[i].size()));
      for (int w = 0; w < acc_q.size() && w < got[i].size(); w++)
        check(got[i][w][0] == acc_q[w][i], $sformatf("cell %0d word %0d bit wrong", i, w));
    end
    check(overlap > 0, "never accepted a word while bits were outstanding");
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
