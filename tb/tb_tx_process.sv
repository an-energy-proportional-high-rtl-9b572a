// Unit test of the transmitter process (one PCHB ring stage).
//
// The bench plays the previous stage (drives u, watches u_e), the data
// source (drives l) and the next stage (watches t, drives t_e). It follows
// the four-phase protocol on every channel. For every (state, bit) pair, in
// random order and with random waits, it checks:
//   - t becomes the expected one-hot next state (state + 1 + bit) mod 3,
//     exactly 2 cycles after the later of token and data;
//   - u_e (and l_e) fall only after t is valid, and return high only after
//     u, l and t are all neutral again;
//   - t holds while T.e stays high, and clears only after T.e falls.
module tb_tx_process;
  import tw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t u, t;
  dr_t  l;
  logic u_e, l_e, t_e;
  int   checks = 0, failures = 0;

  always #1 clk = ~clk;

  tx_process dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic one(input int s, input int b, input int data_late);
    int n;
    tok_t exp_t;
    exp_t = '0;
    exp_t[(s + 1 + b) % 3] = 1'b1;
    @(negedge clk);
    check(u_e && l_e && t == '0, "stage not ready");
    if (data_late >= 0) begin
      u = '0; u[s] = 1'b1;
      repeat (data_late) begin
        @(negedge clk);
        check(t == '0, "output before data");
      end
      l = b ? 2'b10 : 2'b01;
    end else begin
      l = b ? 2'b10 : 2'b01;
      repeat (-data_late) begin
        @(negedge clk);
        check(t == '0, "output before token");
      end
      u = '0; u[s] = 1'b1;
    end
    n = 0;
    do begin @(negedge clk); n++; end while (t == '0 && n < 20);
    check(n == 2, $sformatf("forward latency %0d, expected 2", n));
    check(t == exp_t, $sformatf("s=%0d b=%0d: t=%b expected %b", s, b, t, exp_t));
    // acknowledge follows
    n = 0;
    while (u_e && n < 20) begin @(negedge clk); n++; end
    check(!u_e && !l_e, "no acknowledge");
    u = '0; l = 2'b00;
    // t holds while T.e is high
    repeat ($urandom_range(6, 1)) begin
      @(negedge clk);
      check(t == exp_t, "output dropped before T.e fell");
      check(!u_e, "acknowledge rose while output still valid");
    end
    t_e = 1'b0;
    n = 0;
    while (t != '0 && n < 20) begin @(negedge clk); n++; end
    check(t == '0, "output did not return to neutral");
    n = 0;
    while (!u_e && n < 20) begin @(negedge clk); n++; end
    check(u_e, "acknowledge did not return high");
    repeat ($urandom_range(3, 0)) @(negedge clk);
    t_e = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    u = '0; l = 2'b00; t_e = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < 2; b++) one(s, b, 0);
    for (int i = 0; i < 60; i++)
      one($urandom_range(2, 0), $urandom_range(1, 0), $urandom_range(8, 0) - 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
