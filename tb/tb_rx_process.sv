// Unit test of the receiver process.
//
// The bench plays the previous stage (token u), the sense amplifier (bit d)
// and the next stage (T.e). The amplifier is cleared when u goes neutral, as
// in the cell. For every (state, bit) pair, in random order and with
// random waits, it checks:
//   - t becomes the one-hot next state (s + 1 + bit) mod 3 exactly 1 cycle
//     after the later of token and bit;
//   - bit_o shows the bit and bit_stb pulses for exactly one cycle, together
//     with t;
//   - U.e falls after t is valid and rises only after all inputs and t are
//     neutral, and t clears only after T.e falls.
module tb_rx_process;
  import tw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t u, t;
  dr_t  d;
  logic u_e, t_e, bit_o, bit_stb;
  int   checks = 0, failures = 0;
  int   stb_count = 0;

  always #1 clk = ~clk;

  rx_process dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) if (rst_n && bit_stb) stb_count++;

  task automatic one(input int s, input int b, input int late);
    int n;
    tok_t exp_t;
    exp_t = tok_of((s + 1 + b) % 3);
    @(negedge clk);
    check(u_e && t == '0, "stage not ready");
    stb_count = 0;
    u = tok_of(s);
    repeat (late) begin
      @(negedge clk);
      check(t == '0, "output before data");
    end
    d = b ? 2'b10 : 2'b01;
    n = 0;
    do begin @(negedge clk); n++; end while (t == '0 && n < 20);
    check(n == 1, $sformatf("latency %0d, expected 1", n));
    check(t == exp_t, $sformatf("s=%0d b=%0d: t=%b expected %b", s, b, t, exp_t));
    check(bit_stb && bit_o == b[0], "bit or strobe wrong");
    n = 0;
    while (u_e && n < 20) begin @(negedge clk); n++; end
    check(!u_e, "no acknowledge");
    repeat ($urandom_range(4, 1)) begin
      @(negedge clk);
      check(t == exp_t, "output dropped before T.e fell");
      check(!bit_stb, "strobe longer than one cycle");
    end
    u = '0;
    @(negedge clk);
    d = 2'b00;                       // neighbour's neutral token clears the amplifier
    check(!u_e, "acknowledge rose while output valid");
    t_e = 1'b0;
    n = 0;
    while (t != '0 && n < 20) begin @(negedge clk); n++; end
    check(t == '0, "output did not return to neutral");
    n = 0;
    while (!u_e && n < 20) begin @(negedge clk); n++; end
    check(u_e, "acknowledge did not return high");
    check(stb_count == 1, $sformatf("%0d strobes for one bit", stb_count));
    check(bit_o == b[0], "bit_o did not hold");
    t_e = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    u = '0; d = 2'b00; t_e = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < 2; b++) one(s, b, 0);
    for (int i = 0; i < 60; i++)
      one($urandom_range(2, 0), $urandom_range(1, 0), $urandom_range(5, 0));
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
