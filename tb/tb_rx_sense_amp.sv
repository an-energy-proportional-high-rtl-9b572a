// Unit test of the receiver sense amplifier.
//
// For random states and line patterns the bench drives the token u and the
// three line levels (mV). A reference decides what the amplifier should
// latch: of the two wires other than the state, the one at least 100 mV
// below the other, with wire (s+1) standing for 0 and (s+2) for 1. Checks:
//   - a clear separation is latched one cycle later as the right dual-rail bit;
//   - a separation under the threshold latches nothing;
//   - the previous state's wire is ignored, however low it is;
//   - once latched, the bit holds when the line returns to idle or another
//     wire pulses;
//   - the latch clears one cycle after the token goes neutral.
module tb_rx_sense_amp;
  import tw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mv_t  line [WIRES];
  tok_t u;
  dr_t  d;
  int   checks = 0, failures = 0;

  always #1 clk = ~clk;

  rx_sense_amp dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic idle_line();
    for (int w = 0; w < WIRES; w++) line[w] = mv_t'($urandom_range(20, 0)) - mv_t'(10);
  endtask

  task automatic one(input int s, input int tgt, input int sep, input bit low_state);
    int a, b, other;
    dr_t exp_d;
    a = (s + 1) % 3;
    b = (s + 2) % 3;
    other = (tgt == a) ? b : a;
    idle_line();
    u = tok_of(s);
    @(negedge clk);
    check(d == 2'b00, "latched on an idle line");
    line[tgt]   = mv_t'(-sep);
    line[other] = mv_t'(0);
    line[s]     = low_state ? mv_t'(-250) : mv_t'(5);
    @(negedge clk);
    if (sep >= 100) exp_d = (tgt == a) ? 2'b01 : 2'b10;
    else            exp_d = 2'b00;
    check(d == exp_d, $sformatf("s=%0d wire=%0d sep=%0d: d=%b expected %b", s, tgt, sep, d, exp_d));
    // hold: line idle, then the other candidate pulses
    idle_line();
    @(negedge clk);
    check(d == exp_d, "latch did not hold on idle line");
    if (exp_d != 2'b00) begin
      line[other] = mv_t'(-200);
      @(negedge clk);
      check(d == exp_d, "latch changed on a later pulse");
    end
    idle_line();
    u = '0;
    @(negedge clk);
    check(d == 2'b00, "latch not cleared by neutral token");
  endtask

  initial begin
    u = '0;
    idle_line();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      one(s, (s + 1) % 3, 200, 0);
      one(s, (s + 2) % 3, 200, 1);
      one(s, (s + 1) % 3, 60, 1);
      one(s, (s + 2) % 3, 99, 0);
    end
    for (int i = 0; i < 200; i++) begin
      int s;
      s = $urandom_range(2, 0);
      one(s, (s + 1 + $urandom_range(1, 0)) % 3, $urandom_range(250, 0), $urandom_range(1, 0));
    end
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
