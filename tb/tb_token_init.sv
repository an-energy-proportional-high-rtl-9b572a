// Unit test of the Init State ring stage.
//
// Two instances, with initial states 0 and 2. After reset each must hold
// its initial token with U.e low. When the next stage takes the token
// (T.e low) the output must return to neutral and U.e must rise. From then
// on each token offered at u must appear unchanged at t exactly 2 cycles
// later, with the usual four-phase handshake.
module tb_token_init;
  import tw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t u, t0, t2;
  logic ue0, ue2, t_e;
  int   checks = 0, failures = 0;

  always #1 clk = ~clk;

  token_init #(.INIT_STATE(0)) dut0 (.clk, .rst_n, .u, .u_e(ue0), .t(t0), .t_e);
  token_init #(.INIT_STATE(2)) dut2 (.clk, .rst_n, .u, .u_e(ue2), .t(t2), .t_e);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic release_out();
    int n;
    t_e = 1'b0;
    n = 0;
    while ((t0 != '0 || t2 != '0) && n < 20) begin @(negedge clk); n++; end
    check(t0 == '0 && t2 == '0, "output did not return to neutral");
    n = 0;
    while ((!ue0 || !ue2) && n < 20) begin @(negedge clk); n++; end
    check(ue0 && ue2, "U.e did not rise after reset phase");
    t_e = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int n;
    u = '0; t_e = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check(t0 == 3'b001, $sformatf("initial token %b, expected 001", t0));
    check(t2 == 3'b100, $sformatf("initial token %b, expected 100", t2));
    check(!ue0 && !ue2, "U.e high while holding initial token");
    release_out();
    for (int i = 0; i < 30; i++) begin
      int s;
      s = (i < 3) ? i : $urandom_range(2, 0);
      u = '0; u[s] = 1'b1;
      n = 0;
      do begin @(negedge clk); n++; end while (t0 == '0 && n < 20);
      check(n == 2, $sformatf("forward latency %0d, expected 2", n));
      check(t0 == u && t2 == u, $sformatf("token %b/%b, expected %b", t0, t2, u));
      n = 0;
      while (ue0 && n < 20) begin @(negedge clk); n++; end
      check(!ue0 && !ue2, "no acknowledge");
      u = '0;
      repeat ($urandom_range(4, 1)) begin
        @(negedge clk);
        check(t0 != '0, "output dropped before T.e fell");
      end
      release_out();
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
