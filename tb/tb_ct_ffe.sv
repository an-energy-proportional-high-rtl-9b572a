// Unit test of the 4-tap continuous-time equalizer.
//
// Random pulse patterns drive the three wires: sparse, dense and isolated
// single pulses. A reference model keeps each wire's pulse history and
// computes, for every cycle,
//   level(n) = sum_k TAP_MV[k] * pulse(n - 1 - 2k)
// with the default taps {-200, 40, 20, 10} mV. The DUT's level must match
// every cycle. The bench also counts isolated pulses to see the full
// de-emphasis tail: -200, 0, +40, 0, +20, 0, +10.
module tb_ct_ffe;
  import tw_pkg::*;

  localparam int TAP [4] = '{-200, 40, 20, 10};

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t pulse;
  mv_t  level [WIRES];
  int   checks = 0, failures = 0;
  bit   hist [WIRES][$];
  int   n_neg = 0, n_pos = 0;

  always #1 clk = ~clk;

  ct_ffe dut (.clk, .rst_n, .pulse, .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // At each posedge the DUT registers the sum over the current pulse and its
  // history; the reference does the same from its own record.
  int exp_lv [WIRES];
  always @(posedge clk) if (rst_n) begin
    for (int w = 0; w < WIRES; w++) begin
      hist[w].push_front(pulse[w]);
      if (hist[w].size() > 7) void'(hist[w].pop_back());
      exp_lv[w] = 0;
      for (int k = 0; k < 4; k++)
        if (hist[w].size() > 2*k && hist[w][2*k]) exp_lv[w] += TAP[k];
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int w = 0; w < WIRES; w++) begin
      check(int'(level[w]) == exp_lv[w],
            $sformatf("wire %0d level %0d expected %0d", w, level[w], exp_lv[w]));
      if (level[w] < 0) n_neg++;
      if (level[w] > 0) n_pos++;
    end
  end

  initial begin
    pulse = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // isolated pulse on each wire
    for (int w = 0; w < WIRES; w++) begin
      @(negedge clk); pulse = tok_of(w);
      @(negedge clk); pulse = '0;
      repeat (10) @(negedge clk);
    end
    // random patterns, varying density
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      pulse = tok_t'($urandom_range(7, 0)) & ((i % 200 < 100) ? 3'b111 : tok_t'($urandom_range(7, 0)));
    end
    check(n_neg > 0 && n_pos > 0, "level never went both ways");
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
