// Unit test of the transmitter driver's pulse generator.
//
// Two instances, with PULSE_W = 2 (the default) and PULSE_W = 3, see the
// same random token sequence. The token is neutral or one-hot and holds each
// value for a random 1 to 6 cycles. A reference model keeps, per wire, the
// cycle of the last rising edge. The pulse must be high exactly in the
// PULSE_W cycles that follow the clock edge at which the DUT sees a rising edge. Every cycle is
// compared.
module tb_tx_driver;
  import tw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  tok_t t, t_q, p2, p3;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  int   last_rise [WIRES];
  int   n_pulses = 0;

  always #1 clk = ~clk;

  tx_driver                 dut2 (.clk, .rst_n, .t, .pulse(p2));
  tx_driver #(.PULSE_W(3))  dut3 (.clk, .rst_n, .t, .pulse(p3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // reference: sample at negedge, after the posedge updates
  always @(negedge clk) if (rst_n) begin
    for (int w = 0; w < WIRES; w++) begin
      bit e2, e3;
      e2 = (last_rise[w] >= 0) && (cyc - last_rise[w] <= 1);
      e3 = (last_rise[w] >= 0) && (cyc - last_rise[w] <= 2);
      check(p2[w] == e2, $sformatf("wire %0d pulse(W=2)=%b expected %b", w, p2[w], e2));
      check(p3[w] == e3, $sformatf("wire %0d pulse(W=3)=%b expected %b", w, p3[w], e3));
    end
  end

  // rising edge bookkeeping at the posedge where the DUT sees it
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      for (int w = 0; w < WIRES; w++)
        if (t[w] && !t_q[w]) begin last_rise[w] = cyc; n_pulses++; end
    end
    t_q <= rst_n ? t : '0;
  end

  initial begin
    for (int w = 0; w < WIRES; w++) last_rise[w] = -1;
    t = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      int k;
      k = $urandom_range(3, 0);
      @(negedge clk);
      t = (k == 3) ? tok_t'(0) : tok_of(k);
      repeat ($urandom_range(5, 0)) @(negedge clk);
    end
    check(n_pulses > 50, "too few pulses generated");
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
