// Unit test of the receiver's word output.
//
// The bench strobes the 16 bit positions in ring order (0 to 15) with random
// bits and random gaps between strobes, as the receiver cells would. After
// strobe 15 the word must appear with valid high for exactly one cycle, one
// cycle after the strobe, and must equal the 16 bits strobed. valid must stay
// low at every other time.
module tb_rx_word_if;
  import tw_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] bit_i, bit_stb, word;
  logic valid;
  int   checks = 0, failures = 0;
  int   n_valid = 0;

  always #1 clk = ~clk;

  rx_word_if #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(negedge clk) if (rst_n && valid) n_valid++;

  initial begin
    bit_i = '0; bit_stb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 50; w++) begin
      logic [N-1:0] exp_w;
      int nv;
      exp_w = N'($urandom());
      nv = n_valid;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        check(!valid, "valid before the last bit");
        bit_i = N'($urandom());
        bit_i[i] = exp_w[i];
        bit_stb = '0;
        bit_stb[i] = 1'b1;
        @(negedge clk);
        bit_stb = '0;
        bit_i = N'($urandom());
        if (i == N - 1) begin
          check(valid, "no valid one cycle after the last strobe");
          check(word == exp_w, $sformatf("word %h expected %h", word, exp_w));
          @(negedge clk);
          check(!valid, "valid longer than one cycle");
          check(word == exp_w, "word did not hold");
        end else begin
          repeat ((w % 3 == 0) ? 0 : $urandom_range(3, 0)) @(negedge clk);
        end
      end
      check(n_valid == nv + 1, "wrong number of valid pulses");
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
