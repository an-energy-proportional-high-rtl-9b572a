// Receiver parallel output: N received bits in, one word out.
//
// Each receiver cell strobes its bit when it fires. The bit is stored in
// position i of an assembly register. When the last cell (N-1) strobes, the
// word is complete. The word is copied to the output together with a
// one-cycle valid pulse, one gate delay after the last strobe. The receiver
// cannot stall the link, so there is no ready. The consumer must take the
// word within one revolution of the ring.
module rx_word_if
  import tw_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] bit_i,
  input  logic [N-1:0] bit_stb,
  output logic [N-1:0] word,
  output logic         valid
);

  logic [N-1:0] asm_q, asm_d;

  always_comb
    for (int i = 0; i < N; i++) asm_d[i] = bit_stb[i] ? bit_i[i] : asm_q[i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      asm_q <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      asm_q <= asm_d;
      valid <= bit_stb[N-1];
      if (bit_stb[N-1]) word <= asm_d;
    end
  end

endmodule
