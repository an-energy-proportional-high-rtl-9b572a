// Transmitter parallel input: a word in, one dual-rail bit per cell out.
//
// Words enter with a valid/ready handshake and are taken when both are high.
// A holding register keeps one word, with a mask of the bits not yet handed
// out. Each cell has its own four-phase dual-rail channel (l[i], l_e[i]):
//   - if slot i is neutral, its acknowledge is high and the held word still
//     owes bit i, the slot is set to that bit;
//   - once the cell acknowledges (l_e[i] low), the slot returns to neutral.
// ready is high when the held word has handed out every bit. So a new word
// can be taken while the cells are still sending the previous one, and the
// ring does not stall when words arrive back to back.
//
// The 16-bit word width follows the published design. The handshake and the buffering
// are this design's own choices.
module tx_word_if
  import tw_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] word,
  input  logic         valid,
  output logic         ready,
  output dr_t          l   [N],
  input  logic [N-1:0] l_e
);

  logic [N-1:0] hold, mask;
  logic [N-1:0] give;

  assign ready = (mask == '0);

  always_comb
    for (int i = 0; i < N; i++) give[i] = mask[i] && (l[i] == 2'b00) && l_e[i];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold <= '0;
      mask <= '0;
      for (int i = 0; i < N; i++) l[i] <= 2'b00;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (give[i])                    l[i] <= {hold[i], ~hold[i]};
        else if (l[i] != 2'b00 && !l_e[i]) l[i] <= 2'b00;
      end
      if (valid && ready) begin
        hold <= word;
        mask <= '1;
      end else begin
        mask <= mask & ~give;
      end
    end
  end

endmodule
