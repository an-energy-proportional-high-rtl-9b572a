// Receiver cell sense amplifier: a 3-input differential comparator with a
// latch.
//
// The cell's input token u says which wire carried the previous bit. That
// wire may still be pulsing, so it is ignored. The other two wires are the
// candidates for this bit. While the token is present and the latch is
// empty, the amplifier watches the candidates. When one is at least
// THRESH_MV below the other, it latches the bit that wire stands for, as a
// dual-rail value: d = fs_bit(u, wire). There is no sampling instant. The
// amplifier simply waits until the wires have separated far enough.
//
// Clear: the latch returns to neutral as soon as the token from the
// neighbouring cell returns to neutral. So the clear is computed by the
// previous cell, not by this cell's own process, and adds no gate to the
// token path. Capture takes 1 gate delay.
//
// From the published design: the 3-input differential amplifier, waiting for voltage
// separation, and the clear coming from the neighbouring cell. The threshold
// value and the comparison against the other candidate wire are this
// design's choices.
module rx_sense_amp
  import tw_pkg::*;
#(
  parameter int THRESH_MV = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  mv_t  line [WIRES],
  input  tok_t u,
  output dr_t  d
);

  // Wire whose pulse stands for bit 0 / bit 1 after state u.
  tok_t w0, w1;
  int   v0, v1;
  assign w0 = fs_next(u, 2'b01);
  assign w1 = fs_next(u, 2'b10);

  always_comb begin
    v0 = 0;
    v1 = 0;
    for (int w = 0; w < WIRES; w++) begin
      if (w0[w]) v0 = int'(line[w]);
      if (w1[w]) v1 = int'(line[w]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d <= 2'b00;
    end else if (u == '0) begin
      d <= 2'b00;                                  // clear from neighbour
    end else if (d == 2'b00) begin
      if (v0 + THRESH_MV <= v1)      d <= 2'b01;
      else if (v1 + THRESH_MV <= v0) d <= 2'b10;
    end
  end

endmodule
