// Continuous-time 4-tap feed-forward equalizer for the three link wires.
//
// For each wire, the drive level is a weighted sum of the wire's pulse and
// of TAPS-1 delayed copies of it:
//   level[w](n) = sum_k TAP_MV[k] * pulse[w](n - 1 - k*TAP_DELAY)
// The taps are not spaced by a clock period. They are spaced by the token
// propagation time of one ring hop, 2 gate delays, so the filter follows the
// link's own bit timing and needs no retuning when the data rate changes.
//
// Levels are in mV relative to the 0.6 V line bias, and negative means
// pulled down. The main tap is the 200 mV driver swing, so a pulse pulls its
// wire down. The post taps push the wire back up after a pulse (de-emphasis)
// to cancel the channel's trailing intersymbol interference. The output is
// registered, 1 gate delay after the pulse.
//
// From the published design: 4 taps, tap spacing set by the token propagation time, and
// the 200 mV swing. The tap weights are this design's choice. So is modelling
// the analog filter as this sampled sum at unit gate delay.
module ct_ffe
  import tw_pkg::*;
#(
  parameter int unsigned TAPS      = 4,
  parameter int unsigned TAP_DELAY = 2,
  parameter int          TAP_MV [TAPS] = '{-200, 40, 20, 10}
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t pulse,
  output mv_t  level [WIRES]
);

  localparam int unsigned HL = (TAPS - 1) * TAP_DELAY + 1;  // history length

  logic [HL-1:0] hist [WIRES];   // hist[w][0] = current pulse

  always_comb
    for (int w = 0; w < WIRES; w++) hist[w][0] = pulse[w];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int w = 0; w < WIRES; w++) begin
        hist[w][HL-1:1] <= '0;
        level[w]        <= '0;
      end
    end else begin
      for (int w = 0; w < WIRES; w++) begin
        int acc;
        hist[w][HL-1:1] <= hist[w][HL-2:0];
        acc = 0;
        for (int k = 0; k < TAPS; k++)
          if (hist[w][k*TAP_DELAY]) acc += TAP_MV[k];
        level[w] <= mv_t'(acc);
      end
    end
  end

endmodule
