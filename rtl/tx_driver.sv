// Transmitter cell driver: digital pulse generator for the shared bus.
//
// When a rail of the cell's output token rises, the driver makes a pulse of
// PULSE_W gate delays on the matching wire. The pulse starts one gate delay
// after the rail rises. The pulse is a fixed-width one-shot, so it does not
// wait for the token to return to neutral, and the driver never acknowledges
// the token.
//
// PULSE_W must be shorter than two bit times, because a wire may carry a new
// pulse two bits later. The default of 2 is one bit time at the peak rate
// (one bit per 2 gate delays). The width is this design's choice; the published
// design only says that the driver relies on timing assumptions about pulse width.
// The current-mode analog output stage (200 mV swing) is not modelled here.
// The swing appears as the equalizer's millivolt level instead.
module tx_driver
  import tw_pkg::*;
#(
  parameter int unsigned PULSE_W = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t t,
  output tok_t pulse
);

  localparam int unsigned CW = $clog2(PULSE_W + 1);

  tok_t t_q;
  logic [CW-1:0] cnt [WIRES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t_q <= '0;
      for (int w = 0; w < WIRES; w++) cnt[w] <= '0;
    end else begin
      t_q <= t;
      for (int w = 0; w < WIRES; w++) begin
        if (t[w] && !t_q[w])   cnt[w] <= CW'(PULSE_W);
        else if (cnt[w] != 0)  cnt[w] <= cnt[w] - 1'b1;
      end
    end
  end

  always_comb
    for (int w = 0; w < WIRES; w++) pulse[w] = (cnt[w] != 0);

endmodule
