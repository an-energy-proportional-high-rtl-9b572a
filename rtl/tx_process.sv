// Transmitter main process: one pre-charge half-buffer (PCHB) stage of the
// transmitter token ring.
//
// It takes the 1-of-3 token U (the link state left by the previous bit) and
// the dual-rail data bit L, and produces the output token T = f_s(U, L), the
// wire that carries this bit. T goes both to the next ring stage and to this
// cell's driver, in parallel. The driver does not take part in the handshake,
// so token propagation costs only the f_s network and the output inverter.
//
// Gate-level structure, at one register per gate (clk = one gate delay):
//   x   : the pre-charged f_s network. It is cleared while en is low and
//         evaluates and holds while en is high.
//   t   : the output inverters, t <= x. Forward latency from U (with L
//         present) to T is 2 gate delays.
//   c   : validity gates and completion, a C-element of lv, uv and tv.
//         tv is taken from the pre-charged nodes x, ahead of the output
//         inverters, as in the process circuit.
//         U.e = L.e = ~c.
//   en  : second completion, a C-element of ~c and T.e.
// Handshake: four-phase and return-to-zero on every channel. Acknowledges are
// active high, so high means "ready for new data".
//
// From the published design: the signal names and the two-gate token path of the
// process circuit, and that the token goes to the driver in parallel with the
// next stage. This design's own choices: modelling completion as C-elements,
// folding validity and the first completion into one gate, and the f_s
// mapping in tw_pkg.
module tx_process
  import tw_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  tok_t u,      // U.0..U.2
  output logic u_e,    // U.e
  input  dr_t  l,      // L.0, L.1
  output logic l_e,    // L.e
  output tok_t t,      // T.0..T.2
  input  logic t_e     // T.e
);

  tok_t x;
  logic c, en;
  logic lv, uv, tv;

  assign lv = |l;
  assign uv = |u;
  assign tv = |x;                 // output validity, taken ahead of the inverters

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x  <= '0;
      t  <= '0;
      c  <= 1'b0;
      en <= 1'b1;
    end else begin
      // pre-charge / evaluate with keeper
      if (!en)            x <= '0;
      else if (lv && uv)  x <= x | fs_next(u, l);
      t <= x;
      // completion of inputs and output
      if (lv && uv && tv)          c <= 1'b1;
      else if (!lv && !uv && !tv)  c <= 1'b0;
      // enable: C-element of the local acknowledge and T.e
      if (!c && t_e)      en <= 1'b1;
      else if (c && !t_e) en <= 1'b0;
    end
  end

  assign u_e = ~c;
  assign l_e = ~c;

  // A valid token is one-hot; a neutral one is all zero.
  a_t_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(t));

endmodule
