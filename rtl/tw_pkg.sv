// Three-wire token-ring link: shared types and the protocol's state functions.
//
// The link carries one bit per pulse on one of three wires, and never pulses
// the same wire twice in a row. The "state" is the wire that carried the last
// bit. The next wire is one of the two others, and the data bit picks which:
//   next = (state + 1 + bit) mod 3
// That mapping is this design's choice. The published design only fixes the rule that a
// wire is never used twice in a row.
//
// Encodings used everywhere:
//   tok_t : a 1-of-3 token, rail k high = state k, all low = neutral (spacer)
//   dr_t  : a dual-rail bit, [0] = "0" rail, [1] = "1" rail, 00 = neutral
//   mv_t  : a signed line level in millivolts relative to the 0.6 V line bias
//
// Time base: the link is clockless. The RTL models it at unit gate delay:
// each clk edge stands for one gate delay, and each gate that sits on the
// token path is one register.
package tw_pkg;

  localparam int unsigned WIRES = 3;   // wires in the link
  localparam int unsigned LW    = 10;  // bits of a line level in mV

  typedef logic [WIRES-1:0]    tok_t;
  typedef logic [1:0]          dr_t;
  typedef logic signed [LW-1:0] mv_t;

  // One-hot token for state index s (0..2).
  function automatic tok_t tok_of(int unsigned s);
    tok_t r;
    r = '0;
    r[s % WIRES] = 1'b1;
    return r;
  endfunction

  // f_s: next state from a valid token and a valid dual-rail bit.
  // Returns neutral if either input is neutral.
  function automatic tok_t fs_next(tok_t s, dr_t b);
    tok_t r;
    r = '0;
    for (int i = 0; i < WIRES; i++) begin
      if (s[i] && b[0]) r[(i + 1) % WIRES] = 1'b1;
      if (s[i] && b[1]) r[(i + 2) % WIRES] = 1'b1;
    end
    return r;
  endfunction

  // Inverse of f_s: the bit carried by a pulse on wire w after state s.
  // Returns neutral if w equals s or either token is neutral.
  function automatic dr_t fs_bit(tok_t s, tok_t w);
    dr_t r;
    r = '0;
    for (int i = 0; i < WIRES; i++) begin
      if (s[i] && w[(i + 1) % WIRES]) r[0] = 1'b1;
      if (s[i] && w[(i + 2) % WIRES]) r[1] = 1'b1;
    end
    return r;
  endfunction

endpackage
