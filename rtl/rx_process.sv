// Receiver main process: one half-buffer stage of the receiver token ring.
//
// When both the token u and the sense amplifier's bit d are valid and the
// stage is enabled, it sets the next token t = f_s(u, d), the wire just
// received. In the same gate delay it presents the received bit on bit_o,
// with a one-cycle strobe bit_stb. The next-state logic is a single gate with
// no output inverter, so sense capture plus this stage give the receiver's
// 2-gate token path. The handshake is the same as in the tx process:
// c = C(uv, dv, tv), U.e = ~c, en = C(~c, T.e). The output is cleared while
// en is low. The sense amplifier is cleared by the neighbouring token, so it
// takes no acknowledge from here.
//
// From the published design: the split into sense amplifier and process, and the
// inverter-free next-state logic. The handshake details and the strobe
// output are this design's choices.
module rx_process
  import tw_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  tok_t u,
  output logic u_e,
  input  dr_t  d,
  output tok_t t,
  input  logic t_e,
  output logic bit_o,
  output logic bit_stb
);

  logic c, en;
  logic uv, dv, tv, fire;

  assign uv   = |u;
  assign dv   = |d;
  assign tv   = |t;
  assign fire = en && uv && dv && !tv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t       <= '0;
      c       <= 1'b0;
      en      <= 1'b1;
      bit_o   <= 1'b0;
      bit_stb <= 1'b0;
    end else begin
      if (!en)        t <= '0;
      else if (fire)  t <= fs_next(u, d);
      bit_stb <= fire;
      if (fire) bit_o <= d[1];
      if (uv && dv && tv)          c <= 1'b1;
      else if (!uv && !dv && !tv)  c <= 1'b0;
      if (!c && t_e)      en <= 1'b1;
      else if (c && !t_e) en <= 1'b0;
    end
  end

  assign u_e = ~c;

  a_t_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(t));
  a_d_dualrail: assert property (@(posedge clk) disable iff (!rst_n) d != 2'b11);

endmodule
