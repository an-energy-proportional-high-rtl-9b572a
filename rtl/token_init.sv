// Init State stage of a token ring (transmitter or receiver).
//
// A PCHB buffer stage that sits in the ring between the last cell and cell 0.
// After reset it holds the ring's only token, with the state INIT_STATE. On
// every revolution it takes the token from the last cell and passes it on
// unchanged. It uses the same gate structure and the same 2-gate forward
// latency as a tx process, without the data input. Its output validity is
// taken ahead of the output inverters, as in the tx process.
//
// Reset state: a full stage. The output holds the token, the completion is
// set, so U.e is low, and en is high. This is the state a stage is in just
// after it has taken a token and before its input returns to neutral.
//
// From the published design: an "Init State" block at the head of each ring. Its
// internals, its place inside the ring and the initial state are this
// design's own choices.
module token_init
  import tw_pkg::*;
#(
  parameter int unsigned INIT_STATE = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t u,
  output logic u_e,
  output tok_t t,
  input  logic t_e
);

  tok_t x;
  logic c, en;
  logic uv, tv;

  assign uv = |u;
  assign tv = |x;                 // output validity, taken ahead of the inverters

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x  <= tok_of(INIT_STATE);
      t  <= tok_of(INIT_STATE);
      c  <= 1'b1;
      en <= 1'b1;
    end else begin
      if (!en)      x <= '0;
      else if (uv)  x <= x | u;
      t <= x;
      if (uv && tv)        c <= 1'b1;
      else if (!uv && !tv) c <= 1'b0;
      if (!c && t_e)      en <= 1'b1;
      else if (c && !t_e) en <= 1'b0;
    end
  end

  assign u_e = ~c;

  a_t_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(t));

endmodule
