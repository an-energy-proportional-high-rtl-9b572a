// Receiver: token ring of sense amplifier cells and the word output.
//
// Like the transmitter, the ring is an Init State stage and N receiver
// cells, with one token that carries the state of the link. Cell i holds the
// token until a pulse appears on one of the two wires that the state allows.
// It then records the bit and passes the new state on. Nothing is clocked or
// recovered from the line. The arrival of pulses drives the ring, and with
// no pulses the token waits and nothing switches.
//
// Timing at unit gate delay: 2 gate delays per hop, 2*(N+1) per word, the
// same as the transmitter, so a receiver that starts together with the
// transmitter keeps pace with it at the peak rate. The word appears on
// word/valid 1 gate delay after the last cell fires.
module serdes_rx
  import tw_pkg::*;
#(
  parameter int unsigned N         = 16,
  parameter int          THRESH_MV = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mv_t          line [WIRES],
  output logic [N-1:0] word,
  output logic         valid
);

  tok_t tok [N+1];
  logic ack [N+1];
  logic init_ue;
  logic [N-1:0] bits, stb;

  token_init #(.INIT_STATE(0)) u_init (
    .clk, .rst_n, .u(tok[N]), .u_e(init_ue), .t(tok[0]), .t_e(ack[0])
  );
  assign ack[N] = init_ue;

  for (genvar i = 0; i < N; i++) begin : g_cell
    rx_cell #(.THRESH_MV(THRESH_MV)) u_cell (
      .clk, .rst_n, .line,
      .u(tok[i]), .u_e(ack[i]),
      .t(tok[i+1]), .t_e(ack[i+1]),
      .bit_o(bits[i]), .bit_stb(stb[i])
    );
  end

  rx_word_if #(.N(N)) u_out (
    .clk, .rst_n, .bit_i(bits), .bit_stb(stb), .word, .valid
  );

endmodule
