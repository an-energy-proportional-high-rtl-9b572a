// Transmitter: token ring, shared three-wire bus and equalizer.
//
// The ring is an Init State stage followed by N transmitter cells, with the
// last cell closing back onto the Init State stage. One token circulates. It
// carries the link state, the wire that carried the previous bit. Cell i
// waits for both the token and bit i of the current word. It then computes
// the next state, passes it on and pulses the matching wire. With no data the
// token simply waits in the cell and nothing switches, so the transmitter is
// idle without any wake-up cost.
//
// Timing at unit gate delay (clk = one gate delay): one hop costs 2 gate
// delays, so a revolution of N bits takes 2*(N+1) gate delays, 34 for N = 16.
// A cell's pulse reaches the bus 3 gate delays after its token input. It
// reaches the line, through the equalizer, after 4.
//
// The bus is the OR of all cells' pulses per wire. The protocol never puts
// two consecutive bits on one wire, and a pulse is shorter than two bit
// times, so no two cells drive a wire at once. An assertion checks this.
module serdes_tx
  import tw_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter int unsigned PULSE_W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] word,
  input  logic         valid,
  output logic         ready,
  output tok_t         bus,
  output mv_t          line [WIRES]
);

  tok_t tok   [N+1];   // tok[0]: Init State -> cell 0; tok[i+1]: cell i out
  logic ack   [N+1];   // ack[i]: U.e of the stage that receives tok[i]
  logic init_ue;
  dr_t  l     [N];
  logic [N-1:0] l_e;
  tok_t pulse [N];

  tx_word_if #(.N(N)) u_in (
    .clk, .rst_n, .word, .valid, .ready, .l, .l_e
  );

  token_init #(.INIT_STATE(0)) u_init (
    .clk, .rst_n, .u(tok[N]), .u_e(init_ue), .t(tok[0]), .t_e(ack[0])
  );
  assign ack[N] = init_ue;

  for (genvar i = 0; i < N; i++) begin : g_cell
    tx_cell #(.PULSE_W(PULSE_W)) u_cell (
      .clk, .rst_n,
      .u(tok[i]), .u_e(ack[i]),
      .l(l[i]), .l_e(l_e[i]),
      .t(tok[i+1]), .t_e(ack[i+1]),
      .pulse(pulse[i])
    );
  end

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++) bus |= pulse[i];
  end

  ct_ffe u_ffe (.clk, .rst_n, .pulse(bus), .level(line));

  // No two cells pulse the same wire at the same time.
  always_comb begin
    for (int w = 0; w < WIRES; w++) begin
      int n;
      n = 0;
      for (int i = 0; i < N; i++) n += int'(pulse[i][w]);
      a_bus_excl: assert (!rst_n || n <= 1);
    end
  end

endmodule
