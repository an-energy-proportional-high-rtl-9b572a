// Receiver cell: a sense amplifier and a receiver process.
//
// The token from the previous stage enables the sense amplifier and feeds
// the process. The token returning to neutral clears the amplifier. Token
// latency through the cell is 2 gate delays once the wire pulse is present:
// 1 for the capture and 1 for the next state.
module rx_cell
  import tw_pkg::*;
#(
  parameter int THRESH_MV = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  mv_t  line [WIRES],
  input  tok_t u,
  output logic u_e,
  output tok_t t,
  input  logic t_e,
  output logic bit_o,
  output logic bit_stb
);

  dr_t d;

  rx_sense_amp #(.THRESH_MV(THRESH_MV)) u_sa (
    .clk, .rst_n, .line, .u, .d
  );

  rx_process u_proc (
    .clk, .rst_n, .u, .u_e, .d, .t, .t_e, .bit_o, .bit_stb
  );

endmodule
