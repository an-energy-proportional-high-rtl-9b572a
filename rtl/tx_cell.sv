// Transmitter cell: a tx process and its driver.
//
// The token leaving the process goes to the next ring stage and, in parallel,
// to the driver. The driver turns it into a pulse on one wire of the shared
// bus. Token latency through the cell is 2 gate delays. The driver's pulse
// starts 1 gate delay after the cell's token appears.
module tx_cell
  import tw_pkg::*;
#(
  parameter int unsigned PULSE_W = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t u,
  output logic u_e,
  input  dr_t  l,
  output logic l_e,
  output tok_t t,
  input  logic t_e,
  output tok_t pulse
);

  tx_process u_proc (
    .clk, .rst_n, .u, .u_e, .l, .l_e, .t, .t_e
  );

  tx_driver #(.PULSE_W(PULSE_W)) u_drv (
    .clk, .rst_n, .t, .pulse
  );

endmodule
