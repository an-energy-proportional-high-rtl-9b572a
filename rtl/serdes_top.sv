// Energy-proportional three-wire serial link: transmitter and receiver.
//
// The transmitter takes N-bit words and sends them bit by bit over three
// wires. Each bit is one pulse on a wire other than the one used for the
// previous bit. The receiver rebuilds the words from the order in which the
// wires pulse. Neither side has a clock or clock recovery. A token
// circulating in a ring of cells on each side sets the bit timing. So when
// no words are offered, both rings stop and the link draws no dynamic power.
// When a word arrives, the first pulse leaves 3 gate delays after the data
// reaches cell 0, with no wake-up time.
//
// The channel between the two sides is external. tx_bus shows the three
// wires' pulses before equalization. tx_line carries the
// equalized levels the transmitter drives. rx_line carries the levels that
// reach the receiver. Both are in mV relative to the 0.6 V line bias. For a
// loopback, connect them directly or through a channel model.
//
// Timing (clk = one gate delay): peak rate is N bits per 2*(N+1) gate delays.
// With 25 ps per gate delay, that is 1 bit per 50 ps (20 Gb/s) within a word,
// not counting the Init State hop.
module serdes_top
  import tw_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] tx_word,
  input  logic         tx_valid,
  output logic         tx_ready,
  output tok_t         tx_bus,
  output mv_t          tx_line [WIRES],
  input  mv_t          rx_line [WIRES],
  output logic [N-1:0] rx_word,
  output logic         rx_valid
);

  serdes_tx #(.N(N)) u_tx (
    .clk, .rst_n, .word(tx_word), .valid(tx_valid), .ready(tx_ready),
    .bus(tx_bus), .line(tx_line)
  );

  serdes_rx #(.N(N)) u_rx (
    .clk, .rst_n, .line(rx_line), .word(rx_word), .valid(rx_valid)
  );

endmodule
