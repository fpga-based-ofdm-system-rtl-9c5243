// ofdm_top: the complete OFDM link, transmitter and receiver side by side.
//
// The transmitter takes a serial data bit stream and produces a serial
// stream of OFDM samples; the receiver takes such a stream and returns the
// data bits. Between them the original system has antennas, an RF front end
// and a radio channel, which are not digital logic: their connection points
// are ports here (chan_tx_* leaves the transmitter, chan_rx_* enters the
// receiver). Tying chan_tx_* to chan_rx_* gives an ideal channel and the
// output bit stream then equals the input bit stream.
// All ports use a valid/ready handshake, one bit per transfer. Steady-state
// rate is one OFDM symbol (32 data bits, 256 channel bits) per 256 cycles.
// Synchronous active-high reset.
module ofdm_top (
  input  logic clk,
  input  logic rst,
  // data bits into the transmitter
  input  logic data_in_valid,
  output logic data_in_ready,
  input  logic data_in_bit,
  // transmitter output towards the channel
  output logic chan_tx_valid,
  input  logic chan_tx_ready,
  output logic chan_tx_bit,
  // receiver input from the channel
  input  logic chan_rx_valid,
  output logic chan_rx_ready,
  input  logic chan_rx_bit,
  // data bits out of the receiver
  output logic data_out_valid,
  input  logic data_out_ready,
  output logic data_out_bit
);

  ofdm_tx u_tx (
    .clk, .rst,
    .in_valid (data_in_valid), .in_ready (data_in_ready), .in_bit (data_in_bit),
    .out_valid(chan_tx_valid), .out_ready(chan_tx_ready), .out_bit(chan_tx_bit)
  );

  ofdm_rx u_rx (
    .clk, .rst,
    .in_valid (chan_rx_valid),  .in_ready (chan_rx_ready),  .in_bit (chan_rx_bit),
    .out_valid(data_out_valid), .out_ready(data_out_ready), .out_bit(data_out_bit)
  );

endmodule
