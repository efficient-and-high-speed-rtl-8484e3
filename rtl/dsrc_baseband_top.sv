// Line-coding part of the baseband processing of a DSRC transceiver.
//
// A DSRC transceiver has a transmit path and a receive path, each made of a
// baseband processor and an RF front-end, both under a microprocessor. This
// top holds the digital line coding of the two baseband processors:
//   transmit: the SOLS FM0/Manchester encoder (sols_encoder), whose line
//             output goes to the transmit RF front-end;
//   receive:  the FM0/Manchester decoder (line_decoder), fed with the
//             sampled output of the receive RF front-end.
// The RF front-ends and the microprocessor are outside; their signals are
// the ports. The two paths are independent: each has its own clock, reset
// and code selection, which the microprocessor would set.
//
// Timing: see sols_encoder (Manchester without latency, FM0 one bit cycle
// later) and line_decoder (one bit per two sampling-clock edges, result
// registered at the second-half sample).
module dsrc_baseband_top
  import dsrc_codec_pkg::*;
(
  // transmit path
  input  logic       tx_clk,
  input  logic       tx_rst_n,
  input  code_mode_e tx_mode,
  input  logic       tx_data,
  output logic       tx_line,
  // receive path
  input  logic       rx_clk,
  input  logic       rx_rst_n,
  input  code_mode_e rx_mode,
  input  logic       rx_first_half,
  input  logic       rx_line,
  output logic       rx_bit_valid,
  output logic       rx_bit,
  output logic       rx_violation
);

  sols_encoder u_encoder (
    .clk   (tx_clk),
    .rst_n (tx_rst_n),
    .mode  (tx_mode),
    .x     (tx_data),
    .line  (tx_line)
  );

  line_decoder u_decoder (
    .clk        (rx_clk),
    .rst_n      (rx_rst_n),
    .mode       (rx_mode),
    .first_half (rx_first_half),
    .line_in    (rx_line),
    .bit_valid  (rx_bit_valid),
    .bit_out    (rx_bit),
    .violation  (rx_violation)
  );

endmodule : dsrc_baseband_top
