// Hamming (6,3) link ends: the transmit-side code generator and the receive-side error
// detector, each timed at the latency of its clock-zoned circuit.
//
// Transmit side: three data bits D1..D3 are encoded combinationally by
// hamming63_generator into a six-bit message (positions 1..6: P1 P2 D1 P3 D2 D3) and
// leave through a GEN_ZONES-stage qca_zone_pipe. Receive side: a six-bit message is
// checked combinationally by hamming63_detector and its EDP1..EDP3 bits, together with
// the data bits the detector passes through, leave through a DET_ZONES-stage
// qca_zone_pipe. A message with rx_edp_o = 0 is a valid code word; any single-bit error
// gives a nonzero rx_edp_o.
//
// The channel between the two ends is not part of this design: tx_codeword_o and
// rx_codeword_i are separate ports, so a link, a loopback or an error source can be put
// between them outside.
//
// Timing: clk ticks once per QCA clock zone. A word accepted with tx_valid_i at a rising
// edge is on tx_codeword_o with tx_valid_o GEN_ZONES edges later; a message accepted
// with rx_valid_i is checked on rx_edp_o with rx_valid_o DET_ZONES edges later. Both
// sides accept one word per tick. The defaults, 2 and 3 zones, are the published
// latencies of 0.5 ns and 0.75 ns at 0.25 ns per zone; the zone period is this design's
// assumption, as are the valid flags and the asynchronous active-low reset.
module hamming63_top
  import hamming63_pkg::*;
#(
  parameter int unsigned GEN_ZONES = 2,
  parameter int unsigned DET_ZONES = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  // transmit side
  input  logic      tx_valid_i,
  input  data_t     tx_data_i,
  output logic      tx_valid_o,
  output codeword_t tx_codeword_o,
  // receive side
  input  logic      rx_valid_i,
  input  codeword_t rx_codeword_i,
  output logic      rx_valid_o,
  output edp_t      rx_edp_o,
  output data_t     rx_data_o
);

  // ---- transmit: generator, then its clock zones ----
  codeword_t gen_codeword;

  hamming63_generator u_generator (
    .data_i     (tx_data_i),
    .codeword_o (gen_codeword),
    .parity_o   ()
  );

  qca_zone_pipe #(
    .WIDTH  (CODE_BITS),
    .STAGES (GEN_ZONES)
  ) u_gen_zones (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (tx_valid_i),
    .data_i  (gen_codeword),
    .valid_o (tx_valid_o),
    .data_o  (tx_codeword_o)
  );

  // ---- receive: detector, then its clock zones ----
  edp_t  det_edp;
  data_t det_data;

  hamming63_detector u_detector (
    .codeword_i (rx_codeword_i),
    .edp_o      (det_edp),
    .data_o     (det_data),
    .pair_o     ()
  );

  qca_zone_pipe #(
    .WIDTH  (EDP_BITS + DATA_BITS),
    .STAGES (DET_ZONES)
  ) u_det_zones (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (rx_valid_i),
    .data_i  ({det_edp, det_data}),
    .valid_o (rx_valid_o),
    .data_o  ({rx_edp_o, rx_data_o})
  );

endmodule
