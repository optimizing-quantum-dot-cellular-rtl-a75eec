// Hamming (6,3) error detector built from six Feynman gates in two stages.
//
// The first stage is the generator's gate set: it recomputes D1^D2, D2^D3 and D3^D1
// from the received data bits and passes D1, D2, D3 through. In the second stage each
// recomputed pair drives the A input of a gate whose B input is the received parity
// bit, so the gate's xor output is an error-detector parity (EDP) bit:
//   EDP1 = P1 ^ D1 ^ D2
//   EDP2 = P2 ^ D1 ^ D3
//   EDP3 = P3 ^ D2 ^ D3
// All three are zero for a valid code word; any single-bit error makes at least one
// of them one. The second-stage A outputs (the recomputed pairs) are garbage outputs
// of the reversible circuit and are brought out as pair_o.
//
// Interface: codeword_i (positions 1..6: P1 P2 D1 P3 D2 D3) in; edp_o (EDP1..EDP3),
// data_o (D1..D3 passed through) and pair_o out.
// Timing: purely combinational. The gate structure and equations follow the published
// circuit; naming the garbage outputs by function is this design's choice, and the
// latency of the physical circuit is modelled outside, in hamming63_top.
module hamming63_detector
  import hamming63_pkg::*;
(
  input  codeword_t codeword_i,
  output edp_t      edp_o,
  output data_t     data_o,
  output pair_t     pair_o
);

  data_t   rx_data;
  parity_t rx_parity;
  pair_t   pair_new;

  always_comb begin
    rx_data.d1   = codeword_i[POS_D1];
    rx_data.d2   = codeword_i[POS_D2];
    rx_data.d3   = codeword_i[POS_D3];
    rx_parity.p1 = codeword_i[POS_P1];
    rx_parity.p2 = codeword_i[POS_P2];
    rx_parity.p3 = codeword_i[POS_P3];
  end

  // First stage: recompute the data pairs.
  feynman_gate u_fg_d1_d2 (
    .a_i (rx_data.d1),
    .b_i (rx_data.d2),
    .p_o (data_o.d1),
    .q_o (pair_new.d1_x_d2)
  );

  feynman_gate u_fg_d2_d3 (
    .a_i (rx_data.d2),
    .b_i (rx_data.d3),
    .p_o (data_o.d2),
    .q_o (pair_new.d2_x_d3)
  );

  feynman_gate u_fg_d3_d1 (
    .a_i (rx_data.d3),
    .b_i (rx_data.d1),
    .p_o (data_o.d3),
    .q_o (pair_new.d3_x_d1)
  );

  // Second stage: compare each recomputed pair with its received parity bit.
  feynman_gate u_fg_edp1 (
    .a_i (pair_new.d1_x_d2),
    .b_i (rx_parity.p1),
    .p_o (pair_o.d1_x_d2),
    .q_o (edp_o.edp1)
  );

  feynman_gate u_fg_edp3 (
    .a_i (pair_new.d2_x_d3),
    .b_i (rx_parity.p3),
    .p_o (pair_o.d2_x_d3),
    .q_o (edp_o.edp3)
  );

  feynman_gate u_fg_edp2 (
    .a_i (pair_new.d3_x_d1),
    .b_i (rx_parity.p2),
    .p_o (pair_o.d3_x_d1),
    .q_o (edp_o.edp2)
  );

endmodule
