// Hamming (6,3) code generator built from three Feynman gates.
//
// Each gate takes two data bits, passes the first one through and produces their xor
// as a parity bit:
//   gate 1 (D1, D2) -> D1, P1 = D1 ^ D2
//   gate 2 (D2, D3) -> D2, P3 = D2 ^ D3
//   gate 3 (D3, D1) -> D3, P2 = D3 ^ D1
// The pass-through data outputs and the parity bits are then placed in the six-bit
// message by position: P1 P2 D1 P3 D2 D3 (see hamming63_pkg).
//
// Interface: data_i (D1..D3) in; codeword_o (positions 1..6) and parity_o (P1..P3) out.
// Timing: purely combinational. The gate pairing and equations follow the published
// circuit; the latency of the physical circuit is modelled outside, in hamming63_top.
module hamming63_generator
  import hamming63_pkg::*;
(
  input  data_t     data_i,
  output codeword_t codeword_o,
  output parity_t   parity_o
);

  data_t   data_pass;
  parity_t parity;

  feynman_gate u_fg_d1_d2 (
    .a_i (data_i.d1),
    .b_i (data_i.d2),
    .p_o (data_pass.d1),
    .q_o (parity.p1)
  );

  feynman_gate u_fg_d2_d3 (
    .a_i (data_i.d2),
    .b_i (data_i.d3),
    .p_o (data_pass.d2),
    .q_o (parity.p3)
  );

  feynman_gate u_fg_d3_d1 (
    .a_i (data_i.d3),
    .b_i (data_i.d1),
    .p_o (data_pass.d3),
    .q_o (parity.p2)
  );

  always_comb begin
    parity_o           = parity;
    codeword_o[POS_P1] = parity.p1;
    codeword_o[POS_P2] = parity.p2;
    codeword_o[POS_D1] = data_pass.d1;
    codeword_o[POS_P3] = parity.p3;
    codeword_o[POS_D2] = data_pass.d2;
    codeword_o[POS_D3] = data_pass.d3;
  end

endmodule
