// Feynman gate: the 2-input, 2-output reversible gate (controlled NOT).
//
// Output P repeats input A; output Q is A xor B. The map (A,B) -> (P,Q) is one-to-one,
// so no input information is lost, which is what makes the gate reversible. It is the
// only gate of the Hamming (6,3) generator and detector.
//
// Interface: a_i, b_i in; p_o = a_i, q_o = a_i ^ b_i out.
// Timing: purely combinational. The function and port roles follow the published gate;
// the physical cell layout it is normally drawn as is not modelled here.
module feynman_gate (
  input  logic a_i,
  input  logic b_i,
  output logic p_o,
  output logic q_o
);

  always_comb begin
    p_o = a_i;
    q_o = a_i ^ b_i;
  end

endmodule
