// rev_feynman_gate: 2x2 Feynman gate, also called controlled NOT (quantum
// cost 1).
//
// Purely combinational. B is inverted when A is set; A passes through. With
// B tied to 0 the gate copies A onto two lines, which is how reversible
// circuits obtain fan-out (a plain wire may not fan out). With B tied to 1
// it yields A and its complement.
//
//   P = A,  Q = A xor B
//
// Ports: a, b are the inputs A, B; p, q the outputs P, Q.
module rev_feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
