// rev_l_gate: 3x3 L gate. It passes A and B and inverts C when neither A nor B is set.
//
// Purely combinational, no clock or reset; outputs follow the inputs after
// the gate delay. The mapping (A,B,C) -> (P,Q,R) is a bijection, so the
// input can always be recovered from the output.
//
//   P = A,  Q = B,  R = (A + B)' xor C
//
// Ports: a, b, c are the gate inputs A, B, C; p, q, r the outputs P, Q, R.
// The equations are the ones stated for this gate; nothing here is added.
module rev_l_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = b;
  assign r = ~(a | b) ^ c;

endmodule
