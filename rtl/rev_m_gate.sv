// rev_m_gate: 3x3 M gate. With C = 0 it produces the equality term (A xor B)' and the greater-than term AB' of a one-bit comparison.
//
// Purely combinational, no clock or reset; outputs follow the inputs after
// the gate delay. The mapping (A,B,C) -> (P,Q,R) is a bijection, so the
// input can always be recovered from the output.
//
//   P = A,  Q = (A xor B)',  R = AB' xor C
//
// Ports: a, b, c are the gate inputs A, B, C; p, q, r the outputs P, Q, R.
// The equations are the ones stated for this gate; nothing here is added.
module rev_m_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = ~(a ^ b);
  assign r = (a & ~b) ^ c;

endmodule
