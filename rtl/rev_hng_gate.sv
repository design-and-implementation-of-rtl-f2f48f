// rev_hng_gate: 4x4 HNG gate (quantum cost 6).
//
// Purely combinational. With D tied to 0 a single gate is a full adder: R is
// the sum of A, B and C and S the carry, while P and Q return A and B so the
// mapping stays one-to-one. This is the cell of the ripple-carry adder.
//
//   P = A,  Q = B,  R = A xor B xor C,  S = (A xor B)C xor AB xor D
//
// Ports: a, b, c, d are the inputs A..D; p, q, r, s the outputs P..S.
module rev_hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic a_xor_b;

  assign a_xor_b = a ^ b;
  assign p = a;
  assign q = b;
  assign r = a_xor_b ^ c;
  assign s = (a_xor_b & c) ^ (a & b) ^ d;

endmodule
