// rev_mfrg_gate: 3x3 modified Fredkin gate (MFRG). It is a controlled swap like the Fredkin gate, but with its two data outputs exchanged: with A = 0 the lines B and C come out crossed, with A = 1 straight. The equations are the usual published definition of this gate; they are this design's choice, as only the gate's name is given with the multiplexer it builds.
//
// Purely combinational, no clock or reset; outputs follow the inputs after
// the gate delay. The mapping (A,B,C) -> (P,Q,R) is a bijection, so the
// input can always be recovered from the output.
//
//   P = A,  Q = AB + A'C,  R = AC + A'B
//
// Ports: a, b, c are the gate inputs A, B, C; p, q, r the outputs P, Q, R.
// The equations are the ones stated for this gate; nothing here is added.
module rev_mfrg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = (a & b) | (~a & c);
  assign r = (a & c) | (~a & b);

endmodule
