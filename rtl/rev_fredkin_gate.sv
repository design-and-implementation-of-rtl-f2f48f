// rev_fredkin_gate: 3x3 Fredkin gate, a controlled swap (quantum cost 5). With A = 0 the lines B and C pass straight through; with A = 1 they are exchanged.
//
// Purely combinational, no clock or reset; outputs follow the inputs after
// the gate delay. The mapping (A,B,C) -> (P,Q,R) is a bijection, so the
// input can always be recovered from the output.
//
//   P = A,  Q = A'B + AC,  R = A'C + AB
//
// Ports: a, b, c are the gate inputs A, B, C; p, q, r the outputs P, Q, R.
// The equations are the ones stated for this gate; nothing here is added.
module rev_fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (~a & c) | (a & b);

endmodule
