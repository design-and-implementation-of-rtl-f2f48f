// rev_comparator: one-bit reversible magnitude comparator from an M gate and
// an L gate.
//
// M(A, B, 0) gives Q = (A xor B)' (equal) and R = AB' (A greater). These feed
// the first two lines of L(eq, gt, 0), which passes them on as P and Q and
// forms R = (eq + gt)' = A'B (A less). The M gate's P output, a copy of A, is
// the only garbage line. Two constant 0 inputs are used.
//
//   eq = (A = B),  gt = (A > B),  lt = (A < B); exactly one is 1.
//
// Purely combinational. Gates and wiring follow the published design.
module rev_comparator (
  input  logic a,
  input  logic b,
  output logic eq,
  output logic gt,
  output logic lt,
  output logic g
);

  logic m_eq;
  logic m_gt;

  rev_m_gate u_m (
    .a(a), .b(b), .c(1'b0),
    .p(g), .q(m_eq), .r(m_gt)
  );

  rev_l_gate u_l (
    .a(m_eq), .b(m_gt), .c(1'b0),
    .p(eq), .q(gt), .r(lt)
  );

endmodule
