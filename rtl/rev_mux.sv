// rev_mux: reversible 4:1 multiplexer from three modified Fredkin (MFRG)
// gates.
//
// Y = I[{S1,S0}]. Two MFRG gates controlled by S0 pick I0/I1 and I2/I3; a
// third, controlled by S1, picks between the two results:
//   MFRG(S0, I0, I1)      R = S0'I0 + S0 I1          Q = G1, P -> next gate
//   MFRG(S0, I2, I3)      R = S0'I2 + S0 I3          P = G2, Q = G3
//   MFRG(S1, m01, m23)    R = S1'm01 + S1 m23 = Y    P = G4, Q = G5
// The second gate takes S0 from the first gate's P output, as a copy, since a
// line may not fan out. garbage = {G5, G4, G3, G2, G1}. Purely combinational.
//
// The gate count, input order, the S0 line passed from the first gate to the
// second and the garbage count follow the published multiplexer. With the
// MFRG equations used here the selected data appears on R of every gate, so
// the first two gates hand R (not Q) to the third; that pin choice is this
// design's own.
module rev_mux (
  input  logic [1:0] s,
  input  logic [3:0] i,
  output logic       y,
  output logic [4:0] garbage
);

  logic s0_pass;
  logic m01;
  logic m23;

  rev_mfrg_gate u0 (
    .a(s[0]), .b(i[0]), .c(i[1]),
    .p(s0_pass), .q(garbage[0]), .r(m01)
  );

  rev_mfrg_gate u1 (
    .a(s0_pass), .b(i[2]), .c(i[3]),
    .p(garbage[1]), .q(garbage[2]), .r(m23)
  );

  rev_mfrg_gate u2 (
    .a(s[1]), .b(m01), .c(m23),
    .p(garbage[3]), .q(garbage[4]), .r(y)
  );

endmodule
