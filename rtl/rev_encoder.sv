// rev_encoder: reversible 4:2 encoder from two Fredkin gates.
//
// For a one-hot input I[3:0] the output Y = {Y1, Y0} is the index of the set
// bit. Y0 = I1 + I3 and Y1 = I2 + I3, each formed by one Fredkin gate with its
// third input tied to 1:
//   Fredkin(I3, I1, 1)  Q = I3'I1 + I3 = Y0,  R = I3' + I1 = G3
//   Fredkin(I3, I2, 1)  Q = I3'I2 + I3 = Y1,  R = I3' + I2 = G4
// The second gate takes I3 from the first gate's P output; its own P output
// is G2. I0 is not needed to encode and passes straight out as G1.
// garbage = {G4, G3, G2, G1}. For an all-zero input Y is 0 (the truth table
// leaves it undefined). Inputs with more than one bit set give the OR of the
// indices. Purely combinational.
//
// Gates, wiring and garbage names follow the published encoder.
module rev_encoder (
  input  logic [3:0] i,
  output logic [1:0] y,
  output logic [3:0] garbage
);

  logic i3_pass;

  assign garbage[0] = i[0];

  rev_fredkin_gate u0 (
    .a(i[3]), .b(i[1]), .c(1'b1),
    .p(i3_pass), .q(y[0]), .r(garbage[2])
  );

  rev_fredkin_gate u1 (
    .a(i3_pass), .b(i[2]), .c(1'b1),
    .p(garbage[1]), .q(y[1]), .r(garbage[3])
  );

endmodule
