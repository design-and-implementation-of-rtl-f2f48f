// rev_full_adder: one-bit reversible full adder made of two Peres gates.
//
// The first Peres gate takes (A, B, 0) and yields A xor B and AB; the second
// takes (A xor B, Cin, AB) and yields
//   Sum  = A xor B xor Cin
//   Cout = (A xor B)Cin xor AB
// The two first outputs of the gates, A and A xor B, are garbage lines G1 and
// G2; they are brought out so that the circuit keeps its one-to-one mapping.
// One constant input (0) is used. Purely combinational, no clock.
//
// The gate list and wiring follow the published two-Peres full adder.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic g1,
  output logic g2
);

  logic a_xor_b;
  logic a_and_b;

  rev_peres_gate u0 (
    .a(a), .b(b), .c(1'b0),
    .p(g1), .q(a_xor_b), .r(a_and_b)
  );

  rev_peres_gate u1 (
    .a(a_xor_b), .b(cin), .c(a_and_b),
    .p(g2), .q(sum), .r(cout)
  );

endmodule
