// rev_decoder: reversible 2:4 decoder with enable, from one Feynman gate and
// three Fredkin gates.
//
// With enable S = 1, exactly the output X[{A,B}] is 1 (A is the more
// significant select bit); with S = 0 all four outputs are 0.
//
// Structure:
//   Feynman(B, 0)       copies B onto two lines (no plain fan-out is allowed)
//   Fredkin(A, S, 0)    steers S: Q = A'S, R = AS
//   Fredkin(B, A'S, 0)  Q = B'A'S = X0, R = BA'S = X1
//   Fredkin(B, AS, 0)   Q = B'AS  = X2, R = BAS  = X3
// The P outputs of the three Fredkin gates (A, B, B) are garbage, returned on
// garbage[2:0]. Four constant inputs are used. Purely combinational.
//
// The truth table, the port names and the use of Feynman and Fredkin gates
// follow the published decoder. Its two-Fredkin arrangement cannot form the
// three-input products X0..X3 from A, B and S, so the gate arrangement here,
// with a third Fredkin gate that ANDs the enable in first, is this design's
// own.
module rev_decoder (
  input  logic       s,
  input  logic       a,
  input  logic       b,
  output logic [3:0] x,
  output logic [2:0] garbage
);

  logic b_copy0;
  logic b_copy1;
  logic en_lo;   // A'S
  logic en_hi;   // AS

  rev_feynman_gate u_fg (
    .a(b), .b(1'b0),
    .p(b_copy0), .q(b_copy1)
  );

  rev_fredkin_gate u_frg_a (
    .a(a), .b(s), .c(1'b0),
    .p(garbage[0]), .q(en_lo), .r(en_hi)
  );

  rev_fredkin_gate u_frg_lo (
    .a(b_copy0), .b(en_lo), .c(1'b0),
    .p(garbage[1]), .q(x[0]), .r(x[1])
  );

  rev_fredkin_gate u_frg_hi (
    .a(b_copy1), .b(en_hi), .c(1'b0),
    .p(garbage[2]), .q(x[2]), .r(x[3])
  );

endmodule
