// rev_pkg: shared types for the reversible-logic library.
//
// A reversible gate maps n input lines one-to-one onto n output lines. The
// three-line gates (Peres, Toffoli, Fredkin, M, L, BJN, MFRG) share one
// bundle type so that a row of them can be brought out of the top level as
// plain struct ports.
package rev_pkg;

  // Three input lines A, B, C of a 3x3 gate (A is the most significant bit).
  typedef struct packed {
    logic a;
    logic b;
    logic c;
  } rev3_in_t;

  // Three output lines P, Q, R of a 3x3 gate.
  typedef struct packed {
    logic p;
    logic q;
    logic r;
  } rev3_out_t;

endpackage
