// rev_demux: reversible 1:4 demultiplexer with enable, from four Toffoli and
// five Peres gates.
//
// With E = 1 the data input Din appears on output Y[{S0,S1}] (S0 is the more
// significant select bit) and the other outputs are 0; with E = 0 all
// outputs are 0.
//
// Structure:
//   Peres(Din, E, 0) forms the gated data DE = Din·E on R.
//   A chain of four Toffoli gates, each T(S0, S1, 0), forms one select
//   minterm on R per gate. Between the gates the select lines are inverted
//   in place by NOT gates (1x1 reversible gates): S1 after the first gate,
//   S0 after the second, S1 after the third, so the gates see (S0,S1),
//   (S0,S1'), (S0',S1') and (S0',S1): minterms for Y3, Y2, Y0 and Y1.
//   A chain of four Peres gates, each Peres(DE, minterm, 0), gives
//   R = DE·minterm = Y and hands DE on through P to the next gate.
// The nine garbage lines are: P, Q of the first Peres gate; Q of each of the
// four output Peres gates; P of the last of them; P, Q of the last Toffoli
// gate. Purely combinational.
//
// Gate types, counts, the Toffoli and Peres chains, the output order Y3, Y2,
// Y0, Y1 along the chain and the nine garbage lines follow the published
// demultiplexer. Reading its inversion marks as in-line NOT gates, and so
// S0 as the more significant select bit, is this design's interpretation.
module rev_demux (
  input  logic       din,
  input  logic       en,
  input  logic       s0,
  input  logic       s1,
  output logic [3:0] y,
  output logic [8:0] garbage
);

  // Select lines between the Toffoli gates: sel_a[k] / sel_b[k] enter gate k.
  logic [3:0] sel_a;      // S0 line
  logic [3:0] sel_b;      // S1 line
  logic [3:0] t_pa;       // P of Toffoli gate k
  logic [3:0] t_qb;       // Q of Toffoli gate k
  logic [3:0] minterm;    // R of Toffoli gate k, in chain order
  logic [4:0] de;         // gated data entering output Peres gate k
  logic [3:0] y_chain;    // outputs in chain order: Y3, Y2, Y0, Y1

  // Input Peres gate: R = Din·E.
  rev_peres_gate u_p_in (
    .a(din), .b(en), .c(1'b0),
    .p(garbage[0]), .q(garbage[1]), .r(de[0])
  );

  assign sel_a[0] = s0;
  assign sel_b[0] = s1;
  // In-line NOT gates between the Toffoli gates.
  assign sel_a[1] = t_pa[0];
  assign sel_b[1] = ~t_qb[0];
  assign sel_a[2] = ~t_pa[1];
  assign sel_b[2] = t_qb[1];
  assign sel_a[3] = t_pa[2];
  assign sel_b[3] = ~t_qb[2];

  for (genvar k = 0; k < 4; k++) begin : g_stage
    rev_toffoli_gate u_t (
      .a(sel_a[k]), .b(sel_b[k]), .c(1'b0),
      .p(t_pa[k]), .q(t_qb[k]), .r(minterm[k])
    );
    rev_peres_gate u_p (
      .a(de[k]), .b(minterm[k]), .c(1'b0),
      .p(de[k+1]), .q(garbage[2+k]), .r(y_chain[k])
    );
  end

  assign garbage[6] = de[4];
  assign garbage[7] = t_pa[3];
  assign garbage[8] = t_qb[3];

  assign y[3] = y_chain[0];
  assign y[2] = y_chain[1];
  assign y[0] = y_chain[2];
  assign y[1] = y_chain[3];

endmodule
