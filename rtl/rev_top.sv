// rev_top: the reversible combinational circuits side by side.
//
// The circuits are independent of one another, so the top level only places
// each of them and brings all of its lines out, garbage lines included, so
// that every circuit keeps its one-to-one mapping. Besides the seven
// circuits (HNG ripple-carry adder, Peres full adder, comparator, decoder,
// encoder, multiplexer, demultiplexer) each primitive gate is also placed
// once on its own, with the 3x3 gates using the rev3_in_t / rev3_out_t
// bundles: Feynman, HNG, Peres, Toffoli, Fredkin, M, L, BJN and MFRG.
//
// Everything is combinational: there is no clock and no reset, and every
// output settles one gate chain after its inputs change. The deepest path is
// the carry chain of the adder, ADDER_WIDTH HNG gates long.
//
// ADDER_WIDTH defaults to the four bits of the published adder.
module rev_top
  import rev_pkg::*;
#(
  parameter int unsigned ADDER_WIDTH = 4
) (
  // HNG ripple-carry adder
  input  logic [ADDER_WIDTH-1:0]   add_a,
  input  logic [ADDER_WIDTH-1:0]   add_b,
  input  logic                     add_cin,
  output logic [ADDER_WIDTH-1:0]   add_sum,
  output logic                     add_cout,
  output logic [2*ADDER_WIDTH-1:0] add_garbage,
  // Peres full adder
  input  logic                     fa_a,
  input  logic                     fa_b,
  input  logic                     fa_cin,
  output logic                     fa_sum,
  output logic                     fa_cout,
  output logic [1:0]               fa_garbage,
  // one-bit comparator
  input  logic                     cmp_a,
  input  logic                     cmp_b,
  output logic                     cmp_eq,
  output logic                     cmp_gt,
  output logic                     cmp_lt,
  output logic                     cmp_garbage,
  // 2:4 decoder
  input  logic                     dec_s,
  input  logic                     dec_a,
  input  logic                     dec_b,
  output logic [3:0]               dec_x,
  output logic [2:0]               dec_garbage,
  // 4:2 encoder
  input  logic [3:0]               enc_i,
  output logic [1:0]               enc_y,
  output logic [3:0]               enc_garbage,
  // 4:1 multiplexer
  input  logic [1:0]               mux_s,
  input  logic [3:0]               mux_i,
  output logic                     mux_y,
  output logic [4:0]               mux_garbage,
  // 1:4 demultiplexer
  input  logic                     dmx_din,
  input  logic                     dmx_en,
  input  logic                     dmx_s0,
  input  logic                     dmx_s1,
  output logic [3:0]               dmx_y,
  output logic [8:0]               dmx_garbage,
  // stand-alone gates
  input  logic [1:0]               fg_in,     // {A, B}
  output logic [1:0]               fg_out,    // {P, Q}
  input  logic [3:0]               hng_in,    // {A, B, C, D}
  output logic [3:0]               hng_out,   // {P, Q, R, S}
  input  rev3_in_t                 peres_in,
  output rev3_out_t                peres_out,
  input  rev3_in_t                 toffoli_in,
  output rev3_out_t                toffoli_out,
  input  rev3_in_t                 fredkin_in,
  output rev3_out_t                fredkin_out,
  input  rev3_in_t                 m_in,
  output rev3_out_t                m_out,
  input  rev3_in_t                 l_in,
  output rev3_out_t                l_out,
  input  rev3_in_t                 bjn_in,
  output rev3_out_t                bjn_out,
  input  rev3_in_t                 mfrg_in,
  output rev3_out_t                mfrg_out
);

  rev_adder_hng #(.WIDTH(ADDER_WIDTH)) u_adder (
    .a(add_a), .b(add_b), .cin(add_cin),
    .sum(add_sum), .cout(add_cout), .garbage(add_garbage)
  );

  rev_full_adder u_fa (
    .a(fa_a), .b(fa_b), .cin(fa_cin),
    .sum(fa_sum), .cout(fa_cout), .g1(fa_garbage[0]), .g2(fa_garbage[1])
  );

  rev_comparator u_cmp (
    .a(cmp_a), .b(cmp_b),
    .eq(cmp_eq), .gt(cmp_gt), .lt(cmp_lt), .g(cmp_garbage)
  );

  rev_decoder u_dec (
    .s(dec_s), .a(dec_a), .b(dec_b), .x(dec_x), .garbage(dec_garbage)
  );

  rev_encoder u_enc (
    .i(enc_i), .y(enc_y), .garbage(enc_garbage)
  );

  rev_mux u_mux (
    .s(mux_s), .i(mux_i), .y(mux_y), .garbage(mux_garbage)
  );

  rev_demux u_dmx (
    .din(dmx_din), .en(dmx_en), .s0(dmx_s0), .s1(dmx_s1),
    .y(dmx_y), .garbage(dmx_garbage)
  );

  rev_feynman_gate u_fg (
    .a(fg_in[1]), .b(fg_in[0]), .p(fg_out[1]), .q(fg_out[0])
  );

  rev_hng_gate u_hng (
    .a(hng_in[3]), .b(hng_in[2]), .c(hng_in[1]), .d(hng_in[0]),
    .p(hng_out[3]), .q(hng_out[2]), .r(hng_out[1]), .s(hng_out[0])
  );

  rev_peres_gate u_peres (
    .a(peres_in.a), .b(peres_in.b), .c(peres_in.c),
    .p(peres_out.p), .q(peres_out.q), .r(peres_out.r)
  );

  rev_toffoli_gate u_toffoli (
    .a(toffoli_in.a), .b(toffoli_in.b), .c(toffoli_in.c),
    .p(toffoli_out.p), .q(toffoli_out.q), .r(toffoli_out.r)
  );

  rev_fredkin_gate u_fredkin (
    .a(fredkin_in.a), .b(fredkin_in.b), .c(fredkin_in.c),
    .p(fredkin_out.p), .q(fredkin_out.q), .r(fredkin_out.r)
  );

  rev_m_gate u_m (
    .a(m_in.a), .b(m_in.b), .c(m_in.c),
    .p(m_out.p), .q(m_out.q), .r(m_out.r)
  );

  rev_l_gate u_l (
    .a(l_in.a), .b(l_in.b), .c(l_in.c),
    .p(l_out.p), .q(l_out.q), .r(l_out.r)
  );

  rev_bjn_gate u_bjn (
    .a(bjn_in.a), .b(bjn_in.b), .c(bjn_in.c),
    .p(bjn_out.p), .q(bjn_out.q), .r(bjn_out.r)
  );

  rev_mfrg_gate u_mfrg (
    .a(mfrg_in.a), .b(mfrg_in.b), .c(mfrg_in.c),
    .p(mfrg_out.p), .q(mfrg_out.q), .r(mfrg_out.r)
  );

endmodule
