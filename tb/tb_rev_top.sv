// tb_rev_top: end-to-end self-checking testbench for rev_top at its default
// parameters.
//
// One loop walks a counter v through 512 values and derives every circuit's
// inputs from its bits, so each circuit sees each of its input combinations
// (the adder all 512, the others theirs several times over). Every output is
// compared with a reference computed here from arithmetic or from the truth
// tables: sums, comparisons, one-hot decoding, encoding, selection and
// distribution. The stand-alone gates are checked against their equations.
//
// The testbench also counts how often each behaviour of the circuits
// happens and fails if one never does: adder carry out, a carry rippling
// through every adder stage, each comparator result, decoder and
// demultiplexer disabled by their enable, each decoder, multiplexer and
// demultiplexer output selected, the encoder's four codes, and the
// Fredkin/MFRG swap and pass cases.
module tb_rev_top;
  import rev_pkg::*;

  localparam int unsigned W = 4;   // default adder width of rev_top

  logic [W-1:0]   add_a, add_b, add_sum;
  logic           add_cin, add_cout;
  logic [2*W-1:0] add_garbage;
  logic           fa_a, fa_b, fa_cin, fa_sum, fa_cout;
  logic [1:0]     fa_garbage;
  logic           cmp_a, cmp_b, cmp_eq, cmp_gt, cmp_lt, cmp_garbage;
  logic           dec_s, dec_a, dec_b;
  logic [3:0]     dec_x;
  logic [2:0]     dec_garbage;
  logic [3:0]     enc_i, enc_garbage;
  logic [1:0]     enc_y;
  logic [1:0]     mux_s;
  logic [3:0]     mux_i;
  logic           mux_y;
  logic [4:0]     mux_garbage;
  logic           dmx_din, dmx_en, dmx_s0, dmx_s1;
  logic [3:0]     dmx_y;
  logic [8:0]     dmx_garbage;
  logic [1:0]     fg_in, fg_out;
  logic [3:0]     hng_in, hng_out;
  rev3_in_t       peres_in, toffoli_in, fredkin_in, m_in, l_in, bjn_in, mfrg_in;
  rev3_out_t      peres_out, toffoli_out, fredkin_out, m_out, l_out, bjn_out, mfrg_out;

  rev_top dut (.*);

  int checks   = 0;
  int failures = 0;

  // Behaviour counters.
  typedef enum int {
    EV_ADD_COUT, EV_ADD_RIPPLE, EV_FA_COUT,
    EV_CMP_EQ, EV_CMP_GT, EV_CMP_LT,
    EV_DEC_OFF, EV_DEC_X0, EV_DEC_X1, EV_DEC_X2, EV_DEC_X3,
    EV_ENC_0, EV_ENC_1, EV_ENC_2, EV_ENC_3,
    EV_MUX_0, EV_MUX_1, EV_MUX_2, EV_MUX_3,
    EV_DMX_OFF, EV_DMX_Y0, EV_DMX_Y1, EV_DMX_Y2, EV_DMX_Y3,
    EV_FRG_SWAP, EV_MFRG_SWAP,
    EV_COUNT
  } event_e;
  int events [EV_COUNT];

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] total;
    logic [3:0] exp4;
    logic [1:0] exp2, t2;
    foreach (events[k]) events[k] = 0;
    for (int v = 0; v < 512; v++) begin
      logic [8:0] u;
      u = 9'(v);
      {add_a, add_b, add_cin} = u;
      {fa_a, fa_b, fa_cin}    = u[2:0];
      {cmp_a, cmp_b}          = u[1:0];
      {dec_s, dec_a, dec_b}   = u[2:0];
      enc_i                   = 4'b0001 << u[1:0];
      {mux_s, mux_i}          = u[5:0];
      {dmx_din, dmx_en, dmx_s0, dmx_s1} = u[3:0];
      fg_in      = u[1:0];
      hng_in     = u[3:0];
      peres_in   = u[2:0];
      toffoli_in = u[2:0];
      fredkin_in = u[2:0];
      m_in       = u[2:0];
      l_in       = u[2:0];
      bjn_in     = u[2:0];
      mfrg_in    = u[2:0];
      #1;

      // adder
      total = (W+1)'(add_a) + (W+1)'(add_b) + (W+1)'(add_cin);
      expect_eq(16'({add_cout, add_sum}), 16'(total), "adder sum");
      for (int k = 0; k < W; k++) begin
        expect_eq(16'(add_garbage[2*k+:2]), 16'({add_b[k], add_a[k]}), "adder garbage");
      end
      if (add_cout) events[EV_ADD_COUT]++;
      if ((add_a ^ add_b) == '1 && add_cin) events[EV_ADD_RIPPLE]++;

      // full adder
      t2 = 2'(fa_a) + 2'(fa_b) + 2'(fa_cin);
      expect_eq(16'({fa_cout, fa_sum}), 16'(t2), "full adder");
      expect_eq(16'(fa_garbage), 16'({fa_a != fa_b, fa_a}), "full adder garbage");
      if (fa_cout) events[EV_FA_COUT]++;

      // comparator
      expect_eq(16'({cmp_eq, cmp_gt, cmp_lt}),
                16'({cmp_a == cmp_b, cmp_a > cmp_b, cmp_a < cmp_b}), "comparator");
      expect_eq(16'(cmp_garbage), 16'(cmp_a), "comparator garbage");
      if (cmp_eq) events[EV_CMP_EQ]++;
      if (cmp_gt) events[EV_CMP_GT]++;
      if (cmp_lt) events[EV_CMP_LT]++;

      // decoder
      exp4 = dec_s ? (4'b0001 << {dec_a, dec_b}) : 4'b0000;
      expect_eq(16'(dec_x), 16'(exp4), "decoder");
      expect_eq(16'(dec_garbage), 16'({dec_b, dec_b, dec_a}), "decoder garbage");
      if (!dec_s) events[EV_DEC_OFF]++;
      for (int k = 0; k < 4; k++) if (dec_x[k]) events[EV_DEC_X0 + k]++;

      // encoder (one-hot inputs)
      expect_eq(16'(enc_y), 16'(u[1:0]), "encoder");
      expect_eq(16'(enc_garbage), 16'({~enc_i[3] | enc_i[2], ~enc_i[3] | enc_i[1],
                                        enc_i[3], enc_i[0]}), "encoder garbage");
      events[EV_ENC_0 + int'(u[1:0])]++;

      // multiplexer
      expect_eq(16'(mux_y), 16'(mux_i[mux_s]), "multiplexer");
      // garbage: the inputs not selected at each stage, and S0, S1 copies
      exp4 = {mux_s[1] ? (mux_s[0] ? mux_i[1] : mux_i[0]) : (mux_s[0] ? mux_i[3] : mux_i[2]),
              mux_s[1], mux_s[0] ? mux_i[2] : mux_i[3], mux_s[0]};
      expect_eq(16'(mux_garbage), 16'({exp4, mux_s[0] ? mux_i[0] : mux_i[1]}), "multiplexer garbage");
      events[EV_MUX_0 + int'(mux_s)]++;

      // demultiplexer: S0 is the more significant select bit
      exp4 = '0;
      if (dmx_en) exp4[{dmx_s0, dmx_s1}] = dmx_din;
      expect_eq(16'(dmx_y), 16'(exp4), "demultiplexer");
      // garbage: Din, Din^E, four Peres Q lines, Din*E, S0', S1
      expect_eq(16'({dmx_garbage[8:6], dmx_garbage[1:0]}),
                16'({dmx_s1, ~dmx_s0, dmx_din & dmx_en, dmx_din ^ dmx_en, dmx_din}),
                "demultiplexer garbage");
      // Q of the output Peres gates, in chain order Y3, Y2, Y0, Y1: Din*E ^ select minterm
      exp4 = {(dmx_s0 == 1'b0) && (dmx_s1 == 1'b1), (dmx_s0 == 1'b0) && (dmx_s1 == 1'b0),
              (dmx_s0 == 1'b1) && (dmx_s1 == 1'b0), (dmx_s0 == 1'b1) && (dmx_s1 == 1'b1)};
      expect_eq(16'(dmx_garbage[5:2]), 16'(exp4 ^ {4{dmx_din & dmx_en}}), "demultiplexer Q lines");
      if (!dmx_en) events[EV_DMX_OFF]++;
      for (int k = 0; k < 4; k++) if (dmx_y[k]) events[EV_DMX_Y0 + k]++;

      // stand-alone gates
      expect_eq(16'(fg_out), 16'({fg_in[1], fg_in[1] != fg_in[0]}), "Feynman");
      t2 = 2'(hng_in[3]) + 2'(hng_in[2]) + 2'(hng_in[1]);
      expect_eq(16'(hng_out), 16'({hng_in[3:2], t2[0], t2[1] ^ hng_in[0]}), "HNG");
      expect_eq(16'(peres_out), 16'({peres_in.a, peres_in.a != peres_in.b,
                                     peres_in.c ^ (peres_in.a && peres_in.b)}), "Peres");
      expect_eq(16'(toffoli_out), 16'({toffoli_in.a, toffoli_in.b,
                                       toffoli_in.c ^ (toffoli_in.a && toffoli_in.b)}), "Toffoli");
      exp2 = fredkin_in.a ? {fredkin_in.c, fredkin_in.b} : {fredkin_in.b, fredkin_in.c};
      expect_eq(16'(fredkin_out), 16'({fredkin_in.a, exp2}), "Fredkin");
      if (fredkin_in.a && fredkin_in.b != fredkin_in.c) events[EV_FRG_SWAP]++;
      exp2 = mfrg_in.a ? {mfrg_in.b, mfrg_in.c} : {mfrg_in.c, mfrg_in.b};
      expect_eq(16'(mfrg_out), 16'({mfrg_in.a, exp2}), "MFRG");
      if (!mfrg_in.a && mfrg_in.b != mfrg_in.c) events[EV_MFRG_SWAP]++;
      expect_eq(16'(m_out), 16'({m_in.a, m_in.a == m_in.b, m_in.c ^ (m_in.a > m_in.b)}), "M gate");
      expect_eq(16'(l_out), 16'({l_in.a, l_in.b, l_in.c ^ !(l_in.a || l_in.b)}), "L gate");
      expect_eq(16'(bjn_out), 16'({bjn_in.a, bjn_in.b, bjn_in.c ^ (bjn_in.a || bjn_in.b)}), "BJN gate");
    end

    for (int k = 0; k < EV_COUNT; k++) begin
      event_e e;
      e = event_e'(k);
      $display("behaviour %-14s seen %0d times", e.name(), events[k]);
      checks++;
      if (events[k] == 0) begin
        failures++;
        $display("FAIL behaviour %s never happened", e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
