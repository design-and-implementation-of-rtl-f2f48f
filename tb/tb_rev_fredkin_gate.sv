// tb_rev_fredkin_gate: exhaustive self-checking testbench for rev_fredkin_gate (Fredkin gate: swaps B and C when A is set).
//
// Applies all eight input combinations. For each one the outputs are
// compared with a reference written independently of the gate's
// equations, and the output words are collected to check that no two
// inputs give the same output, i.e. that the gate is reversible.
// Ends with the TB_RESULT summary line; a watchdog stops a hung run.
module tb_rev_fredkin_gate;

  logic a, b, c;
  logic p, q, r;
  logic exp_p, exp_q, exp_r;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [8];

  rev_fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp_p = a;
      exp_q = a ? c : b;
      exp_r = a ? b : c;
      checks++;
      if ({p, q, r} !== {exp_p, exp_q, exp_r}) begin
        failures++;
        $display("FAIL abc=%b%b%b: pqr=%b%b%b expected %b%b%b",
                 a, b, c, p, q, r, exp_p, exp_q, exp_r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL abc=%b%b%b: output %b%b%b already produced", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
