// tb_rev_feynman_gate: exhaustive self-checking testbench for the Feynman
// (controlled NOT) gate. All four inputs are applied; Q must be B inverted
// when A is set, P must equal A, and the four outputs must all differ.
module tb_rev_feynman_gate;

  logic a, b, p, q;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [4];

  rev_feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a ? !b : b)) begin
        failures++;
        $display("FAIL ab=%b%b: pq=%b%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL ab=%b%b: output repeated", a, b);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
