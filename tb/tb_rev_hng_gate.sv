// tb_rev_hng_gate: exhaustive self-checking testbench for the 4x4 HNG gate.
// All sixteen inputs are applied. The reference is arithmetic: R is the low
// bit of A+B+C and S the carry bit of that sum, inverted when D is set; P
// and Q must return A and B. The sixteen output words must all differ.
module tb_rev_hng_gate;

  logic a, b, c, d, p, q, r, s;
  logic [1:0] total;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [16];

  rev_hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      total = 2'(a) + 2'(b) + 2'(c);
      checks++;
      if (p !== a || q !== b || r !== total[0] || s !== (total[1] ^ d)) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b: pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b: output repeated", a, b, c, d);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
