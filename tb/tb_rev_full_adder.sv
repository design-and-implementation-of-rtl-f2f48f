// tb_rev_full_adder: exhaustive self-checking testbench for the two-Peres
// full adder. All eight (A, B, Cin) inputs are applied; {Cout, Sum} must
// equal the arithmetic sum A+B+Cin, the garbage lines must be A and A xor B,
// and no two inputs may give the same output word (reversibility).
module tb_rev_full_adder;

  logic a, b, cin, sum, cout, g1, g2;
  logic [1:0] total;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [16];

  rev_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .g1(g1), .g2(g2));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      total = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, sum} !== total) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: cout,sum=%b%b expected %b", a, b, cin, cout, sum, total);
      end
      checks++;
      if (g1 !== a || g2 !== (a != b)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: garbage %b%b", a, b, cin, g1, g2);
      end
      checks++;
      if (seen[{sum, cout, g1, g2}]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b: output repeated", a, b, cin);
      end
      seen[{sum, cout, g1, g2}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
