// tb_rev_comparator: exhaustive self-checking testbench for the one-bit
// comparator. The four (A, B) inputs are applied and the outputs compared
// with the comparator truth table; the garbage line must be A and the four
// output words must differ.
module tb_rev_comparator;

  logic a, b, eq, gt, lt, g;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [16];
  // Truth table rows indexed by {A,B}: {A>B, A<B, A=B}.
  localparam logic [2:0] TABLE [4] = '{3'b001, 3'b010, 3'b100, 3'b001};

  rev_comparator dut (.a(a), .b(b), .eq(eq), .gt(gt), .lt(lt), .g(g));

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
      if ({gt, lt, eq} !== TABLE[v]) begin
        failures++;
        $display("FAIL a=%b b=%b: gt,lt,eq=%b%b%b expected %b", a, b, gt, lt, eq, TABLE[v]);
      end
      checks++;
      if (g !== a) begin
        failures++;
        $display("FAIL a=%b b=%b: garbage %b", a, b, g);
      end
      checks++;
      if (seen[{eq, gt, lt, g}]) begin
        failures++;
        $display("FAIL a=%b b=%b: output repeated", a, b);
      end
      seen[{eq, gt, lt, g}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
