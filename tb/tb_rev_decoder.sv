// tb_rev_decoder: exhaustive self-checking testbench for the 2:4 decoder
// with enable. The eight (S, A, B) inputs are applied. With S = 0 every
// output must be 0; with S = 1 only X[2A+B] may be 1. The output words,
// garbage included, must all differ.
module tb_rev_decoder;

  logic       s, a, b;
  logic [3:0] x, exp_x;
  logic [2:0] garbage;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [128];

  rev_decoder dut (.s(s), .a(a), .b(b), .x(x), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {s, a, b} = 3'(v);
      #1;
      exp_x = '0;
      if (s) exp_x[2*a + b] = 1'b1;
      checks++;
      if (x !== exp_x) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b: x=%b expected %b", s, a, b, x, exp_x);
      end
      checks++;
      if (seen[{x, garbage}]) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b: output repeated", s, a, b);
      end
      seen[{x, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
