// tb_rev_adder_hng: exhaustive self-checking testbench for the HNG
// ripple-carry adder at its default width. Every (A, B, Cin) combination is
// applied; {Cout, Sum} must equal the integer sum A + B + Cin, the garbage
// lines must carry the interleaved operand bits, and no two inputs may give
// the same output word. It also counts the inputs whose carry ripples through
// every stage (A xor B all ones with Cin = 1) and fails if there were none.
module tb_rev_adder_hng;

  localparam int unsigned W = 4;

  logic [W-1:0]   a, b, sum;
  logic           cin, cout;
  logic [2*W-1:0] garbage, exp_garbage;
  logic [W:0]     total;
  int   checks   = 0;
  int   failures = 0;
  int   full_ripples = 0;
  bit   seen [logic [3*W:0]];

  rev_adder_hng dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .garbage(garbage));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {a, b, cin} = (2*W+1)'(v);
      #1;
      total = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      for (int k = 0; k < W; k++) begin
        exp_garbage[2*k]   = a[k];
        exp_garbage[2*k+1] = b[k];
      end
      if ((a ^ b) == '1 && cin) full_ripples++;
      checks++;
      if ({cout, sum} !== total) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%b: got %0d expected %0d", a, b, cin, {cout, sum}, total);
      end
      checks++;
      if (garbage !== exp_garbage) begin
        failures++;
        $display("FAIL a=%0d b=%0d: garbage %b", a, b, garbage);
      end
      checks++;
      if (seen.exists({cout, sum, garbage})) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%b: output repeated", a, b, cin);
      end
      seen[{cout, sum, garbage}] = 1'b1;
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no input rippled a carry through all stages");
    end
    $display("full-length carry ripples exercised: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
