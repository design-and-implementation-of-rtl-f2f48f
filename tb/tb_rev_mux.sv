// tb_rev_mux: exhaustive self-checking testbench for the 4:1 multiplexer.
// All 64 (S, I) inputs are applied; Y must equal I[S]. The 6-bit output
// word (Y and five garbage lines) must differ for every input, i.e. the
// circuit is a permutation of its six lines.
module tb_rev_mux;

  logic [1:0] s;
  logic [3:0] i;
  logic       y;
  logic [4:0] garbage;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [64];

  rev_mux dut (.s(s), .i(i), .y(y), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 64; v++) begin
      {s, i} = 6'(v);
      #1;
      checks++;
      if (y !== i[s]) begin
        failures++;
        $display("FAIL s=%0d i=%b: y=%b", s, i, y);
      end
      checks++;
      if (seen[{y, garbage}]) begin
        failures++;
        $display("FAIL s=%0d i=%b: output repeated", s, i);
      end
      seen[{y, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
