// tb_rev_encoder: self-checking testbench for the 4:2 encoder. The four
// one-hot inputs must give the index of the set bit on {Y1, Y0}; the garbage
// line G1 must be I0. All sixteen input words are then applied to check that
// no two give the same output word (reversibility), and that Y is always the
// OR of the indices of the set bits.
module tb_rev_encoder;

  logic [3:0] i, garbage;
  logic [1:0] y, exp_y;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [64];

  rev_encoder dut (.i(i), .y(y), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      i = 4'b0001 << k;
      #1;
      checks++;
      if (y !== 2'(k) || garbage[0] !== i[0]) begin
        failures++;
        $display("FAIL i=%b: y=%b expected %0d (G1=%b)", i, y, k, garbage[0]);
      end
    end
    foreach (seen[k]) seen[k] = 1'b0;
    for (int v = 0; v < 16; v++) begin
      i = 4'(v);
      #1;
      exp_y = '0;
      for (int k = 0; k < 4; k++) if (i[k]) exp_y |= 2'(k);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL i=%b: y=%b expected %b", i, y, exp_y);
      end
      checks++;
      if (seen[{y, garbage}]) begin
        failures++;
        $display("FAIL i=%b: output repeated", i);
      end
      seen[{y, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
