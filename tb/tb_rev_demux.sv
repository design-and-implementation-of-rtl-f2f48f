// tb_rev_demux: exhaustive self-checking testbench for the 1:4
// demultiplexer. All sixteen (Din, E, S0, S1) inputs are applied. With E = 0
// every output must be 0; with E = 1 output Y[2*S0 + S1] must equal Din and
// the others must be 0. Output words, garbage included, must all differ.
module tb_rev_demux;

  logic       din, en, s0, s1;
  logic [3:0] y, exp_y;
  logic [8:0] garbage;
  int   checks   = 0;
  int   failures = 0;
  bit   seen [logic [12:0]];

  rev_demux dut (.din(din), .en(en), .s0(s0), .s1(s1), .y(y), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {din, en, s0, s1} = 4'(v);
      #1;
      exp_y = '0;
      if (en) exp_y[2*s0 + s1] = din;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL din=%b en=%b s0=%b s1=%b: y=%b expected %b", din, en, s0, s1, y, exp_y);
      end
      checks++;
      if (seen.exists({y, garbage})) begin
        failures++;
        $display("FAIL din=%b en=%b s0=%b s1=%b: output repeated", din, en, s0, s1);
      end
      seen[{y, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
