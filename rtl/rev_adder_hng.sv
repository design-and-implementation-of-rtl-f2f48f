// rev_adder_hng: WIDTH-bit reversible ripple-carry adder, one HNG gate per
// bit.
//
// Bit k feeds HNG(A = a[k], B = b[k], C = carry into bit k, D = 0). The gate
// gives the sum bit on R and the carry out of the bit on S, which is the C
// input of bit k+1. The carry into bit 0 is cin and the carry out of the top
// bit is cout. P and Q of every gate (copies of a[k] and b[k]) are garbage,
// returned on garbage[2k] = P and garbage[2k+1] = Q.
//
// Purely combinational: the carry ripples through WIDTH gates. One constant
// input per bit. The chain of HNG gates and its default width of 4 follow
// the published four-bit design; the parameter is there to build other
// widths.
module rev_adder_hng #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   sum,
  output logic               cout,
  output logic [2*WIDTH-1:0] garbage
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    rev_hng_gate u_hng (
      .a(a[k]), .b(b[k]), .c(carry[k]), .d(1'b0),
      .p(garbage[2*k]), .q(garbage[2*k+1]),
      .r(sum[k]), .s(carry[k+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
