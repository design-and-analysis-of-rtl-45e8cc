// parallel_adder_4: WIDTH-bit parallel (ripple-carry) adder, the final stage
// of the 15:4 compressor.
//
// s = a + b + cin, with the bit that leaves the top position on carry. The
// adder is a chain of full_adder cells, bit k taking the carry of bit k-1;
// the ripple structure is this design's choice of the simplest parallel
// adder. The default width of 4 bits is the one the compressor uses.
//
// Interface: a, b [WIDTH-1:0] and cin in; s [WIDTH-1:0] and carry out.
// Purely combinational; the delay grows linearly with WIDTH.
module parallel_adder_4 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             carry
);

  logic [WIDTH:0] c;   // c[k] is the carry into bit k

  assign c[0]  = cin;
  assign carry = c[WIDTH];

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    full_adder u_fa (
      .a    (a[k]),
      .b    (b[k]),
      .c    (c[k]),
      .sum  (s[k]),
      .carry(c[k+1])
    );
  end

endmodule
