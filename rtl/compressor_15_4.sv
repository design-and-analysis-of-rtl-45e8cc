// compressor_15_4: 15:4 compressor built from full adders and 5:3
// compressors, meant for reducing partial-product columns in a multiplier.
//
// Three stages:
//   1. Five full adders, FA k on inputs i[3k+2:3k]. Their five sums have
//      weight 1 and their five carries weight 2.
//   2. Two 5:3 compressors. One takes the five sums (FA k's sum on its input
//      x[k]) and gives a[2:0]; the other takes the five carries the same way
//      and gives b[2:0], which has weight 2.
//   3. A 4-bit parallel adder adds {0, a[2:0]} and {b[2:0], 0} with its
//      carry-in tied to 1, giving s[3:0] and carry.
// Result: {carry, s} = a + 2*b + 1.
//
// The stage structure, the zero in the low bit of the shifted operand and the
// carry-in tied to the supply follow the published schematic. The routing of
// each full adder to a particular 5:3 input, and the assignment of sums to
// the unshifted operand and carries to the shifted one, are this design's
// reading of it, chosen by weight.
//
// Because the specified 5:3 network is not an exact counter (see
// compressor_5_3) and the carry-in adds one, {carry, s} is not in general the
// number of ones on i. Its low bit s[0] is the complement of the parity of i.
//
// Interface: i[14:0] in; s[3:0], carry out. Purely combinational, no clock:
// the critical path is full adder, 5:3 compressor, then four ripple cells.
module compressor_15_4 (
  input  logic [14:0] i,
  output logic [3:0]  s,
  output logic        carry
);

  logic [4:0] fa_sum;     // weight-1 outputs of stage 1
  logic [4:0] fa_carry;   // weight-2 outputs of stage 1
  logic [2:0] a;          // 5:3 compression of the sums
  logic [2:0] b;          // 5:3 compression of the carries

  for (genvar k = 0; k < 5; k++) begin : g_stage1
    full_adder u_fa (
      .a    (i[3*k]),
      .b    (i[3*k+1]),
      .c    (i[3*k+2]),
      .sum  (fa_sum[k]),
      .carry(fa_carry[k])
    );
  end

  compressor_5_3 u_comp_sum (
    .x (fa_sum),
    .o0(a[0]),
    .o1(a[1]),
    .o2(a[2])
  );

  compressor_5_3 u_comp_carry (
    .x (fa_carry),
    .o0(b[0]),
    .o1(b[1]),
    .o2(b[2])
  );

  parallel_adder_4 #(.WIDTH(4)) u_add (
    .a    ({1'b0, a}),
    .b    ({b, 1'b0}),
    .cin  (1'b1),
    .s    (s),
    .carry(carry)
  );

endmodule
