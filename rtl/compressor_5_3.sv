// compressor_5_3: the 5:3 compressor used in the second stage of the 15:4
// compressor.
//
// The gate network is the one specified for this compressor:
//   o0 = x0 ^ x1 ^ x2 ^ x3 ^ x4            (five-input XOR, weight 1)
//   p  = x0 ^ x1                           (select)
//   m  = (x0 & ~p) | (x2 & p)              (2:1 mux = majority of x0,x1,x2)
//   o1 = x4 ^ m                            (weight 2)
//   o2 = x4 & m                            (weight 4)
// m is the carry of a full adder on x0..x2, built as a multiplexer: when x0
// and x1 agree it is x0, otherwise it is x2. o1 and o2 are then a half adder
// of that carry with x4.
//
// Note that this network is not an exact population count of its five
// inputs: o0 is always the parity, but {o2,o1,o0} equals the number of ones
// only for some input patterns (for example x0=x3=1 gives 3'b000 rather
// than 3'b010). x3 reaches only o0. The network is kept exactly as
// specified; the testbench checks it against these equations and reports
// how often it matches the true count.
//
// Which of the two last gates drives o1 and which drives o2 is this design's
// reading: the XOR drives the weight-2 output and the AND the weight-4
// output, as a half adder would.
//
// Interface: x[4:0] in; o0, o1, o2 out. Purely combinational, no clock.
module compressor_5_3 (
  input  logic [4:0] x,
  output logic       o0,
  output logic       o1,
  output logic       o2
);

  logic p;   // x0 ^ x1
  logic m;   // majority of x0, x1, x2 in multiplexer form

  always_comb begin
    o0 = ^x;
    p  = x[0] ^ x[1];
    m  = (x[0] & ~p) | (x[2] & p);
    o1 = x[4] ^ m;
    o2 = x[4] & m;
  end

endmodule
