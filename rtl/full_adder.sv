// full_adder: one-bit full adder, the 3:2 counter that forms the first stage
// of the 15:4 compressor and the cells of its final parallel adder.
//
// It counts the ones on its three inputs: sum carries weight 1 and is the
// three-input XOR, carry carries weight 2 and is the majority of the inputs.
// These are the usual full-adder equations, the same ones the compressor
// family uses for its first-stage cells; the gate-level form is this
// design's own choice and is left to synthesis.
//
// Interface: a, b, c in; sum, carry out. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (a & c) | (b & c);
  end

endmodule
