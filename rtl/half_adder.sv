// Half adder: the only arithmetic cell of the butterfly-formed weight
// accumulators. For two input bits of equal weight w it gives a sum bit of
// weight w and a carry bit of weight 2w, so a + b = 2*carry + sum.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
