// Second-level "BWA for 2's": accumulates the four weight-2 bits coming from
// the tag and parity BWAs.
//
// Two half adders add the pairs (a0,b0) and (a1,b1) of weight-2 bits; their
// weight-4 carries are OR-ed into R, their weight-2 sums go to a third half
// adder giving S (weight 4) and T (weight 2). R is OR-ed rather than added:
// once any weight-4 bit is set the distance is already beyond the correctable
// range, so the exact count is not needed. For at most one set carry,
//   2*(a0+a1+b0+b1) = 4*r + 4*s + 2*t.
// Structure from the BWA drawing (two half adders, an OR gate, one half
// adder). Combinational.
module bwa_twos (
  input  logic a0,   // weight-2 bits from the tag BWA
  input  logic a1,
  input  logic b0,   // weight-2 bits from the parity BWA
  input  logic b1,
  output logic r,    // weight 4, OR-ed
  output logic s,    // weight 4
  output logic t     // weight 2
);
  logic c0, s0, c1, s1;

  half_adder u_ha0 (.a(a0), .b(b0), .sum(s0), .carry(c0));
  half_adder u_ha1 (.a(a1), .b(b1), .sum(s1), .carry(c1));
  assign r = c0 | c1;
  half_adder u_ha2 (.a(s0), .b(s1), .sum(t), .carry(s));
endmodule
