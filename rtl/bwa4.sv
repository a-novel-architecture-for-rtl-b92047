// First-level butterfly-formed weight accumulator (BWA) for four bits.
//
// Counts the ones among four equally weighted input bits with four half
// adders and no full adder. Two half adders add the input pairs (d0,d1) and
// (d2,d3); each gives a weight-2 carry and a weight-1 sum. The butterfly then
// sends both carries to one half adder (weights 4 and 2 out) and both sums to
// the other (weights 2 and 1 out). The count of ones is
//   4*w4 + 2*w2a + 2*w2b + w1
// exactly, for every input. The same block serves as "BWA for tags" and
// "BWA for parities". Which input pair goes to which half adder is this
// design's choice; the structure and the output weights 4,2,2,1 follow the
// BWA drawing. Combinational, two half-adder levels.
module bwa4
  import ecc_match_pkg::*;
(
  input  logic [3:0] d,
  output bwa4_out_t  o
);
  logic c0, s0, c1, s1;

  half_adder u_ha_top0 (.a(d[0]), .b(d[1]), .sum(s0), .carry(c0));
  half_adder u_ha_top1 (.a(d[2]), .b(d[3]), .sum(s1), .carry(c1));
  // butterfly: carries meet carries, sums meet sums
  half_adder u_ha_bot0 (.a(c0), .b(c1), .sum(o.w2a), .carry(o.w4));
  half_adder u_ha_bot1 (.a(s0), .b(s1), .sum(o.w1),  .carry(o.w2b));
endmodule
