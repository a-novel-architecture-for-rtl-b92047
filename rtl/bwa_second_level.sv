// Second level of the BWA tree: interconnection, OR-gate tree, BWA for 2's
// and BWA for 1's.
//
// The interconnection regroups the outputs of the tag BWA and the parity BWA
// by weight: the two weight-4 bits go to the OR-gate tree (output Q), the
// four weight-2 bits to the BWA for 2's (outputs R, S, T) and the two
// weight-1 bits to the BWA for 1's (outputs U, V). With W = Q|R|S the
// distance between the two codewords is
//   D >= 4            when W is set,
//   D  = 2T + 2U + V  otherwise (0..5, exact).
// Structure and output names Q..V follow the BWA drawing. Combinational.
module bwa_second_level
  import ecc_match_pkg::*;
(
  input  bwa4_out_t tag_w,   // first-level BWA over the tag difference bits
  input  bwa4_out_t par_w,   // first-level BWA over the check difference bits
  output qrstuv_t   o
);
  // OR-gate tree on the weight-4 bits
  assign o.q = tag_w.w4 | par_w.w4;

  bwa_twos u_twos (
    .a0(tag_w.w2a), .a1(tag_w.w2b),
    .b0(par_w.w2a), .b1(par_w.w2b),
    .r(o.r), .s(o.s), .t(o.t)
  );

  bwa_ones u_ones (.a(tag_w.w1), .b(par_w.w1), .u(o.u), .v(o.v));
endmodule
