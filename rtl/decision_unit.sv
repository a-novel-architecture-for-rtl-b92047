// Decision unit: turns the weighted bits Q..V of the BWA tree into the match
// result of the direct-compare method.
//
// The incoming tag matches the stored codeword when the stored codeword lies
// within the correctable range of the incoming tag's codeword, i.e. when the
// Hamming distance is at most TMAX. Q, R and S each mean a distance of at
// least four; without them the distance is exactly 2T + 2U + V. So
//   match = ~(Q|R|S) & (2T + 2U + V <= TMAX).
// The decision rule follows the published description of direct compare;
// the gate realisation and TMAX = 1 (single-error correction, for the
// distance-3 code used) are this design's own. TMAX must be below 4.
// Combinational.
module decision_unit
  import ecc_match_pkg::*;
#(
  parameter int unsigned TMAX = ecc_match_pkg::T_MAX
) (
  input  qrstuv_t    w,
  output logic       match,
  output logic [2:0] dist_low,   // 2T+2U+V, valid when dist_far == 0
  output logic       dist_far       // distance is four or more
);
  always_comb begin
    dist_far = w.q | w.r | w.s;
    dist_low = 3'({1'b0, w.t, 1'b0}) + 3'({1'b0, w.u, 1'b0}) + 3'(w.v);
    match    = !dist_far && (32'(dist_low) <= TMAX);
  end

  initial assert (TMAX < 4) else $error("decision_unit: TMAX must be below 4");
endmodule
