// Matching unit for data protected with a systematic ECC (direct compare).
//
// Instead of decoding the stored codeword and comparing tags, the incoming
// tag is encoded and compared with the stored codeword directly; the tag
// matches when the two codewords are within the correctable Hamming distance.
// Because the code is systematic, the tag half of the comparison does not
// wait for the encoder: the tag bits are XOR-ed with the stored data bits
// while the DMC encoder computes the check bits, and only the check half of
// the XOR bank sits behind the encoder. Each half then goes through its own
// four-input BWA ("BWA for tags", "BWA for parities"); the second level
// merges them into Q..V and the decision unit gives the match.
//
// Codeword layout: stored_cw[3:0] = tag bits i3..i0,
//                  stored_cw[7:4] = {V1, V0, H1, H0}.
// Interface: fully combinational; match is valid one combinational delay
// after in_tag and stored_cw. q..v, dist_low and dist_far are brought out for
// observation.
module ecc_matcher
  import ecc_match_pkg::*;
#(
  parameter int unsigned TMAX = ecc_match_pkg::T_MAX
) (
  input  logic [TAG_W-1:0] in_tag,
  input  logic [CW_W-1:0]  stored_cw,
  output logic             match,
  output qrstuv_t          weights,
  output logic [2:0]       dist_low,
  output logic             dist_far
);
  logic [PAR_W-1:0] in_par;
  logic [CW_W-1:0]  diff;
  bwa4_out_t        tag_w, par_w;

  dmc_encoder u_enc (.i(in_tag), .par(in_par));

  xor_bank #(.N(CW_W)) u_xor (
    .x   ({in_par, in_tag}),
    .y   (stored_cw),
    .diff(diff)
  );

  bwa4 u_bwa_tag (.d(diff[TAG_W-1:0]),    .o(tag_w));
  bwa4 u_bwa_par (.d(diff[CW_W-1:TAG_W]), .o(par_w));

  bwa_second_level u_lvl2 (.tag_w(tag_w), .par_w(par_w), .o(weights));

  decision_unit #(.TMAX(TMAX)) u_dec (
    .w(weights), .match(match), .dist_low(dist_low), .dist_far(dist_far)
  );
endmodule
