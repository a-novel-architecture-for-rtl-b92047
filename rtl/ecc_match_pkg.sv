// Shared types and constants of the ECC data-matching unit.
//
// The matching unit compares an incoming 4-bit tag with a stored 8-bit
// codeword of a systematic (8,4) code: four data (tag) bits followed by four
// check bits. The difference vector is counted by butterfly-formed weight
// accumulators (BWAs) built only from half adders. Their outputs are bits
// that each carry a fixed weight (1, 2 or 4); the Hamming distance is the
// weighted sum of the bits that are set.
//
// The widths (four tag bits, four check bits) follow the 4-bit decimal matrix
// code and the BWA drawing with four half adders per first-level BWA. The
// correctable range T_MAX = 1 is this design's choice: the code used has a
// minimum distance of three, so one differing bit is correctable.
package ecc_match_pkg;

  localparam int unsigned TAG_W  = 4;              // data bits per tag
  localparam int unsigned PAR_W  = 4;              // check bits H0,H1,V0,V1
  localparam int unsigned CW_W   = TAG_W + PAR_W;  // stored codeword width
  localparam int unsigned T_MAX  = 1;              // correctable distance

  // Outputs of one first-level BWA: weights 4, 2, 2 and 1.
  typedef struct packed {
    logic w4;
    logic w2a;   // sum of the weight-2 half adder
    logic w2b;   // carry of the weight-1 half adder
    logic w1;
  } bwa4_out_t;

  // Outputs of the second level. Q and R are OR-ed weight-4 bits (they only
  // say "at least four"), S has weight 4, T and U weight 2, V weight 1.
  typedef struct packed {
    logic q;
    logic r;
    logic s;
    logic t;
    logic u;
    logic v;
  } qrstuv_t;

endpackage
