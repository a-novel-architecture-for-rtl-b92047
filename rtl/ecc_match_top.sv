// Top level: the ECC data-matching unit together with the LDPC coding blocks
// that accompany it.
//
// Independent parts stand side by side, each with its own ports:
//  * ecc_matcher: decides combinationally whether an incoming 4-bit tag
//    matches a stored 8-bit DMC codeword within one correctable bit error,
//    counting the distance with half-adder butterflies (BWAs). The stored
//    codeword comes from a tag array outside this design.
//  * ldpc12_encoder: systematic encoder for the n = 12 LDPC code (five
//    message bits, combinational).
//  * ldpc12_bitflip_decoder: iterative hard-decision decoder for the n = 12
//    LDPC code, one iteration per clock (start/done handshake).
//  * ldpc12_sp_decoder: soft message-passing (sum-product) decoder for the
//    same code, working on probabilities Pr[c = 1] in PW-bit fixed point.
//  * ldpc_accumulator: NACC constituent accumulators of a repeat-accumulate
//    encoder, chained so that accumulator j, when its own clear is raised,
//    starts from the parity currently held by accumulator j-1 (accumulator 0
//    starts from 0). Clearing and filling them one after another therefore
//    builds each parity on top of the previous one. The routing of data bits
//    to accumulators (repeat and distribute) is outside this design: each
//    accumulator has its own data input.
// All sequential parts use clk and the active-low asynchronous reset rst_n.
module ecc_match_top
  import ecc_match_pkg::*;
  import ldpc12_pkg::*;
#(
  parameter int unsigned NACC     = 4,
  parameter int unsigned MAX_ITER = 8,
  parameter int unsigned PW       = 16,
  parameter int unsigned SP_ITERS = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // matching unit
  input  logic [TAG_W-1:0] in_tag,
  input  logic [CW_W-1:0]  stored_cw,
  output logic             match,
  output qrstuv_t          weights,
  output logic [2:0]       dist_low,
  output logic             dist_far,
  // LDPC encoder
  input  logic [4:0]       enc_msg,
  output word_t            enc_cw,
  // LDPC bit-flipping decoder
  input  logic             dec_start,
  input  word_t            dec_rx,
  output logic             dec_busy,
  output logic             dec_done,
  output logic             dec_ok,
  output word_t            dec_word,
  output logic [7:0]       dec_iters,
  // LDPC sum-product (soft) decoder
  input  logic             sp_start,
  input  logic [PW-1:0]    sp_chan [N_BITS],
  output logic             sp_busy,
  output logic             sp_done,
  output logic [PW-1:0]    sp_post [N_BITS],
  output word_t            sp_hard,
  output logic             sp_ok,
  // accumulator chain of the repeat-accumulate encoder
  input  logic [NACC-1:0]  acc_clear,
  input  logic [NACC-1:0]  acc_valid,
  input  logic [NACC-1:0]  acc_d,
  output logic [NACC-1:0]  acc_p
);
  ecc_matcher u_match (
    .in_tag(in_tag), .stored_cw(stored_cw), .match(match),
    .weights(weights), .dist_low(dist_low), .dist_far(dist_far)
  );

  ldpc12_encoder u_enc (.msg(enc_msg), .cw(enc_cw));

  ldpc12_bitflip_decoder #(.MAX_ITER(MAX_ITER)) u_dec (
    .clk(clk), .rst_n(rst_n), .start(dec_start), .rx(dec_rx),
    .busy(dec_busy), .done(dec_done), .ok(dec_ok), .dec(dec_word),
    .iters(dec_iters)
  );

  ldpc12_sp_decoder #(.PW(PW), .ITERS(SP_ITERS)) u_sp (
    .clk(clk), .rst_n(rst_n), .start(sp_start), .chan(sp_chan),
    .busy(sp_busy), .done(sp_done), .post(sp_post), .hard(sp_hard), .ok(sp_ok)
  );

  for (genvar j = 0; j < int'(NACC); j++) begin : g_acc
    logic s_unused;
    ldpc_accumulator u_acc (
      .clk(clk), .rst_n(rst_n), .clear(acc_clear[j]),
      .chain_in(j == 0 ? 1'b0 : acc_p[(j == 0) ? 0 : j-1]),
      .d_valid(acc_valid[j]), .d(acc_d[j]), .s(s_unused), .p(acc_p[j])
    );
  end
endmodule
