// Systematic encoder for the n = 12 LDPC code.
//
// The five message bits are placed on code symbols c1..c5; the other seven
// symbols are the solution of the nine parity check equations for those
// values (the equations have rank 7, so the code has 2^5 codewords and
// c6..c12 are fully determined by c1..c5). Solving the equations over GF(2)
// gives
//   c6  = c2^c3^c5    c9  = c1^c2^c4    c12 = c1^c2^c5
//   c7  = c1^c4^c5    c10 = c1^c3^c4
//   c8  = c1^c2^c4    c11 = c2^c3^c4
// Placing message bits on some nodes and computing the rest from the
// equations is how the published description encodes LDPC codes; the choice of
// c1..c5 as message positions is this design's own.
// Interface: combinational; cw[k-1] is symbol c_k.
module ldpc12_encoder
  import ldpc12_pkg::*;
(
  input  logic [4:0] msg,   // msg[k-1] is placed on c_k, k = 1..5
  output word_t      cw
);
  logic c1, c2, c3, c4, c5;

  always_comb begin
    {c5, c4, c3, c2, c1} = msg;
    cw[4:0] = msg;
    cw[5]   = c2 ^ c3 ^ c5;    // c6
    cw[6]   = c1 ^ c4 ^ c5;    // c7
    cw[7]   = c1 ^ c2 ^ c4;    // c8
    cw[8]   = c1 ^ c2 ^ c4;    // c9
    cw[9]   = c1 ^ c3 ^ c4;    // c10
    cw[10]  = c2 ^ c3 ^ c4;    // c11
    cw[11]  = c1 ^ c2 ^ c5;    // c12
  end
endmodule
