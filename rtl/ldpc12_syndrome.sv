// Parity check nodes of the n = 12 LDPC code: evaluates the nine parity check
// equations (each the XOR of four code symbols) on a 12-bit word. syndrome[m]
// is set when equation m+1 fails; an all-zero syndrome means the word is a
// codeword. The equations are the published ones; this block is a direct XOR
// realisation of them. Combinational, two XOR levels.
module ldpc12_syndrome
  import ldpc12_pkg::*;
(
  input  word_t                     c,
  output logic [N_CHECKS-1:0]       syndrome
);
  always_comb begin
    for (int m = 0; m < int'(N_CHECKS); m++) syndrome[m] = ^(c & H_ROWS[m]);
  end
endmodule
