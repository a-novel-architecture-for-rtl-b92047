// XOR bank: an array of bit-wise comparators. Bit i of the difference vector
// is set when X and Y differ in bit i, so the Hamming distance between X and
// Y is the number of ones in diff. Combinational, one gate level.
// The width defaults to the 8-bit codeword of the (8,4) matching example
// (eight comparators feeding four half adders in the XOR bank drawing).
module xor_bank #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] diff
);
  always_comb begin
    for (int i = 0; i < int'(N); i++) diff[i] = x[i] ^ y[i];
  end
endmodule
