// Encoder of the 4-bit decimal matrix code (DMC).
//
// The 4-bit word is arranged logically (not physically) as a 2x2 matrix of
// two 2-bit symbols:      i1 i0 | H0
//                         i3 i2 | H1
//                         V1 V0
// Each horizontal check bit is the XOR of the symbol in its row, each
// vertical check bit the XOR of the bits in its column:
//   H0 = i1^i0, H1 = i3^i2, V0 = i0^i2, V1 = i1^i3.
// The matrix layout and the names follow the published DMC example; the exact XOR
// selection is read from the layout and is this design's reading. The
// resulting (8,4) code has minimum distance 3 and corrects one bit.
// Check-bit vector order: par = {V1, V0, H1, H0}. Combinational.
module dmc_encoder (
  input  logic [3:0] i,     // information bits i3..i0
  output logic [3:0] par    // {V1, V0, H1, H0}
);
  always_comb begin
    par[0] = i[1] ^ i[0];   // H0, row 0
    par[1] = i[3] ^ i[2];   // H1, row 1
    par[2] = i[0] ^ i[2];   // V0, column of i0 and i2
    par[3] = i[1] ^ i[3];   // V1, column of i1 and i3
  end
endmodule
