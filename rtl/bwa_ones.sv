// Second-level "BWA for 1's": one half adder on the weight-1 bits of the tag
// BWA and the parity BWA. U has weight 2, V weight 1, and a + b = 2*u + v.
// Structure from the BWA drawing. Combinational.
module bwa_ones (
  input  logic a,    // weight-1 bit of the tag BWA
  input  logic b,    // weight-1 bit of the parity BWA
  output logic u,    // weight 2
  output logic v     // weight 1
);
  half_adder u_ha (.a(a), .b(b), .sum(v), .carry(u));
endmodule
