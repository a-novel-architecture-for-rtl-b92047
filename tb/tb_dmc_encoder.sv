// Self-checking testbench for the 4-bit DMC encoder: all 16 words. Check
// bits are recomputed from the 2x2 layout (row XOR for H, column XOR for V),
// and the minimum distance of the resulting (8,4) code must be three.
module tb_dmc_encoder;
  logic [3:0] i, par;
  logic [7:0] cw [16];
  int checks = 0, failures = 0;

  dmc_encoder dut (.i(i), .par(par));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dmin;
    for (int n = 0; n < 16; n++) begin
      logic [1:0] row0, row1;
      logic h0, h1, v0, v1;
      i = 4'(n);
      #1;
      row0 = i[1:0];   // symbol i1 i0
      row1 = i[3:2];   // symbol i3 i2
      h0 = ^row0;  h1 = ^row1;
      v0 = row0[0] ^ row1[0];
      v1 = row0[1] ^ row1[1];
      checks++;
      if (par != {v1, v0, h1, h0}) begin
        failures++;
        $display("FAIL i=%b par=%b expected %b", i, par, {v1, v0, h1, h0});
      end
      cw[n] = {par, i};
    end
    dmin = 8;
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++)
        if ($countones(cw[a] ^ cw[b]) < dmin) dmin = $countones(cw[a] ^ cw[b]);
    checks++;
    if (dmin != 3) begin
      failures++;
      $display("FAIL minimum distance %0d", dmin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
