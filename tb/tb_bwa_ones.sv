// Self-checking testbench for the BWA for 1's: all four inputs, 2U + V must
// equal a + b.
module tb_bwa_ones;
  logic a, b, u, v;
  int checks = 0, failures = 0;

  bwa_ones dut (.a(a), .b(b), .u(u), .v(v));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      {a, b} = 2'(n);
      #1;
      checks++;
      if (2*int'(u) + int'(v) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b u=%b v=%b", a, b, u, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
