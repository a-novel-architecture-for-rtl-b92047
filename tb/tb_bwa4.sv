// Self-checking testbench for the first-level BWA: all 16 inputs; the
// weighted sum 4*w4 + 2*w2a + 2*w2b + w1 must equal the number of ones.
module tb_bwa4;
  import ecc_match_pkg::*;
  logic [3:0] d;
  bwa4_out_t  o;
  int checks = 0, failures = 0;

  bwa4 dut (.d(d), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      int ones, wsum;
      d = 4'(n);
      #1;
      ones = int'(d[0]) + int'(d[1]) + int'(d[2]) + int'(d[3]);
      wsum = 4*int'(o.w4) + 2*int'(o.w2a) + 2*int'(o.w2b) + int'(o.w1);
      checks++;
      if (wsum != ones) begin
        failures++;
        $display("FAIL d=%b o=%b weighted=%0d ones=%0d", d, o, wsum, ones);
      end
      // weight-4 bit only when all four inputs are set
      checks++;
      if (o.w4 != (ones == 4)) begin
        failures++;
        $display("FAIL d=%b w4=%b", d, o.w4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
