// Self-checking testbench for the n = 12 LDPC check nodes: all 4096 words.
// The reference evaluates the nine equations from their lists of symbol
// numbers (c1..c12). It also checks that the all-ones word is a codeword.
module tb_ldpc12_syndrome;
  logic [11:0] c;
  logic [8:0]  syndrome;
  int checks = 0, failures = 0;
  int eq [9][4] = '{'{3, 6, 7, 8}, '{1, 2, 5, 12}, '{4, 9, 10, 11},
                    '{2, 6, 7, 10}, '{1, 3, 8, 11}, '{4, 5, 9, 12},
                    '{1, 4, 5, 7}, '{6, 8, 11, 12}, '{2, 3, 9, 10}};

  ldpc12_syndrome dut (.c(c), .syndrome(syndrome));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ncw = 0;
    for (int n = 0; n < 4096; n++) begin
      logic [8:0] exp_s;
      c = 12'(n);
      #1;
      for (int m = 0; m < 9; m++) begin
        exp_s[m] = 1'b0;
        for (int j = 0; j < 4; j++) exp_s[m] ^= c[eq[m][j] - 1];
      end
      checks++;
      if (syndrome != exp_s) begin
        failures++;
        $display("FAIL c=%b syndrome=%b expected %b", c, syndrome, exp_s);
      end
      if (exp_s == 0) ncw++;
    end
    c = 12'hFFF;
    #1;
    checks++;
    if (syndrome != 0) begin
      failures++;
      $display("FAIL all-ones word is not a codeword");
    end
    $display("codewords: %0d", ncw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
