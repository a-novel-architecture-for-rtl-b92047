// Self-checking testbench for the n = 12 LDPC encoder: all 32 messages. Each
// codeword must carry the message on c1..c5, satisfy all nine equations
// (evaluated from their symbol lists), and the 32 codewords must be distinct,
// so that they are all the codewords of the code.
module tb_ldpc12_encoder;
  logic [4:0]  msg;
  logic [11:0] cw;
  logic [11:0] seen [$];
  int checks = 0, failures = 0;
  int eq [9][4] = '{'{3, 6, 7, 8}, '{1, 2, 5, 12}, '{4, 9, 10, 11},
                    '{2, 6, 7, 10}, '{1, 3, 8, 11}, '{4, 5, 9, 12},
                    '{1, 4, 5, 7}, '{6, 8, 11, 12}, '{2, 3, 9, 10}};

  ldpc12_encoder dut (.msg(msg), .cw(cw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 32; n++) begin
      msg = 5'(n);
      #1;
      checks++;
      if (cw[4:0] != msg) begin
        failures++;
        $display("FAIL msg=%b not on c1..c5: %b", msg, cw);
      end
      for (int m = 0; m < 9; m++) begin
        logic s = 1'b0;
        for (int j = 0; j < 4; j++) s ^= cw[eq[m][j] - 1];
        checks++;
        if (s) begin
          failures++;
          $display("FAIL msg=%b cw=%b violates equation %0d", msg, cw, m + 1);
        end
      end
      checks++;
      foreach (seen[i]) if (seen[i] == cw) begin
        failures++;
        $display("FAIL codeword %b repeated", cw);
      end
      seen.push_back(cw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
