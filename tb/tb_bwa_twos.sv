// Self-checking testbench for the BWA for 2's: all 16 inputs. R must be the
// OR of the two first-stage carries; without R the weighted sum 4S + 2T must
// equal twice the number of set inputs, and with R that sum is at least four.
module tb_bwa_twos;
  logic a0, a1, b0, b1, r, s, t;
  int checks = 0, failures = 0;

  bwa_twos dut (.a0(a0), .a1(a1), .b0(b0), .b1(b1), .r(r), .s(s), .t(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      int val, got;
      {a0, a1, b0, b1} = 4'(n);
      #1;
      val = 2 * (int'(a0) + int'(a1) + int'(b0) + int'(b1));
      got = 4*int'(r) + 4*int'(s) + 2*int'(t);
      checks++;
      if (r != ((a0 & b0) | (a1 & b1))) begin
        failures++;
        $display("FAIL in=%b r=%b", 4'(n), r);
      end
      checks++;
      if (!r && got != val) begin
        failures++;
        $display("FAIL in=%b rst=%b%b%b value %0d expected %0d", 4'(n), r, s, t, got, val);
      end
      checks++;
      if ((r || s) != (val >= 4)) begin
        failures++;
        $display("FAIL in=%b r|s=%b value %0d", 4'(n), r | s, val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
