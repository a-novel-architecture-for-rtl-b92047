// Self-checking testbench for xor_bank: random codeword pairs at the default
// width; every difference bit is compared with a per-bit reference.
module tb_xor_bank;
  localparam int N = 8;
  logic [N-1:0] x, y, diff;
  int checks = 0, failures = 0;

  xor_bank dut (.x(x), .y(y), .diff(diff));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      x = N'($urandom); y = N'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (diff[i] != (x[i] != y[i])) begin
          failures++;
          $display("FAIL x=%b y=%b diff=%b bit %0d", x, y, diff, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
