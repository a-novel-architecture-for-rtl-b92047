// Self-checking testbench for the constituent accumulator: random bit
// streams of random length with random gaps (d_valid low); after each stream
// p must be the XOR of the accepted bits and of the value loaded by clear.
// The systematic output s must follow d.
module tb_ldpc_accumulator;
  logic clk = 0, rst_n = 0, clear = 0, chain_in = 0, d_valid = 0, d = 0;
  logic s, p;
  int checks = 0, failures = 0;

  ldpc_accumulator dut (.clk(clk), .rst_n(rst_n), .clear(clear), .chain_in(chain_in),
                        .d_valid(d_valid), .d(d), .s(s), .p(p));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (p !== 1'b0) begin failures++; $display("FAIL p after reset"); end
    for (int f = 0; f < 100; f++) begin
      logic expv;
      int len;
      @(negedge clk);
      clear = 1; chain_in = 1'($urandom); expv = chain_in;
      @(negedge clk);
      clear = 0;
      len = 1 + int'($urandom % 20);
      for (int k = 0; k < len; k++) begin
        d_valid = 1'($urandom); d = 1'($urandom);
        if (d_valid) expv ^= d;
        #1;
        checks++;
        if (s != d) begin failures++; $display("FAIL s"); end
        @(negedge clk);
      end
      d_valid = 0;
      checks++;
      if (p != expv) begin
        failures++;
        $display("FAIL frame %0d p=%b expected %b", f, p, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
