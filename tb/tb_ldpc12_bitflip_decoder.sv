// Self-checking testbench for the bit-flipping decoder of the n = 12 LDPC
// code, at its default MAX_ITER. A reference model written from the nine
// equation lists decodes the same words; the testbench compares the decoded
// word, the success flag, the iteration count and the latency (done after
// iters + 1 clock edges). Words tested: every codeword, every codeword with
// one bit error (must be corrected), the hard decisions of the worked
// soft-decoding example, and random words.
module tb_ldpc12_bitflip_decoder;
  localparam int MAX_ITER = 8;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [11:0] rx, dec;
  logic        busy, done, ok;
  logic [7:0]  iters;
  int checks = 0, failures = 0;
  int n_fail_decodes = 0, n_multi_iter = 0;
  int eq [9][4] = '{'{3, 6, 7, 8}, '{1, 2, 5, 12}, '{4, 9, 10, 11},
                    '{2, 6, 7, 10}, '{1, 3, 8, 11}, '{4, 5, 9, 12},
                    '{1, 4, 5, 7}, '{6, 8, 11, 12}, '{2, 3, 9, 10}};
  logic [11:0] cws [$];

  ldpc12_bitflip_decoder dut (.clk(clk), .rst_n(rst_n), .start(start), .rx(rx),
    .busy(busy), .done(done), .ok(ok), .dec(dec), .iters(iters));

  always #5 clk = ~clk;

  function automatic logic [8:0] ref_syn(logic [11:0] w);
    logic [8:0] s;
    for (int m = 0; m < 9; m++) begin
      s[m] = 1'b0;
      for (int j = 0; j < 4; j++) s[m] ^= w[eq[m][j] - 1];
    end
    return s;
  endfunction

  // reference decoder: flip every bit that fails the most equations
  task automatic ref_decode(input logic [11:0] w_in, output logic [11:0] w,
                            output logic r_ok, output int r_it);
    w = w_in; r_it = 0;
    forever begin
      logic [8:0] s;
      int cnt [12];
      int mx;
      s = ref_syn(w);
      if (s == 0) begin r_ok = 1; return; end
      if (r_it == MAX_ITER) begin r_ok = 0; return; end
      cnt = '{default: 0};
      for (int m = 0; m < 9; m++)
        if (s[m]) for (int j = 0; j < 4; j++) cnt[eq[m][j] - 1]++;
      mx = 0;
      foreach (cnt[k]) if (cnt[k] > mx) mx = cnt[k];
      foreach (cnt[k]) if (cnt[k] == mx) w[k] = ~w[k];
      r_it++;
    end
  endtask

  task automatic run(input logic [11:0] word, input logic must_fix,
                     input logic [11:0] truth);
    logic [11:0] e_w;
    logic        e_ok;
    int          e_it, edges;
    ref_decode(word, e_w, e_ok, e_it);
    @(negedge clk);
    rx = word; start = 1;
    @(posedge clk);
    edges = 0;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(posedge clk);
      edges++;
      #1;
      if (edges > 50) break;
    end
    checks++;
    if (dec != e_w || ok != e_ok || int'(iters) != e_it) begin
      failures++;
      $display("FAIL rx=%b dec=%b ok=%b it=%0d expected %b %b %0d",
               word, dec, ok, iters, e_w, e_ok, e_it);
    end
    checks++;
    if (edges != e_it + 1) begin
      failures++;
      $display("FAIL rx=%b latency %0d edges, expected %0d", word, edges, e_it + 1);
    end
    if (must_fix) begin
      checks++;
      if (!ok || dec != truth) begin
        failures++;
        $display("FAIL rx=%b not corrected to %b (dec=%b ok=%b)", word, truth, dec, ok);
      end
    end
    if (!ok) n_fail_decodes++;
    if (iters > 1) n_multi_iter++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] ex;
    rx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4096; n++) if (ref_syn(12'(n)) == 0) cws.push_back(12'(n));
    $display("code has %0d codewords", cws.size());
    foreach (cws[i]) begin
      run(cws[i], 1'b1, cws[i]);
      for (int b = 0; b < 12; b++) run(cws[i] ^ (12'(1) << b), 1'b1, cws[i]);
    end
    // worked example: Pr[c=1] = 0.9 0.5 0.4 0.3 0.9 x8, hard decision p > 0.5
    ex = 12'hFF1;
    run(ex, 1'b0, '0);
    $display("example rx=%b -> dec=%b ok=%b iterations=%0d", ex, dec, ok, iters);
    for (int n = 0; n < 300; n++) run(12'($urandom), 1'b0, '0);
    $display("decodes ending unsolved: %0d, with more than one iteration: %0d",
             n_fail_decodes, n_multi_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
