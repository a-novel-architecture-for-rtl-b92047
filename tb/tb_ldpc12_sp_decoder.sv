// Self-checking testbench for the sum-product decoder of the n = 12 LDPC
// code, at its default parameters (PW = 16, ITERS = 2).
//
// A floating-point reference model runs the same flooding schedule on the
// nine equation lists. Checked:
//  * the worked example with channel estimates 0.9 0.5 0.4 0.3 0.9 ... 0.9:
//    the first parity-to-bit messages and the second bit-to-parity messages
//    of bits c1..c4 against the published values (three decimals), all
//    messages and the posteriors against the reference, and the decoded
//    word (all ones);
//  * random noisy codewords: posteriors against the reference;
//  * the latency of 2 + 21*ITERS clock edges from start to done.
module tb_ldpc12_sp_decoder;
  import ldpc12_pkg::*;
  localparam int PW    = 16;
  localparam int ITERS = 2;
  localparam real SCALE = 65536.0;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [PW-1:0] chan [12];
  logic [PW-1:0] post [12];
  logic [11:0]   hard;
  logic          busy, done, ok;
  int checks = 0, failures = 0;

  int eq [9][4] = '{'{3, 6, 7, 8}, '{1, 2, 5, 12}, '{4, 9, 10, 11},
                    '{2, 6, 7, 10}, '{1, 3, 8, 11}, '{4, 5, 9, 12},
                    '{1, 4, 5, 7}, '{6, 8, 11, 12}, '{2, 3, 9, 10}};
  real r_v2c [36], r_c2v [36], r_post [12], r_chan [12];

  ldpc12_sp_decoder dut (.clk(clk), .rst_n(rst_n), .start(start), .chan(chan),
    .busy(busy), .done(done), .post(post), .hard(hard), .ok(ok));

  always #5 clk = ~clk;

  function automatic real fx(logic [PW-1:0] v);
    return real'(v) / SCALE;
  endfunction

  function automatic real odds_comb(real a, real b, real c);
    real p1, p0;
    p1 = a * b * c;
    p0 = (1.0 - a) * (1.0 - b) * (1.0 - c);
    return p1 / (p1 + p0);
  endfunction

  // reference: edges of bit k (0-based) in increasing edge order
  function automatic void bit_edges(int k, output int e [3]);
    int n = 0;
    for (int m = 0; m < 9; m++)
      for (int j = 0; j < 4; j++)
        if (eq[m][j] - 1 == k) begin e[n] = 4*m + j; n++; end
  endfunction

  function automatic void ref_check();
    for (int m = 0; m < 9; m++)
      for (int j = 0; j < 4; j++) begin
        real prod = 1.0;
        for (int i = 0; i < 4; i++) if (i != j) prod *= 1.0 - 2.0 * r_v2c[4*m + i];
        r_c2v[4*m + j] = (1.0 - prod) / 2.0;
      end
  endfunction

  function automatic void ref_bit();
    for (int k = 0; k < 12; k++) begin
      int e [3];
      real a, b, c;
      bit_edges(k, e);
      a = r_c2v[e[0]]; b = r_c2v[e[1]]; c = r_c2v[e[2]];
      r_v2c[e[0]] = odds_comb(r_chan[k], b, c);
      r_v2c[e[1]] = odds_comb(r_chan[k], a, c);
      r_v2c[e[2]] = odds_comb(r_chan[k], a, b);
      r_post[k]   = odds_comb(odds_comb(r_chan[k], a, b), c, 0.5);
    end
  endfunction

  task automatic expect_close(string what, real got, real want, real tol);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, want);
    end
  endtask

  // run one decode; sample the messages after the first Down and first Up
  task automatic run(input real p [12], input logic check_published);
    int edges;
    real pub_down [4][3] = '{'{0.5, 0.436, 0.372}, '{0.756, 0.756, 0.436},
                          '{0.756, 0.756, 0.5}, '{0.756, 0.756, 0.756}};
    real pub_up [4][3] = '{'{0.805, 0.842, 0.874}, '{0.705, 0.705, 0.906},
                          '{0.674, 0.674, 0.865}, '{0.804, 0.804, 0.804}};
    for (int k = 0; k < 12; k++) begin
      chan[k]   = PW'(int'(p[k] * SCALE));
      r_chan[k] = fx(chan[k]);
    end
    for (int m = 0; m < 9; m++)
      for (int j = 0; j < 4; j++) r_v2c[4*m + j] = r_chan[eq[m][j] - 1];
    @(negedge clk);
    start = 1;
    @(posedge clk);
    edges = 0;
    @(negedge clk);
    start = 0;
    for (int it = 0; it < ITERS; it++) begin
      // wait for the end of the Down step: LOAD (first iteration) + 9 edges
      repeat ((it == 0 ? 1 : 0) + 9) begin @(posedge clk); edges++; end
      #1;
      ref_check();
      for (int e = 0; e < 36; e++)
        expect_close($sformatf("iter %0d c2v[%0d]", it, e), fx(dut.c2v[e]), r_c2v[e], 0.0005);
      if (check_published && it == 0)
        for (int k = 0; k < 4; k++) begin
          int e [3];
          bit_edges(k, e);
          for (int n = 0; n < 3; n++)
            expect_close($sformatf("published Down message to c%0d", k + 1),
                         fx(dut.c2v[e[n]]), pub_down[k][n], 0.001);
        end
      repeat (12) begin @(posedge clk); edges++; end
      #1;
      ref_bit();
      for (int e = 0; e < 36; e++)
        expect_close($sformatf("iter %0d v2c[%0d]", it, e), fx(dut.v2c[e]), r_v2c[e], 0.0005);
      if (check_published && it == 0)
        for (int k = 0; k < 4; k++) begin
          int e [3];
          bit_edges(k, e);
          for (int n = 0; n < 3; n++)
            expect_close($sformatf("published Up message from c%0d", k + 1),
                         fx(dut.v2c[e[n]]), pub_up[k][n], 0.001);
        end
    end
    while (!done && edges < 200) begin @(posedge clk); edges++; #1; end
    checks++;
    if (edges != 2 + 21*ITERS) begin
      failures++;
      $display("FAIL latency %0d edges, expected %0d", edges, 2 + 21*ITERS);
    end
    for (int k = 0; k < 12; k++) begin
      expect_close($sformatf("posterior c%0d", k + 1), fx(post[k]), r_post[k], 0.0005);
      checks++;
      if (hard[k] != (r_post[k] >= 0.5)) begin
        failures++;
        $display("FAIL hard decision c%0d", k + 1);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p [12];
    foreach (chan[k]) chan[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    p = '{0.9, 0.5, 0.4, 0.3, 0.9, 0.9, 0.9, 0.9, 0.9, 0.9, 0.9, 0.9};
    run(p, 1'b1);
    $write("worked example posteriors:");
    for (int k = 0; k < 12; k++) $write(" %0.3f", fx(post[k]));
    $display("  hard=%b ok=%b", hard, ok);
    checks++;
    if (hard != 12'hFFF || !ok) begin
      failures++;
      $display("FAIL worked example not decoded to all ones");
    end

    // random codewords (from the reference syndrome) through a noisy channel
    for (int n = 0; n < 40; n++) begin
      logic [11:0] cw;
      logic [8:0]  s;
      do begin
        cw = 12'($urandom);
        for (int m = 0; m < 9; m++) begin
          s[m] = 1'b0;
          for (int j = 0; j < 4; j++) s[m] ^= cw[eq[m][j] - 1];
        end
      end while (s != 0);
      for (int k = 0; k < 12; k++) begin
        real q;
        q = 0.05 + 0.6 * real'($urandom % 1000) / 1000.0;   // 0.05 .. 0.65
        p[k] = cw[k] ? 1.0 - q : q;
      end
      run(p, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
