// End-to-end testbench of ecc_match_top at its default parameters.
//
// Matching unit: stores the DMC codewords of random tags, corrupts them with
// 0 to 8 bit errors and looks them up with the original tag and with other
// tags; the expected match comes from an independent encoder and $countones.
// LDPC encoder and bit-flipping decoder: random messages are encoded (each
// codeword is checked against the equations), hit by 0 to 4 bit errors and
// decoded; the result is compared with a reference decoder (word, success, iteration count). The
// worked soft-decoding example is also decoded on its hard decisions.
// Sum-product decoder: the worked example, which must decode to all ones
// where the hard-decision decoder does not.
// Accumulator chain: accumulators are cleared and filled one after another,
// each parity is checked against the XOR of its bits and of the previous
// parity.
// Each mechanism must occur at least once: exact match, match after one
// corrected bit, near mismatch (distance 2..3), far mismatch flagged by Q, by
// R and by S, a decode in zero iterations, a decode after flipping, a decode
// that gives up at the iteration limit, a soft decode that succeeds where
// bit flipping did not, and a chained parity.
module tb_ecc_match_top;
  import ecc_match_pkg::*;
  import ldpc12_pkg::*;
  localparam int NACC     = 4;   // top defaults
  localparam int MAX_ITER = 8;
  localparam int PW       = 16;
  localparam int SP_ITERS = 2;

  logic             clk = 0, rst_n = 0;
  logic [3:0]       in_tag;
  logic [7:0]       stored_cw;
  logic             match, dist_far;
  qrstuv_t          weights;
  logic [2:0]       dist_low;
  logic             dec_start = 0, dec_busy, dec_done, dec_ok;
  logic [11:0]      dec_rx, dec_word;
  logic [7:0]       dec_iters;
  logic [NACC-1:0]  acc_clear = '0, acc_valid = '0, acc_d = '0, acc_p;
  logic [4:0]       enc_msg;
  logic [11:0]      enc_cw;
  logic             sp_start = 0, sp_busy, sp_done, sp_ok;
  logic [PW-1:0]    sp_chan [12], sp_post [12];
  logic [11:0]      sp_hard;

  int checks = 0, failures = 0;
  int n_exact, n_corr, n_near, n_q, n_r, n_s, n_dec0, n_decflip, n_decfail, n_chain;
  int n_soft;

  int eq [9][4] = '{'{3, 6, 7, 8}, '{1, 2, 5, 12}, '{4, 9, 10, 11},
                    '{2, 6, 7, 10}, '{1, 3, 8, 11}, '{4, 5, 9, 12},
                    '{1, 4, 5, 7}, '{6, 8, 11, 12}, '{2, 3, 9, 10}};

  ecc_match_top dut (
    .clk(clk), .rst_n(rst_n),
    .in_tag(in_tag), .stored_cw(stored_cw), .match(match), .weights(weights),
    .dist_low(dist_low), .dist_far(dist_far),
    .enc_msg(enc_msg), .enc_cw(enc_cw),
    .dec_start(dec_start), .dec_rx(dec_rx), .dec_busy(dec_busy), .dec_done(dec_done),
    .dec_ok(dec_ok), .dec_word(dec_word), .dec_iters(dec_iters),
    .sp_start(sp_start), .sp_chan(sp_chan), .sp_busy(sp_busy), .sp_done(sp_done),
    .sp_post(sp_post), .sp_hard(sp_hard), .sp_ok(sp_ok),
    .acc_clear(acc_clear), .acc_valid(acc_valid), .acc_d(acc_d), .acc_p(acc_p)
  );

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_encode(logic [3:0] t);
    // rows {i1 i0 | H0}, {i3 i2 | H1}; columns give V0, V1
    return {t[1] ^ t[3], t[0] ^ t[2], t[3] ^ t[2], t[1] ^ t[0], t};
  endfunction

  function automatic logic [8:0] ref_syn(logic [11:0] w);
    logic [8:0] s;
    for (int m = 0; m < 9; m++) begin
      s[m] = 1'b0;
      for (int j = 0; j < 4; j++) s[m] ^= w[eq[m][j] - 1];
    end
    return s;
  endfunction

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

  function automatic logic [11:0] flip_bits(logic [11:0] w, int nerr);
    logic [11:0] m = '0;
    while ($countones(m) < nerr) m[$urandom % 12] = 1'b1;
    return w ^ m;
  endfunction

  function automatic logic [7:0] flip8(logic [7:0] w, int nerr);
    logic [7:0] m = '0;
    while ($countones(m) < nerr) m[$urandom % 8] = 1'b1;
    return w ^ m;
  endfunction

  task automatic lookup(input logic [3:0] tag, input logic [7:0] stored);
    int hd;
    in_tag = tag; stored_cw = stored;
    #1;
    hd = $countones(ref_encode(tag) ^ stored);
    checks++;
    if (match != (hd <= 1)) begin
      failures++;
      $display("FAIL match tag=%h stored=%b distance %0d match=%b", tag, stored, hd, match);
    end
    if (hd == 0 && match) n_exact++;
    if (hd == 1 && match) n_corr++;
    if (hd inside {[2:3]} && !match) n_near++;
    if (weights.q) n_q++;
    if (weights.r) n_r++;
    if (weights.s) n_s++;
  endtask

  task automatic decode(input logic [11:0] word);
    logic [11:0] e_w;
    logic        e_ok;
    int          e_it, edges;
    ref_decode(word, e_w, e_ok, e_it);
    @(negedge clk);
    dec_rx = word; dec_start = 1;
    @(posedge clk);
    edges = 0;
    @(negedge clk);
    dec_start = 0;
    while (!dec_done && edges < 50) begin
      @(posedge clk);
      edges++;
      #1;
    end
    checks++;
    if (dec_word != e_w || dec_ok != e_ok || int'(dec_iters) != e_it || edges != e_it + 1) begin
      failures++;
      $display("FAIL decode rx=%b got %b ok=%b it=%0d edges=%0d, expected %b %b %0d",
               word, dec_word, dec_ok, dec_iters, edges, e_w, e_ok, e_it);
    end
    if (dec_ok && dec_iters == 0) n_dec0++;
    if (dec_ok && dec_iters != 0) n_decflip++;
    if (!dec_ok) n_decfail++;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expp [NACC];
    {n_exact, n_corr, n_near, n_q, n_r, n_s, n_dec0, n_decflip, n_decfail, n_chain, n_soft} = '0;
    foreach (sp_chan[k]) sp_chan[k] = '0;
    in_tag = '0; stored_cw = '0; dec_rx = '0; enc_msg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- matching unit
    for (int n = 0; n < 2000; n++) begin
      logic [3:0] t;
      t = 4'($urandom);
      lookup(t, flip8(ref_encode(t), int'($urandom % 9)));
      lookup(4'($urandom), flip8(ref_encode(t), int'($urandom % 3)));
    end

    // ---- bit-flipping decoder
    for (int n = 0; n < 400; n++) begin
      enc_msg = 5'($urandom);
      #1;
      checks++;
      if (ref_syn(enc_cw) != 0 || enc_cw[4:0] != enc_msg) begin
        failures++;
        $display("FAIL encoder msg=%b cw=%b", enc_msg, enc_cw);
      end
      decode(flip_bits(enc_cw, int'($urandom % 5)));
    end
    decode(12'hFF1);   // hard decisions of Pr[c=1] = 0.9 0.5 0.4 0.3 0.9 ... 0.9
    $display("worked example: received %b decoded %b ok=%b after %0d iterations",
             12'hFF1, dec_word, dec_ok, dec_iters);

    // ---- sum-product decoder on the worked example: where hard decisions
    // fail, the soft decoder recovers the all-ones codeword
    begin
      real pe [12] = '{0.9, 0.5, 0.4, 0.3, 0.9, 0.9, 0.9, 0.9, 0.9, 0.9, 0.9, 0.9};
      int edges;
      for (int k = 0; k < 12; k++) sp_chan[k] = PW'(int'(pe[k] * 65536.0));
      @(negedge clk);
      sp_start = 1;
      @(posedge clk);
      edges = 0;
      @(negedge clk);
      sp_start = 0;
      while (!sp_done && edges < 200) begin @(posedge clk); edges++; #1; end
      checks++;
      if (sp_hard != 12'hFFF || !sp_ok || edges != 2 + 21*SP_ITERS) begin
        failures++;
        $display("FAIL soft decode hard=%b ok=%b edges=%0d", sp_hard, sp_ok, edges);
      end
      if (sp_ok && sp_hard == 12'hFFF && dec_word != 12'hFFF) n_soft++;
      $display("soft decode of the worked example: %b ok=%b after %0d edges",
               sp_hard, sp_ok, edges);
    end

    // ---- accumulator chain
    for (int f = 0; f < 20; f++) begin
      for (int j = 0; j < NACC; j++) begin
        int len;
        @(negedge clk);
        acc_clear = '0; acc_clear[j] = 1'b1;
        expp[j] = (j == 0) ? 1'b0 : expp[j-1];
        if (j != 0) n_chain++;
        @(negedge clk);
        acc_clear = '0;
        len = 1 + int'($urandom % 16);
        for (int k = 0; k < len; k++) begin
          acc_valid = '0; acc_d = NACC'($urandom);
          acc_valid[j] = 1'b1;
          expp[j] ^= acc_d[j];
          @(negedge clk);
        end
        acc_valid = '0;
        checks++;
        if (acc_p[j] != expp[j]) begin
          failures++;
          $display("FAIL accumulator %0d frame %0d p=%b expected %b", j, f, acc_p[j], expp[j]);
        end
      end
    end

    $display("mechanisms: exact=%0d corrected=%0d near_miss=%0d Q=%0d R=%0d S=%0d",
             n_exact, n_corr, n_near, n_q, n_r, n_s);
    $display("            decode_0_iter=%0d decode_flipped=%0d decode_gave_up=%0d chained=%0d soft_beats_hard=%0d",
             n_dec0, n_decflip, n_decfail, n_chain, n_soft);
    checks++;
    if (n_exact == 0 || n_corr == 0 || n_near == 0 || n_q == 0 || n_r == 0 || n_s == 0 ||
        n_dec0 == 0 || n_decflip == 0 || n_decfail == 0 || n_chain == 0 || n_soft == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
