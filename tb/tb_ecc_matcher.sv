// Self-checking testbench for the matching unit: every incoming tag (16)
// against every possible stored 8-bit word (256). The reference encodes the
// tag with the 2x2 row/column parity layout, counts differing bits with
// $countones and expects a match for a distance of at most one. It also
// checks the stored-word cases the unit is meant for: an exact copy, a copy
// with one flipped bit (corrected match) and a different tag (mismatch).
module tb_ecc_matcher;
  import ecc_match_pkg::*;
  logic [3:0] in_tag;
  logic [7:0] stored_cw;
  logic       match, dist_far;
  qrstuv_t    weights;
  logic [2:0] dist_low;
  int checks = 0, failures = 0;
  int n_exact = 0, n_corr = 0, n_miss = 0;

  ecc_matcher dut (.in_tag(in_tag), .stored_cw(stored_cw), .match(match),
                   .weights(weights), .dist_low(dist_low), .dist_far(dist_far));

  function automatic logic [7:0] ref_encode(logic [3:0] t);
    return {t[1] ^ t[3], t[0] ^ t[2], t[3] ^ t[2], t[1] ^ t[0], t};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      for (int s = 0; s < 256; s++) begin
        int hd;
        in_tag = 4'(t); stored_cw = 8'(s);
        #1;
        hd = $countones(ref_encode(in_tag) ^ stored_cw);
        checks++;
        if (match != (hd <= 1)) begin
          failures++;
          $display("FAIL tag=%h stored=%b dist=%0d match=%b", in_tag, stored_cw, hd, match);
        end
        checks++;
        if (!dist_far && int'(dist_low) != hd) begin
          failures++;
          $display("FAIL tag=%h stored=%b dist=%0d dist_low=%0d", in_tag, stored_cw, hd, dist_low);
        end
        if (hd == 0) n_exact++;
        else if (hd == 1) n_corr++;
        else n_miss++;
      end
    end
    // a stored tag is found again despite any single bit error
    for (int t = 0; t < 16; t++) begin
      for (int b = 0; b < 8; b++) begin
        in_tag = 4'(t); stored_cw = ref_encode(4'(t)) ^ (8'(1) << b);
        #1;
        checks++;
        if (!match) begin
          failures++;
          $display("FAIL single error bit %0d of tag %h not matched", b, t);
        end
      end
    end
    checks++;
    if (n_exact != 16 || n_corr != 128) begin
      failures++;
      $display("FAIL case counts exact=%0d corrected=%0d", n_exact, n_corr);
    end
    $display("cases: exact=%0d corrected=%0d mismatch=%0d", n_exact, n_corr, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
