// Self-checking testbench for the second BWA level: all 256 combinations of
// the two first-level output vectors. With D the weighted sum of the inputs:
// when Q, R and S are clear, 2T + 2U + V must equal D; when any is set, D
// must be at least four; Q must be the OR of the two weight-4 inputs.
module tb_bwa_second_level;
  import ecc_match_pkg::*;
  bwa4_out_t tag_w, par_w;
  qrstuv_t   o;
  int checks = 0, failures = 0;

  bwa_second_level dut (.tag_w(tag_w), .par_w(par_w), .o(o));

  function automatic int weight(bwa4_out_t w);
    return 4*int'(w.w4) + 2*int'(w.w2a) + 2*int'(w.w2b) + int'(w.w1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 256; n++) begin
      int d, low;
      logic big;
      {tag_w, par_w} = 8'(n);
      #1;
      d   = weight(tag_w) + weight(par_w);
      big = o.q | o.r | o.s;
      low = 2*int'(o.t) + 2*int'(o.u) + int'(o.v);
      checks++;
      if (!big && low != d) begin
        failures++;
        $display("FAIL tag=%b par=%b o=%b low=%0d D=%0d", tag_w, par_w, o, low, d);
      end
      checks++;
      if (big && d < 4) begin
        failures++;
        $display("FAIL tag=%b par=%b o=%b flags far but D=%0d", tag_w, par_w, o, d);
      end
      checks++;
      if (o.q != (tag_w.w4 | par_w.w4)) begin
        failures++;
        $display("FAIL q=%b", o.q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
