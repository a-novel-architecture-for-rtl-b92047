// Self-checking testbench for the decision unit at its default TMAX = 1: all
// 64 combinations of Q..V. Match is expected only when none of the weight-4
// flags is set and 2T + 2U + V is at most one.
module tb_decision_unit;
  import ecc_match_pkg::*;
  qrstuv_t    w;
  logic       match, dist_far;
  logic [2:0] dist_low;
  int checks = 0, failures = 0;

  decision_unit dut (.w(w), .match(match), .dist_low(dist_low), .dist_far(dist_far));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      int low;
      logic exp_far, exp_match;
      w = 6'(n);
      #1;
      low       = 2*int'(w.t) + 2*int'(w.u) + int'(w.v);
      exp_far   = w.q || w.r || w.s;
      exp_match = !exp_far && low <= 1;
      checks++;
      if (match != exp_match || dist_far != exp_far || int'(dist_low) != low) begin
        failures++;
        $display("FAIL w=%b match=%b far=%b low=%0d expected %b %b %0d",
                 w, match, dist_far, dist_low, exp_match, exp_far, low);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
