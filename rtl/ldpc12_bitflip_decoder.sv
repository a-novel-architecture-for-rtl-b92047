// Hard-decision bit-flipping decoder for the n = 12 LDPC code.
//
// Message passing on the Tanner graph with one-bit messages: in each
// iteration the check nodes evaluate their equations on the current word,
// every bit node counts how many of its three equations fail, and the bits
// with the largest count are flipped. Decoding stops as soon as all nine
// equations hold (ok = 1) or after MAX_ITER flipping iterations (ok = 0).
//
// The published description decodes by passing messages along the graph and, in its
// codec example, by flipping bits. The flipping rule (flip the bits with the
// most failing checks), the iteration limit and the handshake are this
// design's choices.
//
// Interface: pulse start for one cycle with the received hard-decision word
// on rx; one iteration takes one clock cycle. done pulses for one cycle with
// dec, ok and iters valid; they hold until the next start. A start while
// busy is ignored. Latency: done is high after the clock edge iters + 1
// edges after the one that samples start.
module ldpc12_bitflip_decoder
  import ldpc12_pkg::*;
#(
  parameter int unsigned MAX_ITER = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  word_t      rx,
  output logic       busy,
  output logic       done,
  output logic       ok,
  output word_t      dec,
  output logic [7:0] iters
);
  word_t                cur;
  logic [N_CHECKS-1:0]  syn;
  logic [1:0]           cnt [N_BITS];
  logic [1:0]           max_cnt;
  word_t                flip;

  ldpc12_syndrome u_syn (.c(cur), .syndrome(syn));

  // bit nodes: count failing equations per bit, find the largest count
  always_comb begin
    max_cnt = '0;
    for (int k = 0; k < int'(N_BITS); k++) begin
      cnt[k] = '0;
      for (int m = 0; m < int'(N_CHECKS); m++)
        if (H_ROWS[m][k] && syn[m]) cnt[k] = cnt[k] + 2'd1;
      if (cnt[k] > max_cnt) max_cnt = cnt[k];
    end
    for (int k = 0; k < int'(N_BITS); k++)
      flip[k] = (max_cnt != '0) && (cnt[k] == max_cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      ok    <= 1'b0;
      cur   <= '0;
      dec   <= '0;
      iters <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          cur   <= rx;
          iters <= '0;
          busy  <= 1'b1;
        end
      end else if (syn == '0 || 32'(iters) == MAX_ITER) begin
        busy <= 1'b0;
        done <= 1'b1;
        ok   <= (syn == '0);
        dec  <= cur;
      end else begin
        cur   <= cur ^ flip;
        iters <= iters + 8'd1;
      end
    end
  end

  initial assert (MAX_ITER < 256) else $error("MAX_ITER must fit in iters");
  // handshake rules: done is a single-cycle pulse that ends a decode
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_done_idle:  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
