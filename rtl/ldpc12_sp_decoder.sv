// Soft message-passing (sum-product) decoder for the n = 12 LDPC code.
//
// Messages are probabilities Pr[c = 1] in unsigned fixed point with PW
// fraction bits (value = p * 2^PW, kept within 1 .. 2^PW - 1). Decoding:
//  1. Up: every bit node broadcasts its channel estimate on its three edges.
//  2. Down: every parity node sends to each of its four bits the probability
//     that the XOR of the other three bits is 1:
//        p_out = (1 - (1-2p_a)(1-2p_b)(1-2p_c)) / 2.
//  3. Up: every bit node sends to each of its equations the combination of
//     its channel estimate with the messages of its two other equations,
//        comb(x, y) = x*y / (x*y + (1-x)*(1-y)),
//     and forms its posterior from the channel estimate and all three.
// Steps 2 and 3 repeat ITERS times. hard[k] = (post[k] >= 1/2) and ok says
// whether the hard decisions satisfy all nine equations.
//
// The message rules and the graph follow the published worked example; the
// fixed-point format, the fixed iteration count, the node scheduling and the
// handshake are this design's own. One parity node is processed per clock
// (nine cycles per Down step) and one bit node per clock (twelve cycles per Up
// step), reusing a single check-node unit and a single bit-node unit.
//
// Interface: pulse start with the channel estimates on chan; done pulses
// once, 2 + 21*ITERS clock edges after the edge that samples start; post,
// hard and ok hold until the next start. A start while busy is ignored.
module ldpc12_sp_decoder
  import ldpc12_pkg::*;
#(
  parameter int unsigned PW    = 16,
  parameter int unsigned ITERS = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [PW-1:0]     chan [N_BITS],
  output logic              busy,
  output logic              done,
  output logic [PW-1:0]     post [N_BITS],
  output word_t             hard,
  output logic              ok
);
  localparam logic [PW:0]   ONE  = {1'b1, {PW{1'b0}}};
  localparam logic [PW-1:0] PMIN = PW'(1);
  localparam logic [PW-1:0] PMAX = {PW{1'b1}};

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_CHECK, S_BIT, S_FIN} state_t;

  state_t        state;
  logic [3:0]    idx;     // parity node (0..8) or bit node (0..11)
  logic [7:0]    iter;
  logic [PW-1:0] chan_r [N_BITS];
  logic [PW-1:0] v2c    [N_EDGES];   // bit -> check messages
  logic [PW-1:0] c2v    [N_EDGES];   // check -> bit messages

  // ---- check-node unit: one parity node per cycle
  function automatic logic signed [PW+1:0] to_d(logic [PW-1:0] p);
    return (PW+2)'($signed({2'b00, ONE}) - $signed({1'b0, p, 1'b0}));   // 1 - 2p
  endfunction

  function automatic logic [PW-1:0] chk_msg(logic [PW-1:0] pa, logic [PW-1:0] pb,
                                            logic [PW-1:0] pc);
    logic signed [2*PW+3:0] t1, t2;
    logic signed [PW+1:0]   d;
    logic signed [PW+2:0]   num;
    t1  = (2*PW+4)'(to_d(pa)) * (2*PW+4)'(to_d(pb));
    d   = (PW+2)'(t1 >>> PW);
    t2  = (2*PW+4)'(d) * (2*PW+4)'(to_d(pc));
    d   = (PW+2)'(t2 >>> PW);
    num = (PW+3)'(($signed({3'b000, ONE}) - (PW+4)'(d)) >>> 1);   // (1 - d) / 2
    if (num < $signed((PW+3)'(PMIN))) return PMIN;
    if (num > $signed((PW+3)'(PMAX))) return PMAX;
    return PW'(num);
  endfunction

  logic [PW-1:0] chk_out [4];
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic [PW-1:0] o [3];
      int n;
      n = 0;
      o = '{default: '0};
      for (int i = 0; i < 4; i++)
        if (i != j) begin
          o[n] = v2c[4*int'(idx) + i];
          n++;
        end
      chk_out[j] = chk_msg(o[0], o[1], o[2]);
    end
  end

  // ---- bit-node unit: one bit node per cycle
  function automatic logic [PW-1:0] comb2(logic [PW-1:0] x, logic [PW-1:0] y);
    logic [2*PW-1:0] p1, p0;
    logic [2*PW:0]   den;
    logic [3*PW:0]   q;
    p1  = (2*PW)'(x) * (2*PW)'(y);
    p0  = (2*PW)'(ONE - (PW+1)'(x)) * (2*PW)'(ONE - (PW+1)'(y));
    den = (2*PW+1)'(p1) + (2*PW+1)'(p0);
    q   = ((3*PW+1)'(p1) << PW) / (3*PW+1)'(den);
    if (q < (3*PW+1)'(PMIN)) return PMIN;
    if (q > (3*PW+1)'(PMAX)) return PMAX;
    return PW'(q);
  endfunction

  logic [PW-1:0] in_a, in_b, in_c, p0_bit;
  logic [PW-1:0] ab, ac, bit_out_a, bit_out_b, bit_out_c, bit_post;
  always_comb begin
    p0_bit    = chan_r[idx];
    in_a      = c2v[BIT_EDGES[idx][0]];
    in_b      = c2v[BIT_EDGES[idx][1]];
    in_c      = c2v[BIT_EDGES[idx][2]];
    ab        = comb2(p0_bit, in_a);
    ac        = comb2(p0_bit, in_c);
    bit_out_a = comb2(comb2(p0_bit, in_b), in_c);   // excludes edge a
    bit_out_b = comb2(ac, in_a);                    // excludes edge b
    bit_out_c = comb2(ab, in_b);                    // excludes edge c
    bit_post  = comb2(bit_out_a, in_a);
  end

  // ---- schedule
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      iter  <= '0;
      done  <= 1'b0;
      for (int k = 0; k < int'(N_BITS); k++) begin
        chan_r[k] <= '0;
        post[k]   <= '0;
      end
      for (int e = 0; e < int'(N_EDGES); e++) begin
        v2c[e] <= '0;
        c2v[e] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int k = 0; k < int'(N_BITS); k++)
            chan_r[k] <= (chan[k] < PMIN) ? PMIN : chan[k];
          state <= S_LOAD;
        end
        S_LOAD: begin                 // first Up: broadcast channel estimates
          for (int m = 0; m < int'(N_CHECKS); m++)
            for (int j = 0; j < 4; j++) v2c[4*m + j] <= chan_r[EQ_BITS[m][j]];
          idx   <= '0;
          iter  <= '0;
          state <= S_CHECK;
        end
        S_CHECK: begin                // Down: parity node idx
          for (int j = 0; j < 4; j++) c2v[4*int'(idx) + j] <= chk_out[j];
          if (idx == 4'(N_CHECKS - 1)) begin
            idx   <= '0;
            state <= S_BIT;
          end else idx <= idx + 4'd1;
        end
        S_BIT: begin                  // Up: bit node idx
          v2c[BIT_EDGES[idx][0]] <= bit_out_a;
          v2c[BIT_EDGES[idx][1]] <= bit_out_b;
          v2c[BIT_EDGES[idx][2]] <= bit_out_c;
          post[idx]              <= bit_post;
          if (idx == 4'(N_BITS - 1)) begin
            idx  <= '0;
            iter <= iter + 8'd1;
            state <= (32'(iter) == ITERS - 1) ? S_FIN : S_CHECK;
          end else idx <= idx + 4'd1;
        end
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  always_comb begin
    for (int k = 0; k < int'(N_BITS); k++) hard[k] = post[k][PW-1];   // p >= 1/2
  end

  logic [N_CHECKS-1:0] syn;
  ldpc12_syndrome u_syn (.c(hard), .syndrome(syn));
  assign ok = (syn == '0);

  initial assert (ITERS >= 1 && ITERS < 256) else $error("ITERS out of range");
  // handshake rules: done is a single-cycle pulse that ends a decode
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  a_done_idle:  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
