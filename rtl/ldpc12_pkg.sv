// Parity check matrix of the small regular LDPC code with n = 12 code
// symbols and nine parity check equations. Every symbol takes part in three
// equations and every equation holds four symbols. Symbol c_k is bit k-1 of
// a 12-bit word; row m of H_ROWS is equation m+1:
//   1: c3 c6 c7 c8      4: c2 c6 c7 c10     7: c1 c4 c5 c7
//   2: c1 c2 c5 c12     5: c1 c3 c8 c11     8: c6 c8 c11 c12
//   3: c4 c9 c10 c11    6: c4 c5 c9 c12     9: c2 c3 c9 c10
package ldpc12_pkg;

  localparam int unsigned N_BITS   = 12;
  localparam int unsigned N_CHECKS = 9;

  typedef logic [N_BITS-1:0] word_t;

  localparam word_t H_ROWS [N_CHECKS] = '{
    12'h0E4, 12'h813, 12'h708, 12'h262, 12'h485,
    12'h918, 12'h059, 12'hCA0, 12'h306
  };

  // The same equations as lists of 0-based bit numbers (edge e = 4*m + j of
  // the Tanner graph joins equation m and bit EQ_BITS[m][j]).
  localparam int unsigned N_EDGES = N_CHECKS * 4;
  typedef int unsigned eq_bits_t   [N_CHECKS][4];
  typedef int unsigned bit_edges_t [N_BITS][3];

  localparam eq_bits_t EQ_BITS = '{
    '{2, 5, 6, 7}, '{0, 1, 4, 11}, '{3, 8, 9, 10}, '{1, 5, 6, 9}, '{0, 2, 7, 10},
    '{3, 4, 8, 11}, '{0, 3, 4, 6}, '{5, 7, 10, 11}, '{1, 2, 8, 9}
  };

  // For every bit k, the three edges that join it to its equations: the
  // positions of k in EQ_BITS, in increasing edge order.
  localparam bit_edges_t BIT_EDGES = '{
    '{4, 16, 24}, '{5, 12, 32}, '{0, 17, 33}, '{8, 20, 25},
    '{6, 21, 26}, '{1, 13, 28}, '{2, 14, 27}, '{3, 18, 29},
    '{9, 22, 34}, '{10, 15, 35}, '{11, 19, 30}, '{7, 23, 31}
  };

endpackage
