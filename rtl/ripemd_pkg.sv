// ripemd_pkg: types and constants shared by the pipelined RIPEMD-160 core.
//
// The five-word chaining state (a..e), the 16-word message block and the
// constant tables of RIPEMD-160 live here: the message word order of every
// step (r, r'), the rotation amounts (s, s'), the round constants (K, K') and
// the five boolean functions f1..f5. The left line uses f1..f5 in order, the
// right line in reverse. The tables are those of the RIPEMD-160 specification;
// the pipeline organisation that uses them is in ripemd_core.
//
// Helper functions give the step tables per line/round/step and, for the X
// permutation units, the position a word held in one round's order has in the
// next round's order. All are constant functions, so every table folds into
// wiring or small ROMs at elaboration.
package ripemd_pkg;

  localparam int unsigned N_ROUNDS = 5;   // rounds per line
  localparam int unsigned STEPS    = 16;  // steps (operations) per round

  typedef enum logic {LEFT = 1'b0, RIGHT = 1'b1} line_e;

  // Chaining state as the operation block sees it.
  typedef struct packed {
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] c;
    logic [31:0] d;
    logic [31:0] e;
  } state_t;

  typedef logic [31:0]        word_t;
  typedef word_t [15:0]       block_t;  // block_t[i] = X_i = block_in[32i+31:32i]
  typedef word_t [4:0]        hash_t;   // hash_t[i]  = h_i

  localparam hash_t IV = '{4: 32'hC3D2E1F0, 3: 32'h10325476, 2: 32'h98BADCFE,
                           1: 32'hEFCDAB89, 0: 32'h67452301};

  // Message word selected at step 16*j+i: left line r, right line r'.
  localparam logic [3:0] R_L [80] = '{
     0,  1,  2,  3,  4,  5,  6,  7,  8,  9, 10, 11, 12, 13, 14, 15,
     7,  4, 13,  1, 10,  6, 15,  3, 12,  0,  9,  5,  2, 14, 11,  8,
     3, 10, 14,  4,  9, 15,  8,  1,  2,  7,  0,  6, 13, 11,  5, 12,
     1,  9, 11, 10,  0,  8, 12,  4, 13,  3,  7, 15, 14,  5,  6,  2,
     4,  0,  5,  9,  7, 12,  2, 10, 14,  1,  3,  8, 11,  6, 15, 13};
  localparam logic [3:0] R_R [80] = '{
     5, 14,  7,  0,  9,  2, 11,  4, 13,  6, 15,  8,  1, 10,  3, 12,
     6, 11,  3,  7,  0, 13,  5, 10, 14, 15,  8, 12,  4,  9,  1,  2,
    15,  5,  1,  3,  7, 14,  6,  9, 11,  8, 12,  2, 10,  0,  4, 13,
     8,  6,  4,  1,  3, 11, 15,  0,  5, 12,  2, 13,  9,  7, 10, 14,
    12, 15, 10,  4,  1,  5,  8,  7,  6,  2, 13, 14,  0,  3,  9, 11};

  // Rotation amount at step 16*j+i: left line s, right line s'.
  localparam logic [3:0] S_L [80] = '{
    11, 14, 15, 12,  5,  8,  7,  9, 11, 13, 14, 15,  6,  7,  9,  8,
     7,  6,  8, 13, 11,  9,  7, 15,  7, 12, 15,  9, 11,  7, 13, 12,
    11, 13,  6,  7, 14,  9, 13, 15, 14,  8, 13,  6,  5, 12,  7,  5,
    11, 12, 14, 15, 14, 15,  9,  8,  9, 14,  5,  6,  8,  6,  5, 12,
     9, 15,  5, 11,  6,  8, 13, 12,  5, 12, 13, 14, 11,  8,  5,  6};
  localparam logic [3:0] S_R [80] = '{
     8,  9,  9, 11, 13, 15, 15,  5,  7,  7,  8, 11, 14, 14, 12,  6,
     9, 13, 15,  7, 12,  8,  9, 11,  7,  7, 12,  7,  6, 15, 13, 11,
     9,  7, 15, 11,  8,  6,  6, 14, 12, 13,  5, 14, 13, 13,  7,  5,
    15,  5,  8, 11, 14, 14,  6, 14,  6,  9, 12,  9, 12,  5, 15,  8,
     8,  5, 12,  9, 12,  5, 14,  6,  8, 13,  6,  5, 15, 13, 11, 11};

  localparam word_t K_L [5] = '{32'h00000000, 32'h5A827999, 32'h6ED9EBA1,
                                32'h8F1BBCDC, 32'hA953FD4E};
  localparam word_t K_R [5] = '{32'h50A28BE6, 32'h5C4DD124, 32'h6D703EF3,
                                32'h7A6D76E9, 32'h00000000};

  function automatic word_t rol(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Boolean function f1..f5, selected by fn = 0..4.
  function automatic word_t f_sel(input int unsigned fn, input word_t x, input word_t y,
                                  input word_t z);
    case (fn)
      0:       return x ^ y ^ z;
      1:       return (x & y) | (~x & z);
      2:       return (x | ~y) ^ z;
      3:       return (x & z) | (y & ~z);
      default: return x ^ (y | ~z);
    endcase
  endfunction

  // Function index a round uses: left f1..f5, right f5..f1.
  function automatic int unsigned f_of(input line_e line, input int unsigned round);
    return (line == LEFT) ? round : (N_ROUNDS - 1 - round);
  endfunction

  function automatic word_t k_of(input line_e line, input int unsigned round);
    return (line == LEFT) ? K_L[round] : K_R[round];
  endfunction

  function automatic logic [3:0] r_of(input line_e line, input int unsigned round,
                                      input int unsigned step);
    return (line == LEFT) ? R_L[16*round + step] : R_R[16*round + step];
  endfunction

  function automatic logic [3:0] s_of(input line_e line, input int unsigned round,
                                      input int unsigned step);
    return (line == LEFT) ? S_L[16*round + step] : S_R[16*round + step];
  endfunction

  // X permutation unit wiring. Words enter in the order round dst-1 uses them
  // (for dst = 1: plain block_in order) and leave in the order round dst uses
  // them. Returns the input position that feeds output position i.
  function automatic int unsigned perm_src(input line_e line, input int unsigned dst,
                                           input int unsigned i);
    int unsigned want, p;
    want = 32'(r_of(line, dst, i));
    if (dst == 1) return want;
    for (p = 0; p < STEPS; p++)
      if (r_of(line, dst - 1, p) == want[3:0]) return p;
    return 0;
  endfunction

endpackage
