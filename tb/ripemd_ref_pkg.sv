// ripemd_ref_pkg: software reference model of RIPEMD-160 for the testbenches.
//
// Written independently of the RTL tables: the word order of every step is
// derived from the permutations rho and pi of the RIPEMD-160 specification
// (left line: rho^j(i), right line: rho^j(pi(i)), pi(i) = 9i+5 mod 16), and the
// rotation amount from the per-word shift table (s = shift[j][word]). The
// model computes a single step, a whole round of one line, a full compression
// and the padding of a byte string into 512-bit blocks. It is checked against
// the published RIPEMD-160 test digests by the core testbench.
package ripemd_ref_pkg;

  typedef logic [31:0]       w_t;
  typedef logic [15:0][31:0] blk_t;   // word i = bits 32i+31..32i
  typedef logic [4:0][31:0]  h_t;     // word i = h_i

  localparam int RHO [16] = '{7, 4, 13, 1, 10, 6, 15, 3, 12, 0, 9, 5, 2, 14, 11, 8};
  localparam int SHIFT [5][16] = '{
    '{11, 14, 15, 12, 5, 8, 7, 9, 11, 13, 14, 15, 6, 7, 9, 8},
    '{12, 13, 11, 15, 6, 9, 9, 7, 12, 15, 11, 13, 7, 8, 7, 7},
    '{13, 15, 14, 11, 7, 7, 6, 8, 13, 14, 13, 12, 5, 5, 6, 9},
    '{14, 11, 12, 14, 8, 6, 5, 5, 15, 12, 15, 14, 9, 9, 8, 6},
    '{15, 12, 13, 13, 9, 5, 8, 6, 14, 11, 12, 11, 8, 6, 5, 5}};
  localparam w_t KL [5] = '{32'h0, 32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC, 32'hA953FD4E};
  localparam w_t KR [5] = '{32'h50A28BE6, 32'h5C4DD124, 32'h6D703EF3, 32'h7A6D76E9, 32'h0};
  localparam h_t IV0 = {32'hC3D2E1F0, 32'h10325476, 32'h98BADCFE, 32'hEFCDAB89, 32'h67452301};

  function automatic w_t rotl(w_t x, int n);
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  function automatic w_t fn(int j, w_t x, w_t y, w_t z);
    case (j)
      0: return x ^ y ^ z;
      1: return (x & y) | (~x & z);
      2: return (x | ~y) ^ z;
      3: return (x & z) | (y & ~z);
      default: return x ^ (y | ~z);
    endcase
  endfunction

  // word index used at step i of round j; right = 1 for the right line
  function automatic int widx(bit right, int j, int i);
    int v = right ? (9 * i + 5) % 16 : i;
    for (int k = 0; k < j; k++) v = RHO[v];
    return v;
  endfunction

  function automatic int shamt(bit right, int j, int i);
    return SHIFT[j][widx(right, j, i)];
  endfunction

  // One step on state {a,b,c,d,e} held as st[0..4].
  function automatic h_t step(h_t st, int f, w_t k, int s, w_t x);
    h_t o;
    o[0] = st[4];
    o[1] = st[4] + rotl(st[0] + fn(f, st[1], st[2], st[3]) + x + k, s);
    o[2] = st[1];
    o[3] = rotl(st[2], 10);
    o[4] = st[3];
    return o;
  endfunction

  // All 16 steps of round j of one line, X in natural order.
  function automatic h_t round16(h_t st, bit right, int j, blk_t X);
    for (int i = 0; i < 16; i++)
      st = step(st, right ? 4 - j : j, right ? KR[j] : KL[j], shamt(right, j, i),
                X[widx(right, j, i)]);
    return st;
  endfunction

  function automatic h_t final_add(h_t h, h_t l, h_t r);
    h_t o;
    o[0] = h[1] + l[2] + r[3];
    o[1] = h[2] + l[3] + r[4];
    o[2] = h[3] + l[4] + r[0];
    o[3] = h[4] + l[0] + r[1];
    o[4] = h[0] + l[1] + r[2];
    return o;
  endfunction

  function automatic h_t compress(h_t h, blk_t X);
    h_t l = h, r = h;
    for (int j = 0; j < 5; j++) begin
      l = round16(l, 1'b0, j, X);
      r = round16(r, 1'b1, j, X);
    end
    return final_add(h, l, r);
  endfunction

  // Pads a byte string (RIPEMD-160 / MD4 style, little-endian length).
  function automatic void pad(input byte unsigned msg[$], output blk_t blks[$]);
    byte unsigned m[$];
    longint unsigned bits;
    m = msg;
    bits = 64'(msg.size()) * 8;
    m.push_back(8'h80);
    while (m.size() % 64 != 56) m.push_back(8'h00);
    for (int i = 0; i < 8; i++) m.push_back(8'(bits >> (8 * i)));
    blks = {};
    for (int b = 0; b < m.size() / 64; b++) begin
      blk_t X;
      for (int w = 0; w < 16; w++)
        X[w] = {m[64*b+4*w+3], m[64*b+4*w+2], m[64*b+4*w+1], m[64*b+4*w]};
      blks.push_back(X);
    end
  endfunction

  function automatic h_t hash_bytes(byte unsigned msg[$]);
    blk_t blks[$];
    h_t h = IV0;
    pad(msg, blks);
    foreach (blks[b]) h = compress(h, blks[b]);
    return h;
  endfunction

  function automatic void str2bytes(input string s, output byte unsigned m[$]);
    m = {};
    for (int i = 0; i < s.len(); i++) m.push_back(s[i]);
  endfunction

endpackage
