// ripemd_op: the RIPEMD-160 operation block (one step of one line).
//
// Combinational. From the state a..e of step t-1, the message word X and the
// rotation amount s it forms
//   b_t = e + ROL_s(f(b, c, d) + a + X + K),  a_t = e,  c_t = b,
//   d_t = ROL_10(c),                          e_t = d.
// The adders are ordered as in the block diagram of the design: K + X first,
// then + a, then + f, then the rotation and the final + e, so the critical path
// holds three additions after K + X. FUNC (0..4 for f1..f5) and K are fixed per
// round instance; the round's f and K come from the RIPEMD-160 specification.
// The rotation amount varies per step and is an input.
module ripemd_op
  import ripemd_pkg::*;
#(
  parameter int unsigned FUNC = 0,
  parameter word_t       K    = 32'h0000_0000
) (
  input  state_t     st_in,
  input  word_t      x,
  input  logic [3:0] s,
  output state_t     st_out
);

  word_t kx, sum_a, sum_f, rot;

  always_comb begin
    kx     = K + x;
    sum_a  = kx + st_in.a;
    sum_f  = sum_a + f_sel(FUNC, st_in.b, st_in.c, st_in.d);
    rot    = (s == 4'd0) ? sum_f : rol(sum_f, 32'(s));
    st_out.b = st_in.e + rot;
    st_out.a = st_in.e;
    st_out.c = st_in.b;
    st_out.d = rol(st_in.c, 10);
    st_out.e = st_in.d;
  end

endmodule
