// ripemd_mux_a: state select in front of a round (Mux_A).
//
// At a round's first step the message handed over to the round (h0..h4 for
// round 1, the previous round's register otherwise) is taken; on the other
// fifteen steps the round's own register is fed back. Purely combinational;
// sel_new comes from start_round1 (round 1) or from the round's Count_16.
module ripemd_mux_a
  import ripemd_pkg::*;
(
  input  logic   sel_new,
  input  state_t st_new,
  input  state_t st_own,
  output state_t st_out
);

  always_comb st_out = sel_new ? st_new : st_own;

endmodule
