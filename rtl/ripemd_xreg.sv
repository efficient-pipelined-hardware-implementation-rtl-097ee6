// ripemd_xreg: X_i permutation unit and its register (Xi's Permutation + REG).
//
// While a message is in round DST_ROUND-1 (numbered 0..4), this unit reorders
// that message's 16 words into the order round DST_ROUND uses them, and on
// `load` (the last step of the source round) stores them. Round DST_ROUND then
// reads word number `step` through its Mux_B. The source of the unit feeding
// round 2 is block_in in its natural order; later units take the previous X
// register. The permutation is fixed wiring derived from the RIPEMD-160 word
// order tables. Only 16 words per line and message are held, the ones of the
// round the message is in.
module ripemd_xreg
  import ripemd_pkg::*;
#(
  parameter line_e       LINE      = LEFT,
  parameter int unsigned DST_ROUND = 1      // 1..4 for rounds 2..5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t src,
  output block_t q
);

  block_t perm;

  always_comb
    for (int i = 0; i < 16; i++) perm[i] = src[perm_src(LINE, DST_ROUND, i)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= perm;
  end

endmodule
