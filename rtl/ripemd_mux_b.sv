// ripemd_mux_b: message word select for a round (Mux_B).
//
// A 16:1 word multiplexer driven by the round's step count. Rounds 2..5 read an
// X register that already holds the words in the order the round uses them,
// so word number `sel` is taken. Round 1 reads block_in directly: the left
// line's round-1 order is the natural order, the right line's round-1 order
// (word 9*i+5 mod 16 at step i) is wired into the select when FIRST is set.
// Combinational.
module ripemd_mux_b
  import ripemd_pkg::*;
#(
  parameter line_e LINE  = LEFT,
  parameter bit    FIRST = 1'b0
) (
  input  block_t     words,
  input  logic [3:0] sel,
  output word_t      x
);

  logic [3:0] idx;

  always_comb begin
    idx = FIRST ? r_of(LINE, 0, 32'(sel)) : sel;
    x   = words[idx];
  end

endmodule
