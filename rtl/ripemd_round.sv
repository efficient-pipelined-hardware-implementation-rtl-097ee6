// ripemd_round: one transformation round of one line (Round 1..5).
//
// Holds the round's 160-bit pipeline register and its operation block, with
// the round's boolean function and constant fixed by ROUND and LINE. On each
// cycle in which the round's Count_16 is active the register takes the result
// of one step, so after 16 active cycles it holds the round's output, which
// the next round picks up through its Mux_A. The rotation amount of each step
// comes from a 16-entry table indexed by the step count. The register is the
// "register at the end of each transformation round" of the design; it is the
// same register that carries the state between the round's own steps.
module ripemd_round
  import ripemd_pkg::*;
#(
  parameter int unsigned ROUND = 0,     // 0..4 for rounds 1..5
  parameter line_e       LINE  = LEFT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [3:0] step,
  input  state_t     st_in,
  input  word_t      x,
  output state_t     st_q
);

  logic [3:0] s;
  state_t     st_next;

  always_comb s = s_of(LINE, ROUND, 32'(step));

  ripemd_op #(.FUNC(f_of(LINE, ROUND)), .K(k_of(LINE, ROUND))) u_op (
    .st_in (st_in),
    .x     (x),
    .s     (s),
    .st_out(st_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  st_q <= '0;
    else if (en) st_q <= st_next;
  end

endmodule
