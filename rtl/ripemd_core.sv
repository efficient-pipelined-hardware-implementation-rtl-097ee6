// ripemd_core: pipelined RIPEMD-160 compression core.
//
// RIPEMD-160 runs two independent lines ("processes") of five rounds of
// sixteen steps over each 512-bit block. Here every round of every line is a
// pipeline stage of its own: ten round units, each doing one step per clock in
// its 160-bit register. A block spends 16 cycles in each round and then moves
// on, so five blocks (each possibly of a different message) are in flight at
// once and a digest leaves every 16 cycles.
//
// Control. Five Count_16 counters, one per round position and shared by both
// lines, track which rounds hold a block and at which step. start_counter1 in
// cycle T-1 starts counter 1; in cycle T block_in and h_in are valid together
// with start_round1, which steers h_in into round 1 through Mux_A. When a
// counter reaches step 15 the next counter starts, so the block enters round
// j+1 in the following cycle, where Mux_A takes round j's register. The digest
// is on `digest` with `hash_ready` high in cycle T+80, for one cycle.
//
// Message words. Round 1 reads block_in directly through Mux_B, which is why
// block_in must stay stable for the 16 cycles T..T+15. For the later rounds an
// X permutation unit reorders the words into the order of the next round and
// its register stores them when the block moves on; Mux_B then picks word
// number `count`. Only the 16 words of the current round are held per line and
// block.
//
// Chaining value. Each block's h_in is carried along the pipeline in one
// register per round position, so the addition level combines the round-5
// results with the h of the same block even when the five blocks in flight
// have different chaining values. This carrying is this design's choice; the
// pipeline, counters, multiplexers, X units and the timing above follow the
// published architecture. A new block may start every 16 cycles at most
// (start_counter1 no earlier than counter 1's step 15), checked by assertion.
module ripemd_core
  import ripemd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start_counter1,
  input  logic   start_round1,
  input  block_t block_in,
  input  hash_t  h_in,
  output logic   hash_ready,
  output hash_t  digest
);

  logic [N_ROUNDS-1:0] active, first, last;
  logic [3:0]          count [N_ROUNDS];

  state_t rq   [2][N_ROUNDS];  // round registers, [line][round]
  state_t rin  [2][N_ROUNDS];  // Mux_A outputs
  word_t  xw   [2][N_ROUNDS];  // Mux_B outputs
  block_t xq   [2][N_ROUNDS];  // [line][0]: block_in, [line][j]: X register of round j
  hash_t  hq   [N_ROUNDS+1];   // chaining value of the block in each round, [5]: output
  state_t h_st;

  always_comb h_st = '{a: h_in[0], b: h_in[1], c: h_in[2], d: h_in[3], e: h_in[4]};

  for (genvar j = 0; j < N_ROUNDS; j++) begin : g_cnt
    ripemd_count16 u_count16 (
      .clk   (clk),
      .rst_n (rst_n),
      .start ((j == 0) ? start_counter1 : last[(j == 0) ? 0 : j-1]),
      .active(active[j]),
      .count (count[j]),
      .first (first[j]),
      .last  (last[j])
    );
  end

  for (genvar l = 0; l < 2; l++) begin : g_line
    localparam line_e LN = (l == 0) ? LEFT : RIGHT;

    assign xq[l][0] = block_in;

    for (genvar j = 0; j < N_ROUNDS; j++) begin : g_round
      if (j == 0) begin : g_first
        ripemd_mux_a u_mux_a (
          .sel_new(start_round1),
          .st_new (h_st),
          .st_own (rq[l][0]),
          .st_out (rin[l][0])
        );
      end else begin : g_next
        ripemd_mux_a u_mux_a (
          .sel_new(first[j]),
          .st_new (rq[l][j-1]),
          .st_own (rq[l][j]),
          .st_out (rin[l][j])
        );
        ripemd_xreg #(.LINE(LN), .DST_ROUND(j)) u_xreg (
          .clk  (clk),
          .rst_n(rst_n),
          .load (last[j-1]),
          .src  (xq[l][j-1]),
          .q    (xq[l][j])
        );
      end

      ripemd_mux_b #(.LINE(LN), .FIRST(j == 0)) u_mux_b (
        .words(xq[l][j]),
        .sel  (count[j]),
        .x    (xw[l][j])
      );

      ripemd_round #(.ROUND(j), .LINE(LN)) u_round (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (active[j]),
        .step (count[j]),
        .st_in(rin[l][j]),
        .x    (xw[l][j]),
        .st_q (rq[l][j])
      );
    end
  end

  // Chaining value travelling with its block.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= N_ROUNDS; j++) hq[j] <= '0;
      hash_ready <= 1'b0;
    end else begin
      if (start_round1) hq[0] <= h_in;
      for (int j = 1; j <= N_ROUNDS; j++)
        if (last[j-1]) hq[j] <= hq[j-1];
      hash_ready <= last[N_ROUNDS-1];
    end
  end

  ripemd_addlevel u_addlevel (
    .h     (hq[N_ROUNDS]),
    .lft   (rq[0][N_ROUNDS-1]),
    .rgt   (rq[1][N_ROUNDS-1]),
    .digest(digest)
  );

  // start_round1 must meet counter 1 at step 0, i.e. one cycle after
  // start_counter1; a new block may not enter before the previous one leaves
  // round 1.
  a_round1_aligned : assert property (@(posedge clk) disable iff (!rst_n)
    start_round1 |-> first[0]);
  a_counter1_free : assert property (@(posedge clk) disable iff (!rst_n)
    start_counter1 |-> (!active[0] || last[0]));

endmodule
