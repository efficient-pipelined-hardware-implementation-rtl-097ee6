// ripemd_top: RIPEMD-160 core with its built-in self test.
//
// The pipelined core (ripemd_core) hashes one 512-bit padded block per 16
// cycles with up to five blocks in flight and a latency of 80 cycles from
// start_round1 to hash_ready. Its inputs come either from the external ports
// or, with bist_mode high, from the BIST unit, which plays five known messages
// through the core and compares the digests. The digest and hash_ready are
// always visible on the ports. Message padding happens outside: block_in must
// already be a padded block, held stable for 16 cycles from start_round1, and
// h_in is the chaining value (the RIPEMD-160 initial value for a message's
// first block, the previous block's digest otherwise). The input select is
// this design's choice of how the self test attaches to the core.
module ripemd_top
  import ripemd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   bist_mode,
  input  logic   bist_start,
  input  logic   start_counter1,
  input  logic   start_round1,
  input  block_t block_in,
  input  hash_t  h_in,
  output logic   hash_ready,
  output hash_t  digest,
  output logic   bist_busy,
  output logic   bist_done,
  output logic   bist_pass
);

  logic   b_sc1, b_sr1;
  block_t b_block;
  hash_t  b_h;
  logic   c_sc1, c_sr1;
  block_t c_block;
  hash_t  c_h;

  ripemd_bist u_bist (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (bist_start && bist_mode),
    .start_counter1(b_sc1),
    .start_round1  (b_sr1),
    .block         (b_block),
    .h             (b_h),
    .hash_ready    (hash_ready),
    .digest        (digest),
    .busy          (bist_busy),
    .done          (bist_done),
    .pass          (bist_pass)
  );

  always_comb begin
    c_sc1   = bist_mode ? b_sc1   : start_counter1;
    c_sr1   = bist_mode ? b_sr1   : start_round1;
    c_block = bist_mode ? b_block : block_in;
    c_h     = bist_mode ? b_h     : h_in;
  end

  ripemd_core u_core (
    .clk           (clk),
    .rst_n         (rst_n),
    .start_counter1(c_sc1),
    .start_round1  (c_sr1),
    .block_in      (c_block),
    .h_in          (c_h),
    .hash_ready    (hash_ready),
    .digest        (digest)
  );

endmodule
