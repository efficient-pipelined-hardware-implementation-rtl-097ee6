// ripemd_bist: built-in self test for the RIPEMD-160 core.
//
// On `start` it plays N_VEC predefined one-block messages into the core at the
// core's full rate: start_counter1 every 16 cycles, start_round1 and the block
// one cycle later, the block held for the following 16 cycles, h set to the
// RIPEMD-160 initial value. With five vectors all five pipeline stages are
// busy at once. Each digest reported with hash_ready is compared, in order,
// with its expected value; after the last one `done` rises and `pass` tells
// whether all matched. A new `start` begins another run.
//
// The vectors are the padded one-block test messages of the RIPEMD-160
// specification ("", "a", "abc", "message digest", "a".."z") and their
// published digests. Generating test inputs and checking responses on chip is
// what the design's BIST does; the choice of vectors and this sequencing are
// this design's own.
module ripemd_bist
  import ripemd_pkg::*;
#(
  parameter int unsigned N_VEC = 5   // 1..5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output logic   start_counter1,
  output logic   start_round1,
  output block_t block,
  output hash_t  h,
  input  logic   hash_ready,
  input  hash_t  digest,
  output logic   busy,
  output logic   done,
  output logic   pass
);

  localparam block_t VEC [5] = '{
    512'h00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000080,
    512'h00000000_00000008_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00008061,
    512'h00000000_00000018_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_80636261,
    512'h00000000_00000070_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00807473_65676964_20656761_7373656d,
    512'h00000000_000000d0_00000000_00000000_00000000_00000000_00000000_00000000_00000000_00807a79_78777675_74737271_706f6e6d_6c6b6a69_68676665_64636261};

  localparam hash_t EXP [5] = '{
    160'h318d25b2_48f5e87e_97082861_54fce9c5_a585119c,
    160'hfe7f465a_83dcf4e6_7b34aeda_e93e6b25_2d9ddc0b,
    160'hfc0b5af1_87b0c698_8e4a049b_7a985de0_f708b28e,
    160'h365f5921_fa5fa823_b181b872_e5fad249_ef89065d,
    160'hbc8d70b3_65289d5b_ebdcbb56_1b2c699c_10271cf7};

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e     state;
  logic [3:0] phase;      // cycle within the 16-cycle issue slot
  logic [2:0] n_issued;
  logic [2:0] n_checked;
  logic [2:0] cur;        // vector currently on `block`
  logic       fail;

  always_comb begin
    start_counter1 = (state == S_RUN) && (phase == 4'd0) && (n_issued < 3'(N_VEC));
    block          = VEC[cur];
    h              = IV;
    busy           = (state == S_RUN);
    done           = (state == S_DONE);
    pass           = done && !fail;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      phase        <= '0;
      n_issued     <= '0;
      n_checked    <= '0;
      cur          <= '0;
      fail         <= 1'b0;
      start_round1 <= 1'b0;
    end else begin
      start_round1 <= start_counter1;
      if (start && state != S_RUN) begin
        state     <= S_RUN;
        phase     <= '0;
        n_issued  <= '0;
        n_checked <= '0;
        fail      <= 1'b0;
      end else if (state == S_RUN) begin
        phase <= phase + 4'd1;
        if (start_counter1) begin
          cur      <= n_issued;
          n_issued <= n_issued + 3'd1;
        end
        if (hash_ready) begin
          if (digest != EXP[n_checked]) fail <= 1'b1;
          n_checked <= n_checked + 3'd1;
          if (n_checked == 3'(N_VEC - 1)) state <= S_DONE;
        end
      end
    end
  end

endmodule
