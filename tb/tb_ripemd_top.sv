// tb_ripemd_top: end-to-end test of the RIPEMD-160 top level.
//
// First the built-in self test runs (bist_mode high) and must pass. Then the
// inputs switch to the external ports for the traffic below, and finally the
// self test runs once more. Every mechanism of the design is counted and must
// occur: self-test pass, mode switch, all five round stages busy at once,
// back-to-back blocks (counter 1 restarting on its last step), idle slots
// (counters stopping), multi-block messages (chaining a digest into h_in).
//
// Five message streams share the core. A new block may enter every 16 cycles
// (start_counter1 one cycle before start_round1); the scheduler gives each
// slot to a stream whose previous block has left the pipeline, chaining the
// previous digest into h_in, so with five busy streams all five round stages
// hold a block. Some slots are left empty at random to make the counters stop
// and restart. The first messages are the published RIPEMD-160 test strings
// (checked against their published digests), the rest random byte strings of
// 0..250 bytes checked against the reference model. Every digest must come
// 80 cycles after its start_round1. block_in and h_in are overwritten with
// noise whenever the core may no longer rely on them.
module tb_ripemd_top;
  import ripemd_pkg::*;
  import ripemd_ref_pkg::*;

  localparam int N_MSG = 60;
  localparam int LAT   = 80;

  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 0;
  logic   start_counter1 = 0, start_round1 = 0;
  block_t block_in;
  hash_t  h_in;
  logic   hash_ready;
  hash_t  digest;

  logic   bist_mode = 1, bist_start = 0, bist_busy, bist_done, bist_pass;
  int     bist_passes = 0, mode_switches = 0, b2b_starts = 0, chained = 0, last_start = -100;

  ripemd_top dut (.*);

  task automatic bist_run();
    int t;
    bist_mode = 1; mode_switches++;
    @(negedge clk); bist_start = 1; @(negedge clk); bist_start = 0;
    t = 0;
    while (!bist_done && t < 400) begin @(negedge clk); t++; end
    checks++;
    if (bist_pass !== 1'b1 || t != 146) begin
      failures++; $display("BIST pass=%b after %0d cycles", bist_pass, t);
    end else bist_passes++;
    bist_mode = 0; mode_switches++;
  endtask

  always #5 clk = ~clk;

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // known answers: message string and digest {h4..h0}
  string kat_msg [6] = '{"", "a", "abc", "message digest", "abcdefghijklmnopqrstuvwxyz",
                         "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq"};
  h_t    kat_dig [6] = '{
    160'h318d25b2_48f5e87e_97082861_54fce9c5_a585119c,
    160'hfe7f465a_83dcf4e6_7b34aeda_e93e6b25_2d9ddc0b,
    160'hfc0b5af1_87b0c698_8e4a049b_7a985de0_f708b28e,
    160'h365f5921_fa5fa823_b181b872_e5fad249_ef89065d,
    160'hbc8d70b3_65289d5b_ebdcbb56_1b2c699c_10271cf7,
    160'h2beb62da_9af4dc27_6ca005e4_880c9c4a_3853a012};

  typedef struct {
    bit   busy;        // has a message
    bit   inflight;    // a block is in the pipeline
    int   t_start;     // cycle of that block's start_round1
    blk_t blks[$];
    int   next;        // next block index
    h_t   h;
    h_t   exp_dig;
    int   msg_id;
  } stream_t;

  stream_t st [5];
  int cyc = 0, msgs_started = 0, msgs_done = 0, max_inflight = 0, gaps = 0;
  int last_ready = -1, b2b_outputs = 0;
  int fifo_s[$];

  function automatic void new_msg(int s);
    byte unsigned m[$];
    if (msgs_started < 6) begin
      str2bytes(kat_msg[msgs_started], m);
      st[s].exp_dig = kat_dig[msgs_started];
      checks++;
      if (hash_bytes(m) !== kat_dig[msgs_started]) failures++;   // model sanity
    end else begin
      int len = $urandom_range(0, 250);
      for (int i = 0; i < len; i++) m.push_back(8'($urandom));
      st[s].exp_dig = hash_bytes(m);
    end
    pad(m, st[s].blks);
    st[s].busy = 1; st[s].next = 0; st[s].h = IV0; st[s].msg_id = msgs_started;
    msgs_started++;
  endfunction

  function automatic bit ready_at(int s, int t);
    return !st[s].inflight || (st[s].t_start + LAT == t);
  endfunction

  initial begin
    int slot_t, pick;
    bit use_slot;
    foreach (st[s]) begin st[s].busy = 0; st[s].inflight = 0; end
    block_in = '0; h_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bist_run();
    repeat (100) @(negedge clk);
    slot_t = cyc + 2;
    while (msgs_done < N_MSG) begin
      @(negedge clk);
      // outputs of this cycle
      if (hash_ready) begin
        int s;
        s = fifo_s.pop_front();
        checks++;
        if (cyc - st[s].t_start != LAT) begin
          failures++; $display("latency %0d", cyc - st[s].t_start);
        end
        if (last_ready >= 0 && cyc - last_ready == 16) b2b_outputs++;
        last_ready = cyc;
        st[s].inflight = 0;
        if (st[s].next == st[s].blks.size()) begin
          checks++;
          if (digest !== st[s].exp_dig) begin
            failures++;
            $display("msg %0d digest %h exp %h", st[s].msg_id, digest, st[s].exp_dig);
          end
          st[s].busy = 0; msgs_done++;
        end else begin st[s].h = digest; chained++; end
      end else if (fifo_s.size() > 0 && cyc > st[fifo_s[0]].t_start + LAT) begin
        failures++; $display("missing hash_ready"); void'(fifo_s.pop_front());
      end
      start_round1 = 0;
      if (cyc == slot_t + 16) h_in = {$urandom, $urandom, $urandom, $urandom, $urandom};
      if (cyc == slot_t + 16 && !start_counter1) for (int w = 0; w < 16; w++) block_in[w] = $urandom;
      // block entry
      if (start_counter1) begin
        start_counter1 = 0;
        pick = -1;
        for (int s = 0; s < 5; s++)
          if (pick < 0 && st[s].busy && !st[s].inflight) pick = s;
        if (pick < 0) for (int s = 0; s < 5; s++)
          if (pick < 0 && !st[s].busy && msgs_started < N_MSG) begin new_msg(s); pick = s; end
        if (pick < 0) begin failures++; $display("no stream ready"); end
        else begin
          start_round1 = 1;
          block_in = st[pick].blks[st[pick].next];
          h_in     = st[pick].h;
          st[pick].next++;
          st[pick].inflight = 1;
          st[pick].t_start = cyc;
          if (cyc - last_start == 16) b2b_starts++;
          last_start = cyc;
          fifo_s.push_back(pick);
          slot_t = cyc;
        end
      end
      // announce next slot: one cycle before it
      if (cyc + 1 >= slot_t + 16) begin
        int n_ready;
        n_ready = 0;
        for (int s = 0; s < 5; s++)
          if ((st[s].busy && ready_at(s, cyc + 1) && st[s].next < st[s].blks.size()) ||
              (!st[s].busy && msgs_started < N_MSG)) n_ready++;
        use_slot = (n_ready > 0) && ($urandom_range(0, 9) != 0 || msgs_started < 6);
        if (use_slot) start_counter1 = 1;
        else if (n_ready > 0) gaps++;
      end
      begin
        int n;
        n = 0;
        foreach (st[s]) if (st[s].inflight) n++;
        if (n > max_inflight) max_inflight = n;
      end
      @(posedge clk); cyc++;
    end
    repeat (100) @(negedge clk);
    bist_run();
    checks++; if (bist_passes != 2) failures++;
    checks++; if (chained == 0) failures++;
    checks++; if (b2b_starts == 0) failures++;
    checks++; if (max_inflight != 5) begin failures++; $display("max in flight %0d", max_inflight); end
    checks++; if (b2b_outputs == 0) failures++;
    checks++; if (gaps == 0) failures++;
    $display("bist_passes=%0d mode_switches=%0d chained_blocks=%0d back_to_back_starts=%0d",
             bist_passes, mode_switches, chained, b2b_starts);
    $display("messages=%0d max_inflight=%0d back_to_back_outputs=%0d idle_slots=%0d cycles=%0d",
             msgs_done, max_inflight, b2b_outputs, gaps, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
