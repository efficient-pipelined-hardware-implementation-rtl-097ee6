// tb_ripemd_bist: checks the self-test unit driving a real core.
//
// Run 1: a clean run must end with done and pass, exactly 146 cycles after the
// start pulse is sampled (five blocks 16 cycles apart, 80 cycles latency), with
// start_counter1 issued every 16 cycles and h equal to the RIPEMD-160 initial
// value. Run 2: one digest bit is flipped on its way back for the fourth
// vector; the run must end with pass low. Run 3: a clean run again passes.
module tb_ripemd_bist;
  import ripemd_pkg::*;
  import ripemd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic   clk = 0, rst_n = 0, start = 0;
  logic   sc1, sr1, hash_ready, busy, done, pass;
  block_t blk;
  hash_t  h, digest, digest_seen;
  int     corrupt_idx = -1, n_ready = 0;

  ripemd_bist dut (.clk(clk), .rst_n(rst_n), .start(start), .start_counter1(sc1),
                   .start_round1(sr1), .block(blk), .h(h), .hash_ready(hash_ready),
                   .digest(digest_seen), .busy(busy), .done(done), .pass(pass));
  ripemd_core u_core (.clk(clk), .rst_n(rst_n), .start_counter1(sc1), .start_round1(sr1),
                      .block_in(blk), .h_in(h), .hash_ready(hash_ready), .digest(digest));

  always_comb digest_seen = (hash_ready && n_ready == corrupt_idx) ? (digest ^ 160'h1000) : digest;
  always @(posedge clk) if (hash_ready) n_ready <= n_ready + 1;

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int corrupt, input bit exp_pass);
    int t, last_sc1, n_sc1;
    corrupt_idx = corrupt; n_ready = 0;
    start = 1; @(negedge clk); start = 0;
    t = 0; last_sc1 = -1; n_sc1 = 0;
    while (!done && t < 400) begin
      if (sc1) begin
        n_sc1++;
        if (last_sc1 >= 0) begin checks++; if (t - last_sc1 != 16) failures++; end
        last_sc1 = t;
      end
      if (sr1) begin checks++; if (h !== IV0) failures++; end
      @(negedge clk); t++;
    end
    checks++; if (t != 146) begin failures++; $display("done after %0d cycles", t); end
    checks++; if (n_sc1 != 5) failures++;
    checks++; if (pass !== exp_pass) begin failures++; $display("pass=%b expected %b", pass, exp_pass); end
    checks++; if (busy) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (busy || done || sc1) failures++;
    run(-1, 1'b1);
    repeat (5) @(negedge clk);
    run(3, 1'b0);
    run(-1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
