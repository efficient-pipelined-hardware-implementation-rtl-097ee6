// tb_ripemd_xreg: checks the X permutation units and their registers.
//
// For every line and destination round 2..5 an instance is fed a random block
// arranged in the order of the previous round (plain word order for round 2).
// After `load` its register must hold, at position i, the word the
// destination round uses at step i; without `load` it must keep its value.
module tb_ripemd_xreg;
  import ripemd_pkg::*;
  import ripemd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  blk_t X;
  block_t src [2][5];
  block_t q   [2][5];

  for (genvar l = 0; l < 2; l++) begin : g_l
    for (genvar d = 1; d < 5; d++) begin : g_d
      ripemd_xreg #(.LINE(l == 0 ? LEFT : RIGHT), .DST_ROUND(d)) dut (
        .clk(clk), .rst_n(rst_n), .load(load), .src(src[l][d]), .q(q[l][d]));
      always_comb
        for (int i = 0; i < 16; i++)
          src[l][d][i] = (d == 1) ? X[i] : X[widx(l == 1, d - 1, i)];
    end
  end

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      block_t keep [2][5];
      for (int w = 0; w < 16; w++) X[w] = $urandom;
      load = 1; @(negedge clk); load = 0;
      for (int l = 0; l < 2; l++)
        for (int d = 1; d < 5; d++) begin
          for (int i = 0; i < 16; i++) begin
            checks++;
            if (q[l][d][i] !== X[widx(l == 1, d, i)]) failures++;
          end
          keep[l][d] = q[l][d];
        end
      for (int w = 0; w < 16; w++) X[w] = $urandom;
      @(negedge clk);
      for (int l = 0; l < 2; l++)
        for (int d = 1; d < 5; d++) begin checks++; if (q[l][d] !== keep[l][d]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
