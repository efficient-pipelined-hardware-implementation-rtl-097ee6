// tb_ripemd_addlevel: checks the final addition level against the reference
// model's final combination on random chaining values and line results.
module tb_ripemd_addlevel;
  import ripemd_pkg::*;
  import ripemd_ref_pkg::*;

  int checks = 0, failures = 0;
  hash_t  h, d;
  state_t l, r;

  ripemd_addlevel dut (.h(h), .lft(l), .rgt(r), .digest(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      h_t e;
      for (int i = 0; i < 5; i++) h[i] = $urandom;
      l = {$urandom, $urandom, $urandom, $urandom, $urandom};
      r = {$urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      e = final_add(h, {l.e, l.d, l.c, l.b, l.a}, {r.e, r.d, r.c, r.b, r.a});
      checks++;
      if (d !== e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
