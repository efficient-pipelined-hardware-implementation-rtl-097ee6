// tb_ripemd_mux_a: checks that Mux_A passes the handed-over state when
// sel_new is high and the round's own register otherwise.
module tb_ripemd_mux_a;
  import ripemd_pkg::*;

  int checks = 0, failures = 0;
  logic   sel;
  state_t a, b, o;

  ripemd_mux_a dut (.sel_new(sel), .st_new(a), .st_own(b), .st_out(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      sel = n[0] ^ n[3];
      a = {$urandom, $urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (o !== (sel ? a : b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
