// tb_ripemd_op: checks the operation block against the reference step.
//
// Five instances, one per boolean function, each with a different round
// constant, are driven with random states, words and rotation amounts; every
// output is compared with the reference model's step.
module tb_ripemd_op;
  import ripemd_pkg::*;
  import ripemd_ref_pkg::*;

  int checks = 0, failures = 0;
  state_t st;
  word_t  x;
  logic [3:0] s;
  state_t o [5];

  localparam word_t KS [5] = '{32'h00000000, 32'h5A827999, 32'h6ED9EBA1, 32'h8F1BBCDC,
                               32'hA953FD4E};

  for (genvar f = 0; f < 5; f++) begin : g_op
    ripemd_op #(.FUNC(f), .K(KS[f])) dut (.st_in(st), .x(x), .s(s), .st_out(o[f]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      h_t in_h, exp_h, got_h;
      st = '{a: $urandom, b: $urandom, c: $urandom, d: $urandom, e: $urandom};
      if (n < 16) begin st = '0; st.b = 32'hFFFF_0000; st.c = 32'h0F0F_00FF; end
      x  = $urandom;
      s  = 4'($urandom_range(5, 15));
      #1;
      in_h = {st.e, st.d, st.c, st.b, st.a};
      for (int f = 0; f < 5; f++) begin
        exp_h = step(in_h, f, KS[f], int'(s), x);
        got_h = {o[f].e, o[f].d, o[f].c, o[f].b, o[f].a};
        checks++;
        if (got_h !== exp_h) begin
          failures++;
          if (failures < 5) $display("mismatch f=%0d got %h exp %h", f, got_h, exp_h);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
