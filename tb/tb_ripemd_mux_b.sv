// tb_ripemd_mux_b: checks the X word selection of Mux_B.
//
// A left-line round-1 instance must pick word sel, a right-line round-1
// instance word 9*sel+5 mod 16, and a later-round instance word sel of its X
// register, for every step and random words.
module tb_ripemd_mux_b;
  import ripemd_pkg::*;

  int checks = 0, failures = 0;
  block_t w;
  logic [3:0] sel;
  word_t xl1, xr1, xr3;

  ripemd_mux_b #(.LINE(LEFT),  .FIRST(1'b1)) dut_l1 (.words(w), .sel(sel), .x(xl1));
  ripemd_mux_b #(.LINE(RIGHT), .FIRST(1'b1)) dut_r1 (.words(w), .sel(sel), .x(xr1));
  ripemd_mux_b #(.LINE(RIGHT), .FIRST(1'b0)) dut_r3 (.words(w), .sel(sel), .x(xr3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 16; i++) w[i] = $urandom;
      for (int i = 0; i < 16; i++) begin
        sel = 4'(i);
        #1;
        checks += 3;
        if (xl1 !== w[i]) failures++;
        if (xr1 !== w[(9 * i + 5) % 16]) failures++;
        if (xr3 !== w[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
