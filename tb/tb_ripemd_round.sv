// tb_ripemd_round: checks whole rounds of the round unit.
//
// Four instances (left round 1, left round 3, right round 2, right round 5)
// receive a random state at step 0 and then their own register back, as Mux_A
// does, with the X word of each step picked in the round's word order from a
// random block. After 16 enabled cycles each register must equal the
// reference model's round; a cycle with `en` low must leave it unchanged.
module tb_ripemd_round;
  import ripemd_pkg::*;
  import ripemd_ref_pkg::*;

  localparam int    NI = 4;
  localparam int    RD [NI] = '{0, 2, 1, 4};
  localparam line_e LN [NI] = '{LEFT, LEFT, RIGHT, RIGHT};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] step;
  state_t init [NI], stin [NI], q [NI];
  word_t  x [NI];
  blk_t   X;
  bit     use_init;

  for (genvar k = 0; k < NI; k++) begin : g_dut
    ripemd_round #(.ROUND(RD[k]), .LINE(LN[k])) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .step(step), .st_in(stin[k]), .x(x[k]), .st_q(q[k]));
    always_comb begin
      stin[k] = use_init ? init[k] : q[k];
      x[k]    = X[widx(LN[k] == RIGHT, RD[k], int'(step))];
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
    step = 0; use_init = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      state_t hold [NI];
      for (int w = 0; w < 16; w++) X[w] = $urandom;
      for (int k = 0; k < NI; k++)
        init[k] = {$urandom, $urandom, $urandom, $urandom, $urandom};
      en = 1;
      for (int i = 0; i < 16; i++) begin
        step = 4'(i); use_init = (i == 0);
        @(negedge clk);
      end
      en = 0; use_init = 0;
      for (int k = 0; k < NI; k++) begin
        h_t e;
        e = round16({init[k].e, init[k].d, init[k].c, init[k].b, init[k].a},
                        LN[k] == RIGHT, RD[k], X);
        checks++;
        if ({q[k].e, q[k].d, q[k].c, q[k].b, q[k].a} !== e) begin
          failures++;
          if (failures < 5) $display("round %0d line %0d mismatch", RD[k], LN[k]);
        end
        hold[k] = q[k];
      end
      @(negedge clk);
      for (int k = 0; k < NI; k++) begin checks++; if (q[k] !== hold[k]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
