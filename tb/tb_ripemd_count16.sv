// tb_ripemd_count16: checks the Count_16 controller.
//
// A single start must give exactly 16 active cycles with counts 0..15, `first`
// on the first and `last` on the sixteenth. A start on the last step must wrap
// straight into the next message without an idle cycle. Then random start
// patterns are compared cycle by cycle with a small model.
module tb_ripemd_count16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic active, first, last;
  logic [3:0] count;
  bit   m_act;
  int   m_cnt;

  ripemd_count16 dut (.clk(clk), .rst_n(rst_n), .start(start), .active(active),
                      .count(count), .first(first), .last(last));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    checks++;
    if (active !== m_act || (m_act && (count !== 4'(m_cnt) || first !== (m_cnt == 0) ||
        last !== (m_cnt == 15))) || (!m_act && (first || last))) begin
      failures++;
      if (failures < 5) $display("t=%0t act %b/%b cnt %0d/%0d", $time, active, m_act, count, m_cnt);
    end
  endtask

  always @(posedge clk) begin
    if (start) begin m_act <= 1; m_cnt <= 0; end
    else if (m_act) begin
      if (m_cnt == 15) m_act <= 0;
      m_cnt <= (m_cnt + 1) % 16;
    end
  end

  initial begin
    int n_active;
    m_act = 0; m_cnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); chk();
    // single message: 16 active cycles
    start = 1; @(negedge clk); start = 0;
    n_active = 0;
    repeat (20) begin chk(); if (active) n_active++; @(negedge clk); end
    checks++; if (n_active != 16) failures++;
    // back to back: start on the last step
    start = 1; @(negedge clk); start = 0;
    repeat (15) begin chk(); @(negedge clk); end
    chk(); checks++; if (!last) failures++;
    start = 1; @(negedge clk); start = 0;
    chk(); checks++; if (!(active && first)) failures++;
    // random
    repeat (2000) begin
      start = ($urandom_range(0, 19) == 0);
      @(negedge clk); chk();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
