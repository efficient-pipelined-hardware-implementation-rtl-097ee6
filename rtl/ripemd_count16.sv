// ripemd_count16: per-round controller (Count_16).
//
// One of these sits at every round position and serves both lines. It is
// active only while its round holds a message. A start pulse (start_counter1
// for round 1, the previous counter's last step for rounds 2..5) makes it
// active with count 0 in the next cycle; it then counts the 16 steps. At count
// 15 (`last`) the message leaves the round: the next counter starts, the X
// register behind the round loads, and this counter stops unless a new start
// arrives in the same cycle, in which case it wraps to 0 for the next message.
// `first` (count 0) selects the handed-over state in Mux_A of rounds 2..5.
module ripemd_count16 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       active,
  output logic [3:0] count,
  output logic       first,
  output logic       last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      count  <= '0;
    end else if (start) begin
      active <= 1'b1;
      count  <= '0;
    end else if (active) begin
      if (count == 4'd15) active <= 1'b0;
      count <= count + 4'd1;
    end
  end

  assign first = active && (count == 4'd0);
  assign last  = active && (count == 4'd15);

endmodule
