// time_mark_counter - W-bit real-time counter (Time Mark Counter, TMC).
//
// Incremented by one on every programmable-clock `tick` while `en` is high,
// wrapping at 2^W; `clr` sets it to zero and wins over a tick. The value is
// stored with each event as its arrival time. Width and increment at the
// programmable rate are from the original design; enable, clear and wrap are this
// design's choices.
module time_mark_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         tick,
  input  logic         en,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (clr)        count <= '0;
    else if (tick && en) count <= count + 1'b1;
  end
endmodule
