// scaler - one channel's W-bit event counter.
//
// Adds one for each `inc` pulse (a synchronised rising edge of the channel)
// and stops at all ones. `clr` restarts the count while counting goes on: an
// edge in the clear cycle leaves the count at 1. It counts regardless of
// whether recording runs, so it can be read and cleared during a recording.
// One counter per channel is from the original design; saturation and counting
// independently of recording are this design's choices.
module scaler #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         inc,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               count <= '0;
    else if (clr)             count <= W'(inc);
    else if (inc && ~&count)  count <= count + 1'b1;
  end
endmodule
