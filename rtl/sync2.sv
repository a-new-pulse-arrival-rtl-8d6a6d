// sync2 - two flip-flop synchroniser for asynchronous inputs.
//
// Each bit of `d` is sampled by two back-to-back flip-flops on `clk`; `q`
// follows `d` two clock edges later. Resets to zero. The original design says the
// inputs are synchronised; the two-stage form is this design's choice.
module sync2 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
