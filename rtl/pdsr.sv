// pdsr - Programmable Delay Shift Register.
//
// A DEPTH-stage, N-bit wide shift register that advances on each
// programmable-clock `tick`: stage 0 loads `din`, stage i loads stage i-1.
// The output is the stage selected by `delay`, so a channel word leaves
// delay+1 ticks after it entered. Delaying the channels this way lets the
// recording be lined up with external events (gate, veto). `clr` empties all
// stages. Delay values at or above DEPTH select the last stage.
//
// The shift register with a programmable delay comes from the original design; its
// depth, the single delay shared by all channels and the tap-select form are
// this design's choices.
module pdsr #(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned DW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          tick,
  input  logic [N-1:0]  din,
  input  logic [7:0]    delay,
  output logic [N-1:0]  dout
);
  logic [N-1:0] stage [DEPTH];
  logic [DW-1:0] tap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (tick) begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  always_comb begin
    if (32'(delay) >= DEPTH) tap = DW'(DEPTH - 1);
    else                     tap = DW'(delay);
    dout = stage[tap];
  end
endmodule
