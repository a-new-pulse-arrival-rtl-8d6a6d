// prog_clock - programmable clock of the recorder, as a tick enable.
//
// The pipeline runs on the base clock and advances once per `tick`. With
// `ext_sel` low, a tick comes every `div`+1 base cycles (div = 0: every
// cycle, i.e. 10 ns at a 100 MHz base clock; div = 9: 100 ns). With `ext_sel`
// high, each rising edge of the External Clock, synchronised with two
// flip-flops, gives one tick three base cycles later; the external clock must
// then stay below half the base clock rate. A change of `div` takes effect
// when the running count reaches it or at the next tick.
//
// The original design has an internal programmable rate and an external clock
// input; the divider and the edge-tick form are this design's choices.
module prog_clock #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ext_clk,
  input  logic             ext_sel,
  input  logic [DIV_W-1:0] div,
  output logic             tick
);
  logic [DIV_W-1:0] cnt;
  logic             ext_s, ext_q;

  sync2 #(.W(1)) u_sync (.clk, .rst_n, .d(ext_clk), .q(ext_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      ext_q <= 1'b0;
      tick  <= 1'b0;
    end else begin
      ext_q <= ext_s;
      if (ext_sel) begin
        cnt  <= '0;
        tick <= ext_s & ~ext_q;
      end else if (cnt >= div) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else begin
        cnt  <= cnt + 1'b1;
        tick <= 1'b0;
      end
    end
  end
endmodule
