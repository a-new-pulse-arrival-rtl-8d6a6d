// hit_detector - detects a non-zero word leaving the delay shift register.
//
// `hit` is the OR of the N channel bits. `wr_en` asks the high-speed FIFO to
// store the event: it is high in a tick cycle in which the PDSR output is
// non-zero and recording is enabled and not vetoed (`enable`). Since the PDSR
// output changes only after a tick, each word is judged exactly once.
// Purely combinational. The non-zero test comes from the original design; the
// qualification with tick and enable is this design's choice.
module hit_detector #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] channels,
  input  logic         tick,
  input  logic         enable,
  output logic         hit,
  output logic         wr_en
);
  always_comb begin
    hit   = |channels;
    wr_en = hit & tick & enable;
  end
endmodule
