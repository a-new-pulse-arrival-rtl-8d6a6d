// input_latch - synchroniser and latch behind the ECL receivers.
//
// The N asynchronous channel inputs are synchronised to the base clock
// (sync2), and a rising edge on a channel gives a one-cycle `pulse` bit; the
// pulses go unmasked to the scalers. Pulses of selected channels (`ch_mask`
// bit 1) are collected in a sticky latch over one programmable-clock period.
// On `tick` the latch contents are what the delay shift register loads
// (`latched`), and the latch restarts with only the edges of that same cycle,
// so no edge is lost and none is counted in two periods.
//
// Timing: an input edge shows on `pulse` three cycles after it is set up on
// `ch_in` (two synchroniser stages and the edge register), and in `latched`
// one cycle after that. That the inputs are synchronised and latched is from
// the original design; the sticky period latch and the place where channel selection
// acts are this design's choices.
module input_latch #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ch_in,
  input  logic [N-1:0] ch_mask,
  input  logic         tick,
  output logic [N-1:0] latched,
  output logic [N-1:0] pulse
);
  logic [N-1:0] synced, synced_q;

  sync2 #(.W(N)) u_sync (.clk, .rst_n, .d(ch_in), .q(synced));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      synced_q <= '0;
      pulse    <= '0;
      latched  <= '0;
    end else begin
      synced_q <= synced;
      pulse    <= synced & ~synced_q;
      if (tick) latched <= pulse & ch_mask;
      else      latched <= latched | (pulse & ch_mask);
    end
  end
endmodule
