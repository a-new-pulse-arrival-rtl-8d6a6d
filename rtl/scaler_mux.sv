// scaler_mux - selects one of N scaler counts for the PCI controller.
//
// Combinational N-to-1 multiplexer of W-bit words; `sel` picks counts[sel].
// The multiplexer is drawn in the block diagram; the select source (the low
// register-address bits) is this design's choice.
module scaler_mux #(
  parameter int unsigned N  = 16,
  parameter int unsigned W  = 32,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic [W-1:0]  counts [N],
  input  logic [SW-1:0] sel,
  output logic [W-1:0]  dout
);
  always_comb dout = counts[sel];
endmodule
