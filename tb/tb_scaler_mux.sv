// tb_scaler_mux - self-checking test of scaler_mux.
//
// Random 32-bit words on all 16 inputs; every select value must return its
// own input.
module tb_scaler_mux;
  localparam int N = 16, W = 32;
  logic [W-1:0] counts [N];
  logic [3:0] sel;
  logic [W-1:0] dout;
  logic clk = 0;
  int checks = 0, failures = 0;

  scaler_mux #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 100; r++) begin
      for (int i = 0; i < N; i++) counts[i] = $urandom;
      for (int s = 0; s < N; s++) begin
        sel = 4'(s);
        #1;
        checks++;
        if (dout !== counts[s]) begin failures++; $display("sel %0d gave %h expected %h", s, dout, counts[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
