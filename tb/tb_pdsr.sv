// tb_pdsr - self-checking test of the Programmable Delay Shift Register.
//
// Random words are shifted in on random ticks; the testbench keeps its own
// list of the words shifted in and checks that the output always equals the
// word shifted in delay+1 ticks ago (zero before that), for several delays
// including out-of-range ones, and that clr empties the register.
module tb_pdsr;
  localparam int N = 16, DEPTH = 32;
  logic clk = 0, rst_n = 0, clr = 0, tick = 0;
  logic [N-1:0] din = '0, dout, expv;
  logic [7:0] delay = 0;
  int checks = 0, failures = 0, eff;
  logic [N-1:0] hist [$];

  pdsr #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int delays [7] = '{0, 1, 5, 31, 17, 40, 3};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (delays[k]) begin
      delay = 8'(delays[k]);
      eff = (delays[k] >= DEPTH) ? DEPTH - 1 : delays[k];
      for (int c = 0; c < 600; c++) begin
        @(negedge clk);
        expv = (hist.size() > eff) ? hist[hist.size()-1-eff] : '0;
        checks++;
        if (dout !== expv) begin
          failures++;
          if (failures < 10) $display("delay %0d: dout %h expected %h", delays[k], dout, expv);
        end
        tick = ($urandom_range(2) == 0);
        din = N'($urandom);
        @(posedge clk);
        if (tick) hist.push_back(din);
      end
    end
    // clear
    @(negedge clk) clr = 1; tick = 0;
    @(negedge clk) clr = 0;
    hist.delete();
    for (int c = 0; c < DEPTH; c++) hist.push_back('0);
    delay = 8'd31;
    checks++;
    if (dout !== '0) begin failures++; $display("clr left %h", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
