// tb_input_latch - self-checking test of input_latch.
//
// Random channel levels, channel masks and ticks are applied on the falling
// clock edge. The testbench keeps the history of the levels seen at each
// rising edge and predicts the edge pulses (a channel that was low and is
// high three edges late) and the period latch, then compares both every
// cycle. It also checks that a masked channel never reaches `latched`.
module tb_input_latch;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [N-1:0] ch_in = '0, ch_mask = '1, latched, pulse;
  int checks = 0, failures = 0, cyc = 0, npulse = 0;
  logic [N-1:0] h [$];
  logic [N-1:0] exp_lat = '0, exp_pulse = '0, prev_pulse = '0;

  input_latch #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) h.push_back('0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      // drive on the falling edge
      if ($urandom_range(3) == 0) ch_in = ch_in ^ N'($urandom);
      tick = ($urandom_range(4) == 0);
      if (cyc % 500 == 0) ch_mask = (cyc == 0) ? '1 : N'($urandom);
      @(posedge clk);
      h.push_back(ch_in);
      prev_pulse = exp_pulse;
      exp_pulse = h[$-2] & ~h[$-3];
      if (tick) exp_lat = prev_pulse & ch_mask;
      else      exp_lat = exp_lat | (prev_pulse & ch_mask);
      @(negedge clk);
      checks++;
      if (pulse !== exp_pulse) begin
        failures++;
        if (failures < 10) $display("cycle %0d pulse %h expected %h", cyc, pulse, exp_pulse);
      end
      checks++;
      if (latched !== exp_lat) begin
        failures++;
        if (failures < 10) $display("cycle %0d latched %h expected %h", cyc, latched, exp_lat);
      end
      npulse += $countones(pulse);
    end
    checks++;
    if (npulse < 100) begin failures++; $display("too few pulses %0d", npulse); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
