// tb_scaler - self-checking test of one scaler.
//
// Random increment pulses and occasional clears, with the count predicted by
// the testbench, including a clear in the same cycle as an increment. An
// 4-bit instance checks saturation at all ones.
module tb_scaler;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [31:0] count;
  logic [3:0] count4;
  int unsigned expc = 0, exp4 = 0;
  int checks = 0, failures = 0, sat = 0, clr_inc = 0;

  scaler #(.W(32)) dut (.*);
  scaler #(.W(4)) dut4 (.clk, .rst_n, .clr, .inc, .count(count4));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      checks++;
      if (count !== expc || count4 !== 4'(exp4)) begin
        failures++;
        if (failures < 10) $display("cycle %0d count %0d/%0d expected %0d/%0d", c, count, count4, expc, exp4);
      end
      inc = ($urandom_range(2) != 0);
      clr = ($urandom_range(149) == 0);
      @(posedge clk);
      if (clr) begin
        expc = inc; exp4 = inc;
        if (inc) clr_inc++;
      end else if (inc) begin
        expc++;
        if (exp4 == 15) sat++; else exp4++;
      end
    end
    checks++;
    if (sat == 0 || clr_inc == 0) begin failures++; $display("saturation %0d clear+inc %0d", sat, clr_inc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
