// tb_time_mark_counter - self-checking test of time_mark_counter.
//
// Random ticks, enables and clears; the expected count is kept by the
// testbench. A narrow 8-bit instance is also run through its wrap-around.
module tb_time_mark_counter;
  logic clk = 0, rst_n = 0, clr = 0, tick = 0, en = 0;
  logic [31:0] count;
  logic [7:0] count8;
  longint unsigned expc = 0;
  int unsigned exp8 = 0;
  int checks = 0, failures = 0, wraps = 0;

  time_mark_counter #(.W(32)) dut (.*);
  time_mark_counter #(.W(8)) dut8 (.clk, .rst_n, .clr, .tick, .en, .count(count8));

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
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      checks++;
      if (count !== 32'(expc) || count8 !== 8'(exp8)) begin
        failures++;
        if (failures < 10) $display("cycle %0d count %0d/%0d expected %0d/%0d", c, count, count8, expc, exp8);
      end
      tick = ($urandom_range(1) == 0);
      en = (c < 200) ? 1'b1 : ($urandom_range(9) != 0);
      clr = ($urandom_range(1999) == 0);
      @(posedge clk);
      if (clr) begin expc = 0; exp8 = 0; end
      else if (tick && en) begin
        expc++;
        exp8 = (exp8 + 1) % 256;
        if (exp8 == 0) wraps++;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("8-bit counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
