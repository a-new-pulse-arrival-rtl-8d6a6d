// tb_prog_clock - self-checking test of prog_clock.
//
// Internal mode: for several divider values the intervals between ticks are
// measured and must all be div+1 base cycles. External mode: a slow external
// clock with random high and low times is applied and every rising edge must
// produce exactly one tick, three base cycles after the edge.
module tb_prog_clock;
  logic clk = 0, rst_n = 0, ext_clk = 0, ext_sel = 0, tick;
  logic [15:0] div = 0;
  int checks = 0, failures = 0, last, cyc = 0;
  int edge_cyc [$];

  prog_clock #(.DIV_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_div(input int d);
    int n = 0;
    @(negedge clk) div = 16'(d);
    // let the new divider settle for one full period
    repeat (2 * (d + 2)) @(posedge clk);
    @(posedge clk iff tick);
    last = cyc;
    while (n < 20) begin
      @(posedge clk iff tick);
      checks++;
      if (cyc - last != d + 1) begin
        failures++;
        $display("div %0d interval %0d", d, cyc - last);
      end
      last = cyc;
      n++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check_div(9);
    check_div(0);
    check_div(1);
    check_div(4);
    check_div(37);
    // external clock
    @(negedge clk) ext_sel = 1;
    repeat (5) @(posedge clk);
    fork
      begin
        for (int i = 0; i < 40; i++) begin
          repeat ($urandom_range(2, 6)) @(negedge clk);
          ext_clk = 1;
          edge_cyc.push_back(cyc);
          repeat ($urandom_range(2, 6)) @(negedge clk);
          ext_clk = 0;
        end
        repeat (10) @(negedge clk);
      end
      begin
        forever begin
          @(posedge clk);
          #1;
          if (tick) begin
            checks++;
            if (edge_cyc.size() == 0) begin
              failures++; $display("spurious external tick");
            end else begin
              int e;
              e = edge_cyc.pop_front();
              if (cyc - e != 3) begin failures++; $display("external tick latency %0d", cyc - e); end
            end
          end
        end
      end
    join_any
    disable fork;
    checks++;
    if (edge_cyc.size() != 0) begin failures++; $display("%0d external edges gave no tick", edge_cyc.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
