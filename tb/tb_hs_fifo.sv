// tb_hs_fifo - self-checking test of the high-speed FIFO.
//
// A queue in the testbench is the reference. Phases: write bursts into a
// slow reader (the FIFO fills, further writes are dropped and must pulse
// overflow), random traffic, simultaneous write and read while full, then
// clear. Data, empty, full and level are compared every cycle.
module tb_hs_fifo;
  localparam int WIDTH = 64, DEPTH = 16;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic full, overflow, empty;
  logic [4:0] level;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0, n_ovf = 0, n_full_rw = 0, exp_ovf;

  hs_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || level !== 5'(q.size())) begin
      failures++;
      if (failures < 10) $display("flags: empty %b full %b level %0d, model size %0d", empty, full, level, q.size());
    end
    if (q.size() > 0) begin
      checks++;
      if (rd_data !== q[0]) begin
        failures++;
        if (failures < 10) $display("rd_data %h expected %h", rd_data, q[0]);
      end
    end
  endtask

  task automatic step(input logic w, input logic r);
    @(negedge clk);
    compare();
    wr_en = w; rd_en = r; wr_data = {$urandom, $urandom};
    @(posedge clk);
    exp_ovf = 0;
    if (r && q.size() > 0) begin
      void'(q.pop_front());
      if (w && q.size() == DEPTH - 1) n_full_rw++;
      if (w) q.push_back(wr_data);
    end else if (w) begin
      if (q.size() < DEPTH) q.push_back(wr_data);
      else exp_ovf = 1;
    end
    #1;
    checks++;
    if (overflow !== exp_ovf[0]) begin failures++; $display("overflow %b expected %0d", overflow, exp_ovf); end
    if (overflow) n_ovf++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 40; i++) step(1, (i % 8) == 0);
    for (int i = 0; i < 40; i++) step(1, 1);
    for (int i = 0; i < 3000; i++) step($urandom_range(1), $urandom_range(1));
    for (int i = 0; i < 40; i++) step(0, 1);
    for (int i = 0; i < 10; i++) step(1, 0);
    @(negedge clk) wr_en = 0; rd_en = 0; clr = 1;
    @(negedge clk) clr = 0;
    q.delete();
    compare();
    checks++;
    if (n_ovf == 0 || n_full_rw == 0) begin failures++; $display("overflows %0d full r/w %0d", n_ovf, n_full_rw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
