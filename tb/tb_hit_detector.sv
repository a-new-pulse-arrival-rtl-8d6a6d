// tb_hit_detector - self-checking test of hit_detector.
//
// Exhaustive over the three control inputs and many channel words: hit must
// be high exactly for a non-zero word, wr_en only when additionally tick and
// enable are high. Combinational block; a clock paces the watchdog only.
module tb_hit_detector;
  localparam int N = 16;
  logic [N-1:0] channels;
  logic tick, enable, hit, wr_en, clk = 0;
  int checks = 0, failures = 0;

  hit_detector #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      unique case (i % 4)
        0: channels = '0;
        1: channels = N'(1) << (i % N);
        default: channels = N'($urandom);
      endcase
      tick = i[2];
      enable = i[3];
      #1;
      checks++;
      if (hit !== (channels != 0)) begin failures++; $display("hit wrong for %h", channels); end
      checks++;
      if (wr_en !== ((channels != 0) && tick && enable)) begin
        failures++; $display("wr_en wrong for %h tick %b en %b", channels, tick, enable);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
