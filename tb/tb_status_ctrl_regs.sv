// tb_status_ctrl_regs - self-checking test of the status and control registers.
//
// Writes and reads back every configuration register, checks the decoded
// configuration, the self-clearing clear and scaler-clear pulses, the
// synchronised External Gate and Flag in the status word, the veto output,
// and the sticky overflow bit with its clear. The expected values are the
// register map's, written out here independently.
module tb_status_ctrl_regs;
  import patrm_pkg::*;
  logic clk = 0, rst_n = 0, reg_wr = 0, ext_gate = 0, ext_flag = 0, fifo_overflow = 0;
  logic [5:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata, tmc = 32'h1234_5678;
  logic [15:0] fifo_level = 16'd7, scaler_clr, status_word;
  cfg_t cfg;
  logic clr, veto;
  int checks = 0, failures = 0;

  status_ctrl_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h expected %h", what, got, exp); end
  endtask

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk) reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(negedge clk) reg_wr = 0;
  endtask

  // reads are combinational: set the address, wait, compare
  task automatic chkr(input string what, input logic [5:0] a, input logic [31:0] exp);
    reg_addr = a;
    #1 chk(what, reg_rdata, exp);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // reset values
    chkr("ctrl reset", 6'h00, 32'h0);
    chkr("clkdiv reset", 6'h01, 32'd9);
    chkr("delay reset", 6'h02, 32'd0);
    chkr("chmask reset", 6'h03, 32'h0000_ffff);
    chkr("status reset", 6'h04, 32'h0007_0000);
    chkr("tmc", 6'h06, 32'h1234_5678);
    chkr("unmapped", 6'h0f, 32'h0);
    // configuration
    wr(6'h01, 32'hffff_0003); chkr("clkdiv", 6'h01, 32'h0003); chk("cfg.clk_div", 32'(cfg.clk_div), 32'd3);
    wr(6'h02, 32'h0000_0a11); chkr("delay", 6'h02, 32'h11);   chk("cfg.delay", 32'(cfg.delay), 32'h11);
    wr(6'h03, 32'h1234_a5c3); chkr("chmask", 6'h03, 32'ha5c3); chk("cfg.ch_mask", 32'(cfg.ch_mask), 32'ha5c3);
    wr(6'h00, 32'h0000_0007); chkr("ctrl", 6'h00, 32'h7);
    chk("run/ext/veto", {29'd0, cfg.run, cfg.ext_clk_sel, cfg.veto_en}, 32'h7);
    chk("status extclk", 32'(status_word), 32'h0010);
    // clear pulse: exactly one cycle
    @(negedge clk) reg_addr = 6'h00; reg_wdata = 32'h0000_0011; reg_wr = 1;
    @(negedge clk) reg_wr = 0; chk("clr pulse", 32'(clr), 1);
    @(negedge clk) chk("clr ends", 32'(clr), 0);
    chkr("ctrl after clear", 6'h00, 32'h1);
    // scaler clear pulse
    @(negedge clk) reg_addr = 6'h05; reg_wdata = 32'h0000_8421; reg_wr = 1;
    @(negedge clk) reg_wr = 0; chk("scaler_clr", 32'(scaler_clr), 32'h8421);
    @(negedge clk) chk("scaler_clr ends", 32'(scaler_clr), 0);
    // gate and flag, veto disabled
    @(negedge clk) ext_gate = 1; ext_flag = 1;
    @(negedge clk) chk("gate not yet synchronised", 32'(status_word), 32'h0);
    @(negedge clk) chk("gate+flag", 32'(status_word), 32'h0003); chk("veto off", 32'(veto), 0);
    wr(6'h00, 32'h0000_0005);
    chk("veto on", 32'(veto), 1); chk("status veto", 32'(status_word), 32'h0007);
    @(negedge clk) ext_gate = 0;
    repeat (2) @(negedge clk);
    chk("gate low", 32'(status_word), 32'h0002); chk("veto released", 32'(veto), 0);
    // overflow sticky
    @(negedge clk) fifo_overflow = 1;
    @(negedge clk) fifo_overflow = 0;
    repeat (3) @(negedge clk);
    chk("ovf sticky", 32'(status_word), 32'h000a);
    chkr("status reg", 6'h04, 32'h0007_000a);
    wr(6'h00, 32'h0000_0009);
    chk("ovf cleared", 32'(status_word), 32'h0002);
    chk("run kept", 32'(cfg.run), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
