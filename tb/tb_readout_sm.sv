// tb_readout_sm - self-checking test of the readout state machine.
//
// A behavioural event queue stands in for the FIFO (show-ahead, pops on
// fifo_rd) and a sink with random full periods stands in for the PCI
// controller. Every event must come out as two words, time mark then
// {status, channels}, in order and with nothing lost or repeated. With the
// sink always ready, a run of events must take two cycles per event. Finally
// the queue is emptied between the two words of an event, as a FIFO clear
// would do, and the second word must still arrive.
module tb_readout_sm;
  import patrm_pkg::*;
  logic clk = 0, rst_n = 0, fifo_empty, fifo_rd, pci_wr, pci_full = 0;
  event_t fifo_data;
  logic [31:0] pci_wdata;
  event_t src [$];
  logic [31:0] expw [$];
  int checks = 0, failures = 0, nwords = 0, stall = 0, cyc = 0, first_wr = -1, last_wr = -1;
  bit random_full = 1;

  readout_sm dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    fifo_empty = (src.size() == 0);
    fifo_data  = fifo_empty ? event_t'(0) : src[0];
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (pci_wr) begin
        if (first_wr < 0) first_wr = cyc;
        last_wr = cyc;
        checks++;
        nwords++;
        if (expw.size() == 0) begin failures++; $display("unexpected word %h", pci_wdata); end
        else begin
          logic [31:0] e;
          e = expw.pop_front();
          if (pci_wdata !== e) begin failures++; if (failures < 10) $display("word %h expected %h", pci_wdata, e); end
        end
      end
      if (fifo_rd) void'(src.pop_front());
      if (pci_full) stall++;
      pci_full <= random_full && ($urandom_range(2) == 0);
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_event();
    event_t ev;
    ev.tmc = $urandom; ev.status = 16'($urandom); ev.channels = 16'($urandom);
    src.push_back(ev);
    expw.push_back(ev.tmc);
    expw.push_back({ev.status, ev.channels});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if ($urandom_range(1)) add_event();
    end
    wait (expw.size() == 0);
    // throughput: sink always ready, 50 events queued at once
    @(negedge clk) random_full = 0;
    repeat (3) @(negedge clk);
    first_wr = -1;
    for (int i = 0; i < 50; i++) add_event();
    wait (expw.size() == 0);
    checks++;
    if (last_wr - first_wr + 1 != 100) begin
      failures++; $display("50 events took %0d cycles, expected 100", last_wr - first_wr + 1);
    end
    // clear between the two words of an event: the pair must still complete
    @(negedge clk) random_full = 1;
    for (int i = 0; i < 4; i++) add_event();
    @(posedge clk iff (rst_n && pci_wr));
    @(negedge clk);
    src.delete();
    while (expw.size() > 1) void'(expw.pop_back());
    @(negedge clk) random_full = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nwords % 2 != 0) begin failures++; $display("odd number of words %0d after clear", nwords); end
    repeat (3) @(negedge clk);
    checks++;
    if (expw.size() != 0 || stall == 0) begin failures++; $display("%0d words missing, %0d stalls", expw.size(), stall); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
