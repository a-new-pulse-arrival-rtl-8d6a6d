// tb_patrm_pci_top - end-to-end test of the recorder at its default sizes.
//
// The testbench plays the detectors (random pulses on the 16 channels), the
// external gate, flag and clock, and the PCI controller: it writes the
// registers and accepts event words with random periods of `pci_full`.
//
// Reference model. Every rising edge of a channel is logged with the clock
// edge at which it was first sampled (e), and every programmable-clock tick
// with its edge. The ticks come from the testbench's own model of the clock:
// one every CLKDIV+1 edges from a counter that restarts at reset, or one per
// rising edge of the external clock, seen through two synchroniser stages
// and taking effect three edges later. After the run/clear
// write, tick j carries time mark j. An edge sampled at e is latched into
// the period that ends at the first tick at or after e+4 (index k), leaves
// the delay register DELAY+1 ticks later, and is stored with time mark
// k+DELAY+1 at that tick. Channels that share a time mark form one event.
// The status word is predicted from the gate and flag levels sampled two
// edges before the store (the synchronisers), and an event is dropped when
// veto is enabled and the gate is high then. Scalers must equal the number
// of rising edges logged since their last clear.
//
// Phases, each drained before the next one: (A) random traffic with
// backpressure, gate and flag status and a scaler clear during recording;
// (B) long delay, channel mask and veto; (C) FIFO overflow with the PCI side
// held full; (D) a burst at one event per base clock; (E) external clock.
// Each mechanism is counted; one that never happened counts as a failure.
// Only the top's ports are used.
module tb_patrm_pci_top;
  import patrm_pkg::*;
  localparam int FIFO_DEPTH = 64;

  logic clk = 0, rst_n = 0;
  logic [15:0] ch_in = '0;
  logic ext_gate = 0, ext_flag = 0, ext_clk = 0;
  logic [5:0] reg_addr = '0;
  logic reg_wr = 0;
  logic [31:0] reg_wdata = '0, reg_rdata, pci_wdata;
  logic pci_wr, pci_full = 0;

  patrm_pci_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // logs of the current phase
  typedef struct { int e; int ch; } pulse_t;
  pulse_t pulses [$];
  int     ticks [$];
  bit     gate_hist [int];
  bit     flag_hist [int];
  int     start_edge;      // edge of the run/clear write
  event_t got [$];
  logic [31:0] word0;
  bit     have_word0 = 0;
  logic [15:0] prev_ch = '0;
  bit     pci_random = 0;
  int     scaler_clr_edge [16];
  int     edges_total [16];
  // model of the programmable clock: divider count, synchroniser, config
  int     m_cnt = 0, c_div = 9;
  bit     m_tick = 0, m_meta = 0, m_sync = 0, m_prev = 0, c_ext = 0;

  // mechanism counters
  int n_events = 0, n_coinc = 0, n_delay = 0, n_masked = 0, n_veto = 0, n_gate_st = 0,
      n_flag_st = 0, n_ovf_lost = 0, n_backpressure = 0, n_full_rate = 0, n_ext_ticks = 0,
      n_scaler_clr = 0, n_ovf_status = 0;

  always @(posedge clk) begin
    gate_hist[cyc] = ext_gate;
    flag_hist[cyc] = ext_flag;
    for (int c = 0; c < 16; c++)
      if (ch_in[c] && !prev_ch[c]) begin
        pulses.push_back('{cyc, c});
        edges_total[c]++;
      end
    prev_ch = ch_in;
    // tick model: m_tick is the tick value before this edge
    if (m_tick && cyc > start_edge + 1) ticks.push_back(cyc);
    if (!rst_n) begin
      m_cnt = 0; m_tick = 0; m_meta = 0; m_sync = 0; m_prev = 0;
    end else begin
      if (c_ext) begin
        m_cnt = 0; m_tick = m_sync & ~m_prev;
      end else if (m_cnt >= c_div) begin
        m_cnt = 0; m_tick = 1;
      end else begin
        m_cnt++; m_tick = 0;
      end
      m_prev = m_sync; m_sync = m_meta; m_meta = ext_clk;
      if (reg_wr && reg_addr == REG_CLKDIV) c_div = int'(reg_wdata[15:0]);
      if (reg_wr && reg_addr == REG_CTRL) c_ext = reg_wdata[CTRL_EXTCLK];
    end
    if (rst_n && pci_wr) begin
      if (!have_word0) begin word0 = pci_wdata; have_word0 = 1; end
      else begin
        event_t ev;
        ev.tmc = word0; ev.status = pci_wdata[31:16]; ev.channels = pci_wdata[15:0];
        got.push_back(ev);
        have_word0 = 0;
      end
    end
    if (pci_full) n_backpressure++;
    cyc = cyc + 1;
  end

  always @(negedge clk) if (pci_random) pci_full <= ($urandom_range(3) == 0);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got_v, input longint exp_v);
    checks++;
    if (got_v != exp_v) begin
      failures++;
      if (failures < 20) $display("%s: got %0h expected %0h", what, got_v, exp_v);
    end
  endtask

  task automatic reg_write(input logic [5:0] a, input logic [31:0] d, output int edge_idx);
    @(negedge clk);
    reg_addr = a; reg_wdata = d; reg_wr = 1;
    edge_idx = cyc;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic reg_read(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask

  task automatic drain();
    logic [31:0] st;
    repeat (40) @(negedge clk);
    do begin
      reg_read(REG_STATUS, st);
      repeat (4) @(negedge clk);
    end while (st[31:16] != 0);
    repeat (10) @(negedge clk);
  endtask

  // Start a phase: configure, then run with clear in one CONTROL write.
  task automatic start_phase(input int div, input int delay, input logic [15:0] mask,
                             input bit ext, input bit veto_en);
    int w;
    logic [31:0] ctrl;
    // stop before reconfiguring: a new DELAY would expose old PDSR stages
    reg_write(REG_CTRL, 32'h0, w);
    reg_write(REG_CLKDIV, 32'(div), w);
    reg_write(REG_DELAY, 32'(delay), w);
    reg_write(REG_CHMASK, 32'(mask), w);
    ctrl = '0;
    ctrl[CTRL_RUN] = 1; ctrl[CTRL_EXTCLK] = ext; ctrl[CTRL_VETOEN] = veto_en;
    ctrl[CTRL_CLEAR] = 1; ctrl[CTRL_CLR_OVF] = 1;
    @(negedge clk);
    pulses.delete(); ticks.delete(); got.delete();
    start_edge = 1 << 30;
    reg_addr = REG_CTRL; reg_wdata = ctrl; reg_wr = 1;
    start_edge = cyc;
    @(negedge clk);
    reg_wr = 0;
    repeat (20) @(negedge clk);
  endtask

  // Random pulses: each channel fires with probability 1/p per cycle and
  // stays high 1..3 cycles.
  task automatic random_pulses(input int ncyc, input int p);
    int hold [16];
    for (int c = 0; c < 16; c++) hold[c] = 0;
    for (int i = 0; i < ncyc; i++) begin
      @(negedge clk);
      for (int c = 0; c < 16; c++) begin
        if (hold[c] > 0) begin
          hold[c]--;
          if (hold[c] == 0) ch_in[c] = 0;
        end else if (!ch_in[c] && $urandom_range(p - 1) == 0) begin
          ch_in[c] = 1;
          hold[c] = $urandom_range(1, 3);
        end else ch_in[c] = 0;
      end
    end
    @(negedge clk) ch_in = '0;
  endtask

  // Build the expected events of the phase and compare with what arrived.
  task automatic check_phase(input string name, input int delay, input logic [15:0] mask,
                             input bit ext, input bit veto_en, input int keep_max,
                             input bit ovf_expected);
    logic [15:0] chans [int];
    event_t expq [$];
    int k, j, t;
    foreach (pulses[i]) begin
      if (!mask[pulses[i].ch]) begin n_masked++; continue; end
      k = -1;
      foreach (ticks[m]) if (ticks[m] >= pulses[i].e + 4) begin k = m; break; end
      if (k < 0) begin chk({name, ": pulse without tick"}, 0, 1); continue; end
      j = k + delay + 1;
      if (!chans.exists(j)) chans[j] = '0;
      chans[j][pulses[i].ch] = 1'b1;
    end
    foreach (chans[jj]) begin
      event_t ev;
      logic g, f;
      if (jj >= ticks.size()) begin chk({name, ": event after last tick"}, 0, 1); continue; end
      t = ticks[jj];
      g = gate_hist[t - 2];
      f = flag_hist[t - 2];
      if (veto_en && g) begin n_veto++; continue; end
      ev.tmc = 32'(jj);
      ev.channels = chans[jj];
      ev.status = '0;
      ev.status[ST_GATE] = g;
      ev.status[ST_FLAG] = f;
      ev.status[ST_EXTCLK] = ext;
      expq.push_back(ev);
    end
    if (expq.size() > keep_max) begin
      n_ovf_lost += expq.size() - keep_max;
      expq = expq[0:keep_max-1];
    end
    chk({name, ": number of events"}, got.size(), expq.size());
    foreach (expq[i]) begin
      if (i >= got.size()) break;
      chk({name, ": event"}, got[i], expq[i]);
      if (got[i] == expq[i]) begin
        n_events++;
        if ($countones(got[i].channels) > 1) n_coinc++;
        if (delay > 0) n_delay++;
        if (got[i].status[ST_GATE]) n_gate_st++;
        if (got[i].status[ST_FLAG]) n_flag_st++;
      end
    end
    if (ovf_expected) begin
      logic [31:0] st;
      reg_read(REG_STATUS, st);
      chk({name, ": overflow flag"}, st[ST_OVF], 1);
      if (st[ST_OVF]) n_ovf_status++;
    end
    $display("phase %s: %0d events expected, %0d received, %0d ticks", name, expq.size(), got.size(), ticks.size());
  endtask

  task automatic check_scalers();
    logic [31:0] v;
    for (int c = 0; c < 16; c++) begin
      reg_read(6'(REG_SCALER0 + c), v);
      chk($sformatf("scaler %0d", c), v, edges_total[c]);
    end
  endtask

  initial begin
    int w;
    logic [31:0] v;
    for (int c = 0; c < 16; c++) edges_total[c] = 0;
    start_edge = 1 << 30;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    reg_write(REG_SCL_RST, 32'hffff, w);

    // (A) random traffic, backpressure, gate/flag status, scaler clear while recording
    start_phase(3, 2, 16'hffff, 0, 0);
    pci_random = 1;
    fork
      random_pulses(3000, 40);
      begin
        for (int i = 0; i < 30; i++) begin
          repeat ($urandom_range(20, 150)) @(negedge clk);
          ext_gate = $urandom_range(1); ext_flag = $urandom_range(1);
        end
      end
      begin
        repeat (1500) @(negedge clk);
        @(negedge clk);
        reg_addr = REG_SCL_RST; reg_wdata = 32'h00f0; reg_wr = 1;
        w = cyc;
        @(negedge clk) reg_wr = 0;
        // a cleared scaler counts the rising edges sampled from edge w-2 on
        for (int c = 4; c < 8; c++) begin
          edges_total[c] = 0;
          foreach (pulses[i]) if (pulses[i].ch == c && pulses[i].e >= w - 2) edges_total[c]++;
        end
        n_scaler_clr++;
      end
    join
    ext_gate = 0; ext_flag = 0;
    drain();
    pci_random = 0;
    @(negedge clk) pci_full = 0;
    check_phase("A", 2, 16'hffff, 0, 0, 1 << 30, 0);
    check_scalers();

    // (B) long delay, channel mask, veto on the external gate
    start_phase(1, 25, 16'h5a5a, 0, 1);
    pci_random = 1;
    fork
      random_pulses(3000, 30);
      begin
        for (int i = 0; i < 12; i++) begin
          repeat ($urandom_range(100, 300)) @(negedge clk);
          ext_gate = ~ext_gate; ext_flag = $urandom_range(1);
        end
      end
    join
    ext_gate = 0; ext_flag = 0;
    repeat (200) @(negedge clk);
    drain();
    pci_random = 0;
    @(negedge clk) pci_full = 0;
    check_phase("B", 25, 16'h5a5a, 0, 1, 1 << 30, 0);

    // (C) overflow: PCI side full, more events than the FIFO holds
    start_phase(0, 0, 16'hffff, 0, 0);
    @(negedge clk) pci_full = 1;
    random_pulses(400, 6);
    repeat (50) @(negedge clk);
    reg_read(REG_STATUS, v);
    chk("C: FIFO level while full", v[31:16], FIFO_DEPTH);
    @(negedge clk) pci_full = 0;
    drain();
    check_phase("C", 0, 16'hffff, 0, 0, FIFO_DEPTH, 1);

    // (D) one event per base clock (10 ns at 100 MHz): channel 0 toggles every cycle
    start_phase(0, 3, 16'hffff, 0, 0);
    // channels 0 and 1 alternate, so one of them rises at every edge; the
    // readout takes two cycles per event, so a 64-deep FIFO absorbs a burst
    // of up to about 128 such events: 120 are sent
    for (int i = 0; i < 120; i++) begin
      @(negedge clk);
      ch_in[0] = (i % 2 == 0);
      ch_in[1] = (i % 2 == 1);
    end
    @(negedge clk) ch_in = '0;
    drain();
    check_phase("D", 3, 16'hffff, 0, 0, 1 << 30, 0);
    for (int i = 1; i < got.size(); i++) if (got[i].tmc == got[i-1].tmc + 1) n_full_rate++;

    // (E) external clock as the time base
    start_phase(0, 1, 16'hffff, 1, 0);
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          repeat ($urandom_range(3, 6)) @(negedge clk);
          ext_clk = 1;
          repeat ($urandom_range(3, 6)) @(negedge clk);
          ext_clk = 0;
        end
      end
      random_pulses(2500, 50);
    join
    repeat (20) @(negedge clk);
    drain();
    n_ext_ticks = ticks.size();
    chk("E: one tick per external clock edge", ticks.size() >= 290 && ticks.size() <= 300, 1);
    check_phase("E", 1, 16'hffff, 1, 0, 1 << 30, 0);
    check_scalers();

    $display("events %0d coincidences %0d delayed %0d masked %0d vetoed %0d gate %0d flag %0d",
             n_events, n_coinc, n_delay, n_masked, n_veto, n_gate_st, n_flag_st);
    $display("lost on overflow %0d overflow flag %0d backpressure cycles %0d full-rate pairs %0d ext ticks %0d scaler clears %0d",
             n_ovf_lost, n_ovf_status, n_backpressure, n_full_rate, n_ext_ticks, n_scaler_clr);
    chk("mechanism: events", n_events > 0, 1);
    chk("mechanism: coincidence", n_coinc > 0, 1);
    chk("mechanism: delay", n_delay > 0, 1);
    chk("mechanism: channel mask", n_masked > 0, 1);
    chk("mechanism: veto", n_veto > 0, 1);
    chk("mechanism: gate status", n_gate_st > 0, 1);
    chk("mechanism: flag status", n_flag_st > 0, 1);
    chk("mechanism: overflow loss", n_ovf_lost > 0, 1);
    chk("mechanism: overflow flag", n_ovf_status > 0, 1);
    chk("mechanism: backpressure", n_backpressure > 0, 1);
    chk("mechanism: full rate", n_full_rate >= 110, 1);
    chk("mechanism: external clock", n_ext_ticks > 0, 1);
    chk("mechanism: scaler clear", n_scaler_clr > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
