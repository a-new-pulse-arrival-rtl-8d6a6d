// patrm_pci_top - FPGA logic of a 16-channel pulse arrival-time recorder
// with a PCI readout.
//
// Every detector pulse is recorded as an event: the time at which it
// arrived (a 32-bit Time Mark Counter value), which channels fired in that
// time bin (16 bits, so coincident hits share one event) and 16 status bits
// (external gate, flag, veto, overflow). Data path, one base clock:
//
//   ch_in -> input_latch -> pdsr -> hit_detector --wr--> hs_fifo -> readout_sm -> pci_*
//                 |                  time_mark_counter --^   status word --^
//                 +-> 16 x scaler -> scaler_mux -> reg_rdata
//
// The programmable clock (prog_clock) produces a `tick` that sets the time
// resolution: on each tick the latch hands the edges of the last period to
// the delay shift register (PDSR), and the word leaving the PDSR, if
// non-zero, is written into the FIFO with the current time mark; the counter
// then advances. An event therefore carries the time of the tick at which it
// left the PDSR, DELAY+1 ticks after the period in which its edges arrived
// (an edge in period k, counting the first period after run as k = 0, is
// stamped k + DELAY + 1). The readout state machine sends each event as two
// 32-bit words, time mark then {status, channels}, into the PCI controller's
// add-on FIFO, holding while `pci_full` is high. When the FIFO is full a
// new event is lost and the sticky overflow status bit is set. The scalers
// count every synchronised rising edge of every channel and are read and
// cleared through the register port without stopping the recording.
//
// The PCI controller chip itself is outside this module: its add-on side is
// the register port (reg_*) and the event write port (pci_*). Register reads
// at word addresses 0x10..0x1F return scalers 0..15, other addresses the
// status/control registers (see status_ctrl_regs). The blocks and their
// connections follow the original design's block diagram; the single clock domain,
// the port protocol and the register map are this design's choices.
module patrm_pci_top
  import patrm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned PDSR_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_CH-1:0] ch_in,
  input  logic              ext_gate,
  input  logic              ext_flag,
  input  logic              ext_clk,
  input  logic [ADDR_W-1:0] reg_addr,
  input  logic              reg_wr,
  input  logic [WORD_W-1:0] reg_wdata,
  output logic [WORD_W-1:0] reg_rdata,
  output logic [WORD_W-1:0] pci_wdata,
  output logic              pci_wr,
  input  logic              pci_full
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);

  cfg_t              cfg;
  logic              clr, veto, tick;
  logic [NUM_CH-1:0] scaler_clr, latched, pulse, pdsr_out;
  logic [STAT_W-1:0] status_word;
  logic [TMC_W-1:0]  tmc;
  logic              hit, fifo_wr, fifo_full, fifo_ovf, fifo_rd, fifo_empty;
  logic [FAW:0]      fifo_level;
  event_t            ev_in, ev_out;
  logic [WORD_W-1:0] regs_rdata, scaler_rdata;
  logic [31:0]       scaler_count [NUM_CH];

  status_ctrl_regs u_regs (
    .clk, .rst_n, .reg_addr, .reg_wr, .reg_wdata, .reg_rdata(regs_rdata),
    .ext_gate, .ext_flag, .fifo_overflow(fifo_ovf), .fifo_level(16'(fifo_level)),
    .tmc, .cfg, .clr, .scaler_clr, .veto, .status_word
  );

  prog_clock #(.DIV_W(DIV_W)) u_clk (
    .clk, .rst_n, .ext_clk, .ext_sel(cfg.ext_clk_sel), .div(cfg.clk_div), .tick
  );

  input_latch #(.N(NUM_CH)) u_latch (
    .clk, .rst_n, .ch_in, .ch_mask(cfg.ch_mask), .tick, .latched, .pulse
  );

  pdsr #(.N(NUM_CH), .DEPTH(PDSR_DEPTH)) u_pdsr (
    .clk, .rst_n, .clr, .tick, .din(latched), .delay(cfg.delay), .dout(pdsr_out)
  );

  hit_detector #(.N(NUM_CH)) u_hit (
    .channels(pdsr_out), .tick, .enable(cfg.run & ~veto), .hit, .wr_en(fifo_wr)
  );

  time_mark_counter #(.W(TMC_W)) u_tmc (
    .clk, .rst_n, .clr, .tick, .en(cfg.run), .count(tmc)
  );

  always_comb begin
    ev_in.tmc      = tmc;
    ev_in.status   = status_word;
    ev_in.channels = pdsr_out;
  end

  hs_fifo #(.WIDTH(EVENT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr, .wr_en(fifo_wr), .wr_data(ev_in), .full(fifo_full),
    .overflow(fifo_ovf), .rd_en(fifo_rd), .rd_data(ev_out), .empty(fifo_empty),
    .level(fifo_level)
  );

  readout_sm u_sm (
    .clk, .rst_n, .fifo_empty, .fifo_data(ev_out), .fifo_rd, .pci_wdata, .pci_wr, .pci_full
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_scaler
    scaler #(.W(32)) u_scaler (
      .clk, .rst_n, .clr(scaler_clr[c]), .inc(pulse[c]), .count(scaler_count[c])
    );
  end

  scaler_mux #(.N(NUM_CH), .W(32)) u_mux (
    .counts(scaler_count), .sel(reg_addr[3:0]), .dout(scaler_rdata)
  );

  always_comb begin
    if (reg_addr[ADDR_W-1:4] == REG_SCALER0[ADDR_W-1:4]) reg_rdata = scaler_rdata;
    else                                                   reg_rdata = regs_rdata;
  end

  // fifo_full is kept for the assertion: a write is only lost when full.
  a_ovf_only_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                         fifo_wr && !fifo_full && !clr |=> !fifo_ovf);
endmodule
