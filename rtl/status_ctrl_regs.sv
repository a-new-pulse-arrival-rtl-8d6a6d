// status_ctrl_regs - Status and Control Registers of the recorder.
//
// Software configures the card through these registers before enabling the
// inputs. Writes (`reg_wr` with `reg_addr`, `reg_wdata`) take effect at the
// next clock edge; reads are combinational from `reg_addr`. Word map:
//   0 CONTROL  bit0 run, bit1 external clock, bit2 veto enable;
//              writing 1 to bit3 clears the overflow flag, to bit4 clears the
//              time mark counter, delay register and FIFO (`clr` pulse)
//   1 CLKDIV   programmable clock divider (tick every CLKDIV+1 cycles)
//   2 DELAY    delay shift register tap (delay = DELAY+1 ticks)
//   3 CHMASK   channel selection, bit n = 1 records channel n
//   4 STATUS   read: {FIFO level, status word}
//   5 SCL_RST  write: bit n = 1 clears scaler n (`scaler_clr` pulse)
//   6 TMC      read: time mark counter
// Unmapped addresses read zero (scaler addresses are answered outside).
//
// External Gate and External Flag are synchronised with two flip-flops.
// The 16-bit status word stored with every event is: bit0 External Gate,
// bit1 External Flag, bit2 veto active, bit3 FIFO overflow (sticky until
// cleared), bit4 external clock selected, other bits zero. `veto` is high
// while veto is enabled and the External Gate is high.
//
// The register set's existence, the External Gate/Veto/Flag inputs and the
// 16 status bits per event are from the original design; the map, the bit
// positions and the reset values are this design's choices.
module status_ctrl_regs
  import patrm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] reg_addr,
  input  logic              reg_wr,
  input  logic [WORD_W-1:0] reg_wdata,
  output logic [WORD_W-1:0] reg_rdata,
  input  logic              ext_gate,
  input  logic              ext_flag,
  input  logic              fifo_overflow,
  input  logic [15:0]       fifo_level,
  input  logic [TMC_W-1:0]  tmc,
  output cfg_t              cfg,
  output logic              clr,
  output logic [NUM_CH-1:0] scaler_clr,
  output logic              veto,
  output logic [STAT_W-1:0] status_word
);
  logic gate_s, flag_s, ovf;

  sync2 #(.W(2)) u_sync (.clk, .rst_n, .d({ext_gate, ext_flag}), .q({gate_s, flag_s}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.run         <= 1'b0;
      cfg.ext_clk_sel <= 1'b0;
      cfg.veto_en     <= 1'b0;
      cfg.clk_div     <= CLKDIV_RESET;
      cfg.delay       <= '0;
      cfg.ch_mask     <= '1;
      clr             <= 1'b0;
      scaler_clr      <= '0;
      ovf             <= 1'b0;
    end else begin
      clr        <= 1'b0;
      scaler_clr <= '0;
      if (fifo_overflow) ovf <= 1'b1;
      if (reg_wr) begin
        unique case (reg_addr)
          REG_CTRL: begin
            cfg.run         <= reg_wdata[CTRL_RUN];
            cfg.ext_clk_sel <= reg_wdata[CTRL_EXTCLK];
            cfg.veto_en     <= reg_wdata[CTRL_VETOEN];
            clr             <= reg_wdata[CTRL_CLEAR];
            if (reg_wdata[CTRL_CLR_OVF]) ovf <= 1'b0;
          end
          REG_CLKDIV:  cfg.clk_div  <= reg_wdata[DIV_W-1:0];
          REG_DELAY:   cfg.delay    <= reg_wdata[7:0];
          REG_CHMASK:  cfg.ch_mask  <= reg_wdata[NUM_CH-1:0];
          REG_SCL_RST: scaler_clr   <= reg_wdata[NUM_CH-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    veto        = cfg.veto_en & gate_s;
    status_word = '0;
    status_word[ST_GATE]   = gate_s;
    status_word[ST_FLAG]   = flag_s;
    status_word[ST_VETO]   = veto;
    status_word[ST_OVF]    = ovf;
    status_word[ST_EXTCLK] = cfg.ext_clk_sel;

    reg_rdata = '0;
    unique case (reg_addr)
      REG_CTRL:   reg_rdata = WORD_W'({cfg.veto_en, cfg.ext_clk_sel, cfg.run});
      REG_CLKDIV: reg_rdata = WORD_W'(cfg.clk_div);
      REG_DELAY:  reg_rdata = WORD_W'(cfg.delay);
      REG_CHMASK: reg_rdata = WORD_W'(cfg.ch_mask);
      REG_STATUS: reg_rdata = {fifo_level, status_word};
      REG_TMC:    reg_rdata = tmc;
      default:    reg_rdata = '0;
    endcase
  end
endmodule
