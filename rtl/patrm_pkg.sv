// patrm_pkg - shared types and constants of the pulse arrival-time recorder.
//
// The event layout follows the recorder's definition of a stored event: a
// 32-bit time mark, the 16-bit channel word taken from the delay shift
// register and 16 bits of status. The register map, the status-bit
// positions and the configuration struct are this design's own choices.
package patrm_pkg;

  localparam int unsigned NUM_CH = 16;  // input channels
  localparam int unsigned TMC_W  = 32;  // time mark counter width
  localparam int unsigned STAT_W = 16;  // status bits stored per event
  localparam int unsigned WORD_W = 32;  // width of the PCI data path
  localparam int unsigned DIV_W  = 16;  // programmable clock divider width
  localparam int unsigned ADDR_W = 6;   // register word address width

  // One recorded event, 64 bits. Word 0 sent to the PCI side is tmc,
  // word 1 is {status, channels}.
  typedef struct packed {
    logic [TMC_W-1:0]  tmc;
    logic [STAT_W-1:0] status;
    logic [NUM_CH-1:0] channels;
  } event_t;

  localparam int unsigned EVENT_W = $bits(event_t);

  // Register word addresses.
  localparam logic [ADDR_W-1:0] REG_CTRL     = 6'h00;
  localparam logic [ADDR_W-1:0] REG_CLKDIV   = 6'h01;
  localparam logic [ADDR_W-1:0] REG_DELAY    = 6'h02;
  localparam logic [ADDR_W-1:0] REG_CHMASK   = 6'h03;
  localparam logic [ADDR_W-1:0] REG_STATUS   = 6'h04;
  localparam logic [ADDR_W-1:0] REG_SCL_RST  = 6'h05;
  localparam logic [ADDR_W-1:0] REG_TMC      = 6'h06;
  localparam logic [ADDR_W-1:0] REG_SCALER0  = 6'h10;  // 0x10..0x1F: scalers 0..15

  // CONTROL register bits.
  localparam int unsigned CTRL_RUN     = 0;  // recording enabled
  localparam int unsigned CTRL_EXTCLK  = 1;  // tick from External Clock
  localparam int unsigned CTRL_VETOEN  = 2;  // External Gate acts as veto
  localparam int unsigned CTRL_CLR_OVF = 3;  // write 1: clear overflow flag
  localparam int unsigned CTRL_CLEAR   = 4;  // write 1: clear TMC, PDSR, FIFO

  // Status word bits.
  localparam int unsigned ST_GATE   = 0;
  localparam int unsigned ST_FLAG   = 1;
  localparam int unsigned ST_VETO   = 2;
  localparam int unsigned ST_OVF    = 3;
  localparam int unsigned ST_EXTCLK = 4;

  // Reset value of the divider: CLKDIV+1 = 10 base cycles, 100 ns at 100 MHz.
  localparam logic [DIV_W-1:0] CLKDIV_RESET = 16'd9;

  // Decoded configuration from the control registers.
  typedef struct packed {
    logic              run;
    logic              ext_clk_sel;
    logic              veto_en;
    logic [DIV_W-1:0]  clk_div;
    logic [7:0]        delay;
    logic [NUM_CH-1:0] ch_mask;
  } cfg_t;

endpackage
