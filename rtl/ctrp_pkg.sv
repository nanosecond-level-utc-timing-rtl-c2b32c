// ctrp_pkg: types and constants shared by the CTRP timing-receiver FPGA core.
//
// The GMT frame layout, the action-table entry, the counter configuration
// and the local-bus register map are collected here. The frame format and
// the register map are this design's own choices (the timing network only
// fixes the 500 kb/s rate and the 40 MHz reference); the counter
// configuration fields follow the list of per-counter settings of the CTRP:
// arming event, start mode, clock mode and output routing, plus a delay.
package ctrp_pkg;

  // ---------------------------------------------------------------- GMT frame
  localparam int unsigned MSG_W     = 40;          // 8-bit type + 32-bit payload
  localparam int unsigned TYPE_W    = 8;
  localparam int unsigned PAYLOAD_W = 32;
  localparam logic [TYPE_W-1:0] MSG_TYPE_UTC = 8'h01; // payload = UTC second

  // ---------------------------------------------------------------- UTC time
  localparam int unsigned TICK_W = 26;             // 40e6 ticks of 25 ns < 2^26

  // ---------------------------------------------------------------- counters
  typedef enum logic [1:0] {
    START_IMMEDIATE = 2'd0,                        // start when the action loads
    START_EXTERNAL  = 2'd1,                        // wait for a front-panel start
    START_CHAINED   = 2'd2                         // wait for the previous counter
  } start_mode_t;

  typedef struct packed {
    start_mode_t start_mode;
    logic [1:0]  start_sel;                        // which external start input
    logic [1:0]  clk_sel;                          // 0: clean 40 MHz, k: ext clock k-1
    logic        out_fp;                           // route output to front panel
    logic        out_irq;                          // route output to PCI interrupt
    logic [31:0] delay;                            // ticks of the selected clock
  } counter_cfg_t;

  typedef struct packed {
    logic               en;
    logic [MSG_W-1:0]   event_code;                // frame that triggers the action
    logic [2:0]         channel;                   // counter to load
    counter_cfg_t       cfg;
  } action_t;

  // ---------------------------------------------------------------- register map
  // Word addresses on the local bus.
  localparam logic [7:0] REG_CTRL       = 8'h00;   // [0] pll_enable, [11:8] avg_log2
  localparam logic [7:0] REG_PLL_SETPT  = 8'h01;   // phase setpoint, ticks with 8 fraction bits
  localparam logic [7:0] REG_PLL_KP     = 8'h02;   // signed 16
  localparam logic [7:0] REG_PLL_KI     = 8'h03;   // signed 16
  localparam logic [7:0] REG_PLL_DAC    = 8'h04;   // RO current DAC code
  localparam logic [7:0] REG_PLL_PHASE  = 8'h05;   // RO last phase average
  localparam logic [7:0] REG_UTC_SEC    = 8'h06;   // RO, latches REG_UTC_TICK
  localparam logic [7:0] REG_UTC_TICK   = 8'h07;   // RO tick latched by REG_UTC_SEC read
  localparam logic [7:0] REG_IRQ_STAT   = 8'h08;   // W1C [NCH-1:0] counters, [8] rx error, [9] overrun
  localparam logic [7:0] REG_IRQ_EN     = 8'h09;
  localparam logic [7:0] REG_JTAG       = 8'h0A;   // [0] TCK [1] TMS [2] TDI [3] TRST_N [4] TDO(RO)
  localparam logic [7:0] REG_TDC_DATA   = 8'h0B;   // RO, a read pops the HPTDC FIFO
  localparam logic [7:0] REG_TDC_STAT   = 8'h0C;   // RO [15:0] count, [16] empty
  localparam logic [7:0] REG_ACT_W0     = 8'h0D;   // event_code[31:0]
  localparam logic [7:0] REG_ACT_W1     = 8'h0E;   // see act_pack_w1 below
  localparam logic [7:0] REG_ACT_W2     = 8'h0F;   // delay
  localparam logic [7:0] REG_ACT_COMMIT = 8'h10;   // write: [7:0] entry address
  localparam logic [7:0] REG_MSG_LO     = 8'h11;   // RO last frame [31:0]
  localparam logic [7:0] REG_MSG_HI     = 8'h12;   // RO last frame [39:32]
  localparam logic [7:0] REG_STATUS     = 8'h13;   // RO [7:0] counters armed, [8] scan busy, [9] second start
  localparam logic [7:0] REG_STAMP_BASE = 8'h20;   // +2*ch: second, +2*ch+1: tick

  // REG_ACT_W1 layout: [7:0] event_code[39:32], [10:8] channel,
  // [13:12] start_mode, [15:14] start_sel, [17:16] clk_sel,
  // [18] out_fp, [19] out_irq, [31] en.
  function automatic action_t act_from_words(logic [31:0] w0, logic [31:0] w1, logic [31:0] w2);
    action_t a;
    a.en             = w1[31];
    a.event_code     = {w1[7:0], w0};
    a.channel        = w1[10:8];
    a.cfg.start_mode = start_mode_t'(w1[13:12]);
    a.cfg.start_sel  = w1[15:14];
    a.cfg.clk_sel    = w1[17:16];
    a.cfg.out_fp     = w1[18];
    a.cfg.out_irq    = w1[19];
    a.cfg.delay      = w2;
    return a;
  endfunction

endpackage
