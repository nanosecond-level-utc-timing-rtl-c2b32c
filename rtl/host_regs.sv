// host_regs: local-bus register map of the timing receiver.
//
// The CPU reaches every subsystem of the card through the PCI bridge's local
// bus: it writes the action table and the PLL coefficients, reads the UTC
// time, the time tags of the counters and the HPTDC words, drives the HPTDC
// JTAG lines, and takes interrupts from the counters. The bus is taken as a
// plain synchronous word bus: on a cycle with lb_wr the word lb_wdata is
// written to lb_addr; on a cycle with lb_rd the addressed word appears on
// lb_rdata one cycle later. The addresses (ctrp_pkg::REG_*) and the bus
// protocol are this design's choices.
//
// Actions are written as three staged words (REG_ACT_W0..W2) and committed
// to an entry by writing its address to REG_ACT_COMMIT. Reading REG_UTC_SEC
// latches the tick count so REG_UTC_TICK reads the same instant. REG_IRQ_STAT
// bits are set by counter interrupt strobes ([NCH-1:0]), receiver errors
// ([8]) and scanner overruns ([9]) and are cleared by writing 1;
// irq = |(status & enable). PLL status comes from the oscillator domain and
// is sampled through two flip-flops: it is slowly changing and a torn read is
// tolerated. A read of REG_TDC_DATA pops the HPTDC FIFO. REG_STATUS shows
// which counters are armed or counting and whether a table scan is running.
module host_regs
  import ctrp_pkg::*;
#(
  parameter int unsigned NCH     = 5,
  parameter int unsigned ACTIONS = 256,
  localparam int unsigned AAW    = $clog2(ACTIONS),
  localparam int unsigned TDC_CW = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // local bus
  input  logic [7:0]        lb_addr,
  input  logic [31:0]       lb_wdata,
  input  logic              lb_wr,
  input  logic              lb_rd,
  output logic [31:0]       lb_rdata,
  output logic              irq,
  // PLL
  output logic              pll_enable,
  output logic [3:0]        avg_log2,
  output logic [15:0]       pll_setpoint,
  output logic signed [15:0] pll_kp,
  output logic signed [15:0] pll_ki,
  input  logic [15:0]       pll_dac,       // oscillator domain
  input  logic [15:0]       pll_phase,     // oscillator domain
  // UTC
  input  logic [31:0]       utc_sec,
  input  logic [TICK_W-1:0] utc_tick,
  // receiver and scanner
  input  logic              msg_valid,
  input  logic [MSG_W-1:0]  msg,
  input  logic              rx_err,
  input  logic              scan_overrun,
  // action table
  output logic              act_we,
  output logic [AAW-1:0]    act_waddr,
  output action_t           act_wdata,
  // counters
  input  logic [NCH-1:0]    ch_irq,
  input  logic [NCH-1:0]    ch_armed,
  input  logic              scan_busy,
  input  logic              sec_start,
  input  logic [31:0]       stamp_sec  [NCH],
  input  logic [TICK_W-1:0] stamp_tick [NCH],
  // HPTDC JTAG
  output logic              jtag_wr,
  output logic [3:0]        jtag_wdata,
  input  logic [4:0]        jtag_rdata,
  // HPTDC readout
  output logic              tdc_pop,
  input  logic [31:0]       tdc_rd_data,
  input  logic              tdc_empty,
  input  logic [TDC_CW-1:0] tdc_count
);

  logic [31:0]       act_w0, act_w1, act_w2;
  logic [9:0]        irq_stat, irq_en;
  logic [TICK_W-1:0] tick_latch;
  logic [MSG_W-1:0]  last_msg;
  logic [15:0]       dac_s1, dac_s2, ph_s1, ph_s2;
  logic [9:0]        irq_set;

  logic [7:0] stamp_off;
  logic [2:0] stamp_idx;
  assign stamp_off = lb_addr - REG_STAMP_BASE;
  assign stamp_idx = stamp_off[3:1];

  assign irq_set = {scan_overrun, rx_err, {(8-NCH){1'b0}}, ch_irq};
  assign irq     = |(irq_stat & irq_en);

  // writes that act outside this block
  assign act_we     = lb_wr && lb_addr == REG_ACT_COMMIT;
  assign act_waddr  = AAW'(lb_wdata);
  assign act_wdata  = act_from_words(act_w0, act_w1, act_w2);
  assign jtag_wr    = lb_wr && lb_addr == REG_JTAG;
  assign jtag_wdata = lb_wdata[3:0];
  assign tdc_pop    = lb_rd && lb_addr == REG_TDC_DATA;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pll_enable   <= 1'b0;
      avg_log2     <= 4'd4;
      pll_setpoint <= '0;
      pll_kp       <= '0;
      pll_ki       <= '0;
      act_w0       <= '0;
      act_w1       <= '0;
      act_w2       <= '0;
      irq_stat     <= '0;
      irq_en       <= '0;
      tick_latch   <= '0;
      last_msg     <= '0;
      dac_s1       <= '0;
      dac_s2       <= '0;
      ph_s1        <= '0;
      ph_s2        <= '0;
      lb_rdata     <= '0;
    end else begin
      {dac_s2, dac_s1} <= {dac_s1, pll_dac};
      {ph_s2, ph_s1}   <= {ph_s1, pll_phase};
      if (msg_valid) last_msg <= msg;

      // interrupt status: set by events, cleared by writing 1
      irq_stat <= (irq_stat & ~((lb_wr && lb_addr == REG_IRQ_STAT) ? lb_wdata[9:0] : 10'd0))
                  | irq_set;

      if (lb_wr) begin
        unique case (lb_addr)
          REG_CTRL:      begin pll_enable <= lb_wdata[0]; avg_log2 <= lb_wdata[11:8]; end
          REG_PLL_SETPT: pll_setpoint <= lb_wdata[15:0];
          REG_PLL_KP:    pll_kp       <= lb_wdata[15:0];
          REG_PLL_KI:    pll_ki       <= lb_wdata[15:0];
          REG_IRQ_EN:    irq_en       <= lb_wdata[9:0];
          REG_ACT_W0:    act_w0       <= lb_wdata;
          REG_ACT_W1:    act_w1       <= lb_wdata;
          REG_ACT_W2:    act_w2       <= lb_wdata;
          default: ;
        endcase
      end

      if (lb_rd) begin
        lb_rdata <= '0;
        if (lb_addr >= REG_STAMP_BASE && 32'(lb_addr - REG_STAMP_BASE) < 2 * NCH) begin
          if (lb_addr[0]) lb_rdata <= 32'(stamp_tick[stamp_idx]);
          else            lb_rdata <= stamp_sec[stamp_idx];
        end else begin
          unique case (lb_addr)
            REG_CTRL:      lb_rdata <= {20'd0, avg_log2, 7'd0, pll_enable};
            REG_PLL_SETPT: lb_rdata <= {16'd0, pll_setpoint};
            REG_PLL_KP:    lb_rdata <= {{16{pll_kp[15]}}, pll_kp};
            REG_PLL_KI:    lb_rdata <= {{16{pll_ki[15]}}, pll_ki};
            REG_PLL_DAC:   lb_rdata <= {16'd0, dac_s2};
            REG_PLL_PHASE: lb_rdata <= {16'd0, ph_s2};
            REG_UTC_SEC:   begin lb_rdata <= utc_sec; tick_latch <= utc_tick; end
            REG_UTC_TICK:  lb_rdata <= 32'(tick_latch);
            REG_IRQ_STAT:  lb_rdata <= 32'(irq_stat);
            REG_IRQ_EN:    lb_rdata <= 32'(irq_en);
            REG_JTAG:      lb_rdata <= 32'(jtag_rdata);
            REG_TDC_DATA:  lb_rdata <= tdc_rd_data;
            REG_TDC_STAT:  lb_rdata <= {15'd0, tdc_empty, 16'(tdc_count)};
            REG_ACT_W0:    lb_rdata <= act_w0;
            REG_ACT_W1:    lb_rdata <= act_w1;
            REG_ACT_W2:    lb_rdata <= act_w2;
            REG_MSG_LO:    lb_rdata <= last_msg[31:0];
            REG_MSG_HI:    lb_rdata <= 32'(last_msg[MSG_W-1:32]);
            REG_STATUS:    lb_rdata <= {22'd0, sec_start, scan_busy, 8'(ch_armed)};
            default: ;
          endcase
        end
      end
    end
  end

endmodule
