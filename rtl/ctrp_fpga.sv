// ctrp_fpga: FPGA core of a GMT timing receiver with a UTC-locked 40 MHz.
//
// The card listens to the 500 kb/s General Machine Timing messages and
// rebuilds from them a clean 40 MHz clock that is locked to the 40 MHz of the
// sender, and thereby to UTC. Two clock domains:
//
//  * clk_osc, an unrelated free-running oscillator: phase_detector measures
//    how many oscillator ticks separate each rising edge of the GMT signal
//    from the next edge of the clean 40 MHz and averages them; pi_controller
//    turns the average into a DAC code for the VCXO that makes clk40.
//  * clk40, the clean clock: gmt_rx decodes the messages; UTC messages load
//    utc_clock (UTC second + 25 ns ticks); every message is looked up by
//    action_scanner in action_ram, which loads and arms counter_channel
//    instances. The counters start immediately, on a front-panel start or on
//    the previous counter, count 40 MHz or external clock ticks, and produce
//    front-panel pulses and/or interrupts time-tagged in UTC. ref10k_gen
//    sends a 10 kHz UTC-aligned reference to the HPTDC, jtag_port and
//    hptdc_readout serve the HPTDC, host_regs is the local-bus register map.
//
// The partition follows the CTRP card; the register map, the message format
// and the handshakes are this design's choices (see the modules). The PLL
// settings cross into clk_osc through cdc_bus and are quasi-static; PLL
// status returns through two flip-flops in host_regs.
module ctrp_fpga
  import ctrp_pkg::*;
#(
  parameter int unsigned NCH           = 5,
  parameter int unsigned NSTART        = 2,
  parameter int unsigned NEXTCLK       = 2,
  parameter int unsigned ACTIONS       = 256,
  parameter int unsigned TICKS_PER_SEC = 40_000_000,
  parameter int unsigned BIT_CLKS      = 80,
  parameter int unsigned REF_DIV       = 4000,
  parameter int unsigned PULSE_W       = 40
) (
  input  logic               clk40,
  input  logic               clk_osc,
  input  logic               rst_n,
  input  logic               gmt_in,
  input  logic [NSTART-1:0]  ext_start,
  input  logic [NEXTCLK-1:0] ext_clk,
  input  logic [7:0]         lb_addr,
  input  logic [31:0]        lb_wdata,
  input  logic               lb_wr,
  input  logic               lb_rd,
  output logic [31:0]        lb_rdata,
  output logic               irq,
  output logic [NCH-1:0]     out_fp,
  output logic [15:0]        dac_code,
  output logic               dac_load,
  output logic               tdc_tck,
  output logic               tdc_tms,
  output logic               tdc_tdi,
  output logic               tdc_trst_n,
  input  logic               tdc_tdo,
  output logic               tdc_ref10k,
  input  logic               tdc_data_ready,
  output logic               tdc_get_data,
  input  logic [31:0]        tdc_data
);

  localparam int unsigned AAW = $clog2(ACTIONS);

  // ------------------------------------------------------------ resets
  logic rst40_n, rsto_n;
  reset_sync u_rs40 (.clk(clk40),   .rst_n_in(rst_n), .rst_n_out(rst40_n));
  reset_sync u_rso  (.clk(clk_osc), .rst_n_in(rst_n), .rst_n_out(rsto_n));

  // ------------------------------------------------------------ PLL (clk_osc)
  logic        pll_enable, pll_enable_o;
  logic [3:0]  avg_log2, avg_log2_o;
  logic [15:0] pll_setpoint, pll_setpoint_o;
  logic signed [15:0] pll_kp, pll_ki, pll_kp_o, pll_ki_o;
  logic        ph_valid;
  logic [15:0] ph_avg;

  cdc_bus #(.W(1 + 4 + 16 + 16 + 16)) u_cfg_cdc (
    .clk(clk_osc), .rst_n(rsto_n),
    .in ({pll_enable,   avg_log2,   pll_setpoint,   pll_kp,   pll_ki}),
    .out({pll_enable_o, avg_log2_o, pll_setpoint_o, pll_kp_o, pll_ki_o})
  );

  phase_detector #(.CNT_W(8), .FRAC(8)) u_pd (
    .clk(clk_osc), .rst_n(rsto_n),
    .gmt_in, .clk40_in(clk40),
    .avg_log2(avg_log2_o),
    .avg_valid(ph_valid), .avg(ph_avg)
  );

  pi_controller #(.IN_W(16), .DAC_W(16), .SHIFT(8)) u_pi (
    .clk(clk_osc), .rst_n(rsto_n),
    .enable(pll_enable_o), .in_valid(ph_valid), .phase(ph_avg),
    .setpoint(pll_setpoint_o), .kp(pll_kp_o), .ki(pll_ki_o),
    .dac_code, .dac_load
  );

  // ------------------------------------------------------------ messages (clk40)
  logic             msg_valid, msg_err;
  logic [MSG_W-1:0] msg;
  logic             utc_load;
  logic [31:0]      utc_sec;
  logic [TICK_W-1:0] utc_tick;
  logic             sec_start;

  gmt_rx #(.BIT_CLKS(BIT_CLKS)) u_rx (
    .clk(clk40), .rst_n(rst40_n), .gmt_in,
    .msg_valid, .msg, .msg_err
  );

  assign utc_load = msg_valid && msg[MSG_W-1 -: TYPE_W] == MSG_TYPE_UTC;

  utc_clock #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_utc (
    .clk(clk40), .rst_n(rst40_n),
    .load(utc_load), .load_sec(msg[PAYLOAD_W-1:0]),
    .sec(utc_sec), .tick(utc_tick), .sec_start
  );

  ref10k_gen #(.DIV(REF_DIV)) u_ref (
    .clk(clk40), .rst_n(rst40_n), .sync(utc_load), .ref_out(tdc_ref10k)
  );

  // ------------------------------------------------------------ actions
  logic           act_we;
  logic [AAW-1:0] act_waddr, act_raddr;
  action_t        act_wdata, act_rdata;
  logic [NCH-1:0] ch_load;
  counter_cfg_t   ch_cfg;
  logic           scan_busy, scan_overrun;

  action_ram #(.ACTIONS(ACTIONS)) u_ram (
    .clk(clk40), .we(act_we), .waddr(act_waddr), .wdata(act_wdata),
    .raddr(act_raddr), .rdata(act_rdata)
  );

  action_scanner #(.ACTIONS(ACTIONS), .NCH(NCH)) u_scan (
    .clk(clk40), .rst_n(rst40_n), .msg_valid, .msg,
    .raddr(act_raddr), .rdata(act_rdata),
    .load(ch_load), .load_cfg(ch_cfg), .busy(scan_busy), .overrun(scan_overrun)
  );

  // ------------------------------------------------------------ counters
  logic [NSTART-1:0]  start_rise;
  logic [NEXTCLK-1:0] clk_rise;
  logic [NCH-1:0]     ch_fire, ch_irq, ch_armed;
  logic [31:0]        stamp_sec  [NCH];
  logic [TICK_W-1:0]  stamp_tick [NCH];

  sync_edge #(.N(NSTART))  u_start_sync (.clk(clk40), .rst_n(rst40_n), .in(ext_start), .rise(start_rise));
  sync_edge #(.N(NEXTCLK)) u_clk_sync   (.clk(clk40), .rst_n(rst40_n), .in(ext_clk),   .rise(clk_rise));

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    counter_channel #(.NSTART(NSTART), .NEXTCLK(NEXTCLK), .PULSE_W(PULSE_W)) u_ch (
      .clk(clk40), .rst_n(rst40_n),
      .load(ch_load[c]), .load_cfg(ch_cfg),
      .start_pulse(start_rise), .clk_tick(clk_rise),
      .prev_fire(ch_fire[(c + NCH - 1) % NCH]),
      .utc_sec, .utc_tick,
      .fire(ch_fire[c]), .out_fp(out_fp[c]), .irq(ch_irq[c]),
      .stamp_sec(stamp_sec[c]), .stamp_tick(stamp_tick[c]), .armed(ch_armed[c])
    );
  end

  // ------------------------------------------------------------ HPTDC
  logic       jtag_wr;
  logic [3:0] jtag_wdata;
  logic [4:0] jtag_rdata;
  logic       tdc_pop, tdc_empty;
  logic [31:0] tdc_rd_data;
  logic [4:0] tdc_count;

  jtag_port u_jtag (
    .clk(clk40), .rst_n(rst40_n), .wr(jtag_wr), .wdata(jtag_wdata), .rdata(jtag_rdata),
    .tck(tdc_tck), .tms(tdc_tms), .tdi(tdc_tdi), .trst_n(tdc_trst_n), .tdo(tdc_tdo)
  );

  hptdc_readout #(.DEPTH(16), .DATA_W(32)) u_tdc (
    .clk(clk40), .rst_n(rst40_n),
    .data_ready(tdc_data_ready), .get_data(tdc_get_data), .tdc_data,
    .pop(tdc_pop), .rd_data(tdc_rd_data), .empty(tdc_empty), .count(tdc_count)
  );

  // ------------------------------------------------------------ register map
  host_regs #(.NCH(NCH), .ACTIONS(ACTIONS)) u_regs (
    .clk(clk40), .rst_n(rst40_n),
    .lb_addr, .lb_wdata, .lb_wr, .lb_rd, .lb_rdata, .irq,
    .pll_enable, .avg_log2, .pll_setpoint, .pll_kp, .pll_ki,
    .pll_dac(dac_code), .pll_phase(ph_avg),
    .utc_sec, .utc_tick,
    .msg_valid, .msg, .rx_err(msg_err), .scan_overrun,
    .act_we, .act_waddr, .act_wdata,
    .ch_irq, .ch_armed, .scan_busy, .sec_start, .stamp_sec, .stamp_tick,
    .jtag_wr, .jtag_wdata, .jtag_rdata,
    .tdc_pop, .tdc_rd_data, .tdc_empty, .tdc_count
  );

endmodule
