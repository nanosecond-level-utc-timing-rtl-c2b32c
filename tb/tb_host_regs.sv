// tb_host_regs: self-checking test of the local-bus register map.
//
// Drives the bus with single-cycle writes and reads (data one cycle after
// lb_rd) and checks: read-back of the control and PLL registers; that the
// PLL settings reach their outputs; the three-word action write and its
// commit strobe, field by field; interrupt status set by each source,
// masked by the enable, cleared by writing 1; the coherent UTC second/tick
// read; the JTAG write strobe and read-back; the HPTDC FIFO pop on a data
// read; the per-counter time tags; the last frame and the status word.
module tb_host_regs;
  import ctrp_pkg::*;
  localparam int unsigned NCH = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic lb_wr = 1'b0, lb_rd = 1'b0, irq;
  logic pll_enable; logic [3:0] avg_log2; logic [15:0] pll_setpoint;
  logic signed [15:0] pll_kp, pll_ki;
  logic [15:0] pll_dac = 16'h1234, pll_phase = 16'h0C80;
  logic [31:0] utc_sec = 32'd77;
  logic [TICK_W-1:0] utc_tick = '0;
  logic msg_valid = 1'b0; logic [MSG_W-1:0] msg = '0;
  logic rx_err = 1'b0, scan_overrun = 1'b0;
  logic act_we; logic [7:0] act_waddr; action_t act_wdata;
  logic [NCH-1:0] ch_irq = '0, ch_armed = 5'b10110;
  logic scan_busy = 1'b1, sec_start = 1'b0;
  logic [31:0] stamp_sec [NCH];
  logic [TICK_W-1:0] stamp_tick [NCH];
  logic jtag_wr; logic [3:0] jtag_wdata; logic [4:0] jtag_rdata = 5'b10101;
  logic tdc_pop; logic [31:0] tdc_rd_data = 32'hFEED_0001; logic tdc_empty = 1'b0; logic [4:0] tdc_count = 5'd3;
  int checks = 0, failures = 0, n_pop = 0, n_jtag = 0, n_act = 0;
  action_t got_act; logic [7:0] got_addr;

  always #12.5 clk = ~clk;
  always @(posedge clk) utc_tick <= utc_tick + 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (tdc_pop) n_pop++;
    if (jtag_wr) n_jtag++;
    if (act_we) begin n_act++; got_act = act_wdata; got_addr = act_waddr; end
  end

  host_regs #(.NCH(NCH), .ACTIONS(256)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); lb_addr = a; lb_wdata = d; lb_wr = 1'b1;
    @(negedge clk); lb_wr = 1'b0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); lb_addr = a; lb_rd = 1'b1;
    @(negedge clk); lb_rd = 1'b0; d = lb_rdata;
  endtask
  task automatic expect_rd(input logic [7:0] a, input logic [31:0] e, input string what);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d != e) begin failures++; $display("%s: read %h expected %h", what, d, e); end
  endtask
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] s, t;
    for (int c = 0; c < NCH; c++) begin stamp_sec[c] = 32'd1000 + c; stamp_tick[c] = TICK_W'(c * 111); end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    expect_rd(REG_CTRL, 32'h0000_0400, "CTRL reset");
    wr(REG_CTRL, 32'h0000_0701);
    wr(REG_PLL_SETPT, 32'h0000_0C80);
    wr(REG_PLL_KP, 32'h0000_FF00);
    wr(REG_PLL_KI, 32'h0000_0012);
    expect_rd(REG_CTRL, 32'h0000_0701, "CTRL");
    expect_rd(REG_PLL_KP, 32'hFFFF_FF00, "KP sign-extended");
    check(pll_enable && avg_log2 == 7 && pll_setpoint == 16'h0C80 && pll_kp == -16'sd256 && pll_ki == 16'sd18, "PLL outputs");
    expect_rd(REG_PLL_DAC, 32'h0000_1234, "DAC status");
    expect_rd(REG_PLL_PHASE, 32'h0000_0C80, "phase status");
    // action write: event 0x02_0000_0101, channel 3, chained, start_sel 1, clk_sel 2, fp, irq, delay 500
    wr(REG_ACT_W0, 32'h0000_0101);
    wr(REG_ACT_W1, 32'h8000_0000 | (32'h02) | (32'd3 << 8) | (32'd2 << 12) | (32'd1 << 14) | (32'd2 << 16) | (32'd1 << 18) | (32'd1 << 19));
    wr(REG_ACT_W2, 32'd500);
    wr(REG_ACT_COMMIT, 32'd77);
    check(n_act == 1 && got_addr == 8'd77, "commit strobe");
    check(got_act.en && got_act.event_code == 40'h02_0000_0101 && got_act.channel == 3'd3 &&
          got_act.cfg.start_mode == START_CHAINED && got_act.cfg.start_sel == 2'd1 && got_act.cfg.clk_sel == 2'd2 &&
          got_act.cfg.out_fp && got_act.cfg.out_irq && got_act.cfg.delay == 32'd500, "action fields");
    // interrupts
    check(!irq, "no irq at start");
    @(negedge clk); ch_irq = 5'b00100; @(negedge clk); ch_irq = '0;
    expect_rd(REG_IRQ_STAT, 32'h0000_0004, "irq status counter 2");
    check(!irq, "masked irq");
    wr(REG_IRQ_EN, 32'h0000_0204);
    @(negedge clk);
    check(irq, "enabled irq");
    @(negedge clk); rx_err = 1'b1; scan_overrun = 1'b1; @(negedge clk); rx_err = 1'b0; scan_overrun = 1'b0;
    expect_rd(REG_IRQ_STAT, 32'h0000_0304, "irq status all");
    wr(REG_IRQ_STAT, 32'h0000_0004);
    expect_rd(REG_IRQ_STAT, 32'h0000_0300, "after clear");
    check(irq, "overrun irq enabled");
    wr(REG_IRQ_STAT, 32'h0000_0300);
    @(negedge clk);
    check(!irq, "irq cleared");
    // coherent UTC read
    rd(REG_UTC_SEC, s);
    repeat (20) @(negedge clk);
    rd(REG_UTC_TICK, t);
    check(s == 32'd77, "UTC second");
    check(t < 32'(utc_tick) && 32'(utc_tick) - t > 20, "UTC tick latched at the second read");
    // JTAG
    wr(REG_JTAG, 32'h0000_000B);
    check(n_jtag == 1 && jtag_wdata == 4'hB, "JTAG write");
    expect_rd(REG_JTAG, 32'h0000_0015, "JTAG read");
    // HPTDC FIFO
    expect_rd(REG_TDC_DATA, 32'hFEED_0001, "TDC data");
    check(n_pop == 1, "one pop per data read");
    expect_rd(REG_TDC_STAT, 32'h0000_0003, "TDC status");
    check(n_pop == 1, "status read does not pop");
    // time tags
    for (int c = 0; c < NCH; c++) begin
      expect_rd(REG_STAMP_BASE + 8'(2 * c), 32'd1000 + c, "stamp second");
      expect_rd(REG_STAMP_BASE + 8'(2 * c + 1), 32'(c * 111), "stamp tick");
    end
    // last frame and status
    @(negedge clk); msg_valid = 1'b1; msg = 40'hAB_1234_5678; @(negedge clk); msg_valid = 1'b0;
    expect_rd(REG_MSG_LO, 32'h1234_5678, "frame low");
    expect_rd(REG_MSG_HI, 32'h0000_00AB, "frame high");
    expect_rd(REG_STATUS, 32'h0000_0116, "status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
