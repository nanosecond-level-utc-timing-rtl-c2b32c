// tb_ctrp_fpga: end-to-end test of the timing receiver at its default sizes.
//
// The board around the FPGA is modelled: a sender that Manchester-codes GMT
// frames from an ideal 40 MHz reference and adds up to +-7 ns of random
// jitter to every line edge; a VCXO (vcxo_model) 30 ppm off at mid-scale;
// a 232.6 MHz free-running oscillator; a one-bit JTAG device; a source of
// HPTDC words. The CPU side is driven through the local bus.
//
// The test closes the PLL and checks that the clean 40 MHz settles at the
// programmed phase behind the reference with an rms jitter below 1 ns; then
// loads the UTC time, programs actions and sends events, and checks every
// counter mode (immediate, external and chained start; 40 MHz and external
// clock; front panel, interrupt, both), the UTC time tags, the 10 kHz
// reference alignment, the receiver error interrupt, the JTAG register and
// the HPTDC readout. Each mechanism is counted and one never seen is a
// failure.
`timescale 1ns/1fs
module tb_ctrp_fpga;
  import ctrp_pkg::*;

  localparam real TOSC    = 4.3;
  localparam int  SETPT   = 744;            // 12.5 ns / 4.3 ns * 256
  localparam int  NCH     = 5;

  // ------------------------------------------------------------ board
  logic clk_osc = 1'b0, rst_n = 1'b0, gmt = 1'b0;
  logic clk40;
  logic [1:0] ext_start = '0, ext_clk = '0;
  logic [7:0] lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic lb_wr = 1'b0, lb_rd = 1'b0, irq;
  logic [NCH-1:0] out_fp;
  logic [15:0] dac_code;
  logic dac_load;
  logic tdc_tck, tdc_tms, tdc_tdi, tdc_trst_n, tdc_tdo, tdc_ref10k;
  logic tdc_data_ready, tdc_get_data;
  logic [31:0] tdc_data;

  always #(TOSC / 2) clk_osc = ~clk_osc;
  always #115 ext_clk[0] = ~ext_clk[0];
  always #85  ext_clk[1] = ~ext_clk[1];

  vcxo_model u_vcxo (.code(dac_code), .clk(clk40));

  ctrp_fpga dut (
    .clk40, .clk_osc, .rst_n, .gmt_in(gmt), .ext_start, .ext_clk,
    .lb_addr, .lb_wdata, .lb_wr, .lb_rd, .lb_rdata, .irq, .out_fp,
    .dac_code, .dac_load,
    .tdc_tck, .tdc_tms, .tdc_tdi, .tdc_trst_n, .tdc_tdo, .tdc_ref10k,
    .tdc_data_ready, .tdc_get_data, .tdc_data);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  // mechanisms seen
  int m_lock = 0, m_utc = 0, m_imm = 0, m_ext = 0, m_chain = 0, m_c40 = 0, m_eclk = 0,
      m_fp = 0, m_irq = 0, m_both = 0, m_ref = 0, m_rxerr = 0, m_jtag = 0, m_tdc = 0;

  initial begin
    #30_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ GMT sender
  // Frames go out back to back from the queue; filler frames of type 0x03,
  // which no action uses, keep the line busy so the PLL always has edges.
  logic [MSG_W-1:0] tx_q [$];
  bit               tx_bad_q [$];
  real              t_last_end = 0.0;     // ideal time of the last frame's end

  // one bit from t0 on the ideal grid; each edge jittered
  real t_bit = 1000.0;
  task automatic tx_bit(input logic b);
    real t;
    t = t_bit + (real'($urandom_range(1400)) / 100.0 - 7.0);
    if (t > $realtime) #(t - $realtime);
    gmt = ~b;
    t = t_bit + 1000.0 + (real'($urandom_range(1400)) / 100.0 - 7.0);
    if (t > $realtime) #(t - $realtime);
    gmt = b;
    t_bit += 2000.0;
  endtask
  task automatic tx_idle(input int nbits);
    real t;
    t = t_bit + (real'($urandom_range(1400)) / 100.0 - 7.0);
    if (t > $realtime) #(t - $realtime);
    gmt = 1'b0;
    t_bit += 2000.0 * nbits;
  endtask

  initial begin
    logic [MSG_W-1:0] d;
    bit bad;
    forever begin
      if (tx_q.size() != 0) begin d = tx_q.pop_front(); bad = tx_bad_q.pop_front(); end
      else begin d = {8'h03, $urandom()}; bad = 1'b0; end
      tx_bit(1'b1);
      for (int i = MSG_W - 1; i >= 0; i--) tx_bit(d[i]);
      tx_bit(~^d ^ bad);
      t_last_end = t_bit - 1000.0;          // middle of the parity bit
      tx_idle(2);
    end
  end

  task automatic send(input logic [MSG_W-1:0] d, input bit bad = 1'b0);
    tx_q.push_back(d); tx_bad_q.push_back(bad);
    wait (tx_q.size() == 0);
    // wait for this frame to end (the next one has started)
    #100_000;
  endtask

  // ------------------------------------------------------------ local bus
  task automatic wr(input logic [7:0] a, input logic [31:0] v);
    @(negedge clk40); lb_addr = a; lb_wdata = v; lb_wr = 1'b1;
    @(negedge clk40); lb_wr = 1'b0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] v);
    @(negedge clk40); lb_addr = a; lb_rd = 1'b1;
    @(negedge clk40); lb_rd = 1'b0; v = lb_rdata;
  endtask
  task automatic action(input int idx, input logic [MSG_W-1:0] ev, input int ch,
                        input start_mode_t sm, input int ssel, input int csel,
                        input bit fp, input bit iq, input int delay);
    wr(REG_ACT_W0, ev[31:0]);
    wr(REG_ACT_W1, {1'b1, 11'd0, iq, fp, 2'(csel), 2'(ssel), 2'(sm), 1'b0, 3'(ch), ev[39:32]});
    wr(REG_ACT_W2, 32'(delay));
    wr(REG_ACT_COMMIT, 32'(idx));
  endtask

  // ------------------------------------------------------------ JTAG device, HPTDC source
  logic tdo_q = 1'b0;
  always @(posedge tdc_tck) tdo_q <= tdc_tdi;
  assign tdc_tdo = tdo_q;

  int n_tdc_src = 0;
  bit tdc_on = 1'b0;
  assign tdc_data_ready = tdc_on && n_tdc_src < 8;
  assign tdc_data = 32'h7DC0_0000 + 32'(n_tdc_src);
  always @(posedge clk40) if (rst_n && tdc_get_data) n_tdc_src <= n_tdc_src + 1;

  // ------------------------------------------------------------ observers
  real t_rise [NCH];
  int  n_rise [NCH];
  logic [NCH-1:0] fp_prev = '0;
  always @(posedge clk40) begin
    for (int c = 0; c < NCH; c++) begin
      if (out_fp[c] && !fp_prev[c]) begin t_rise[c] = $realtime; n_rise[c]++; end
    end
    fp_prev <= out_fp;
  end

  // 10 kHz reference: rising edges one cycle after a multiple of 4000 ticks
  logic ref_prev = 1'b0;
  bit   utc_loaded = 1'b0;
  always @(posedge clk40) begin
    if (tdc_ref10k && !ref_prev && utc_loaded) begin
      m_ref++;
      check(dut.u_utc.tick % 4000 == 1, $sformatf("10 kHz edge at tick %0d", dut.u_utc.tick));
    end
    ref_prev <= tdc_ref10k;
  end

  // phase of the clean clock against the ideal reference grid
  real ph_sum = 0.0, ph_sq = 0.0;
  int  ph_n = 0;
  bit  ph_on = 1'b0;
  always @(posedge clk40) if (ph_on) begin
    real p;
    p = $realtime - 25.0 * $floor($realtime / 25.0);
    ph_sum += p; ph_sq += p * p; ph_n++;
  end

  // ------------------------------------------------------------ test
  initial begin
    logic [31:0] v, s0, s1, t0, t1;
    real mean, rms;
    for (int c = 0; c < NCH; c++) begin n_rise[c] = 0; t_rise[c] = 0.0; end
    #100 rst_n = 1'b1;
    repeat (10) @(negedge clk40);

    // PLL: setpoint, coefficients, 16 measurements per update, enable
    wr(REG_PLL_SETPT, SETPT);
    wr(REG_PLL_KP, 32'd8000);
    wr(REG_PLL_KI, 32'd250);
    wr(REG_CTRL, 32'h0000_0401);
    #3_000_000;
    ph_on = 1'b1;
    #1_000_000;
    ph_on = 1'b0;
    mean = ph_sum / ph_n;
    rms  = $sqrt(ph_sq / ph_n - mean * mean);
    $display("clean 40 MHz: phase %0.3f ns behind the reference, rms %0.3f ns, DAC %0d", mean, rms, dac_code);
    check(mean > 10.0 && mean < 15.0, "phase near the 12.5 ns setpoint");
    check(rms < 1.0, "jitter below 1 ns rms");
    check(dac_code > 16'd19000 && dac_code < 16'd27000, "DAC pulls the 30 ppm offset");
    if (rms < 1.0) m_lock++;
    rd(REG_PLL_DAC, v);
    check(v[15:0] > 16'd19000 && v[15:0] < 16'd27000, "DAC code readable");

    // actions
    //  E1: ch0 immediate, 40 MHz, 100 ticks, front panel + irq; ch1 chained to ch0, 50 ticks, front panel
    //  E2: ch2 on start 0, 20 ticks, irq only; ch3 immediate, external clock 1, 10 ticks, front panel
    //  E3: ch4 on start 1, 0 ticks, front panel + irq
    action(0, 40'h02_0000_0100, 0, START_IMMEDIATE, 0, 0, 1, 1, 100);
    action(1, 40'h02_0000_0100, 1, START_CHAINED,   0, 0, 1, 0, 50);
    action(7, 40'h02_0000_0200, 2, START_EXTERNAL,  0, 0, 0, 1, 20);
    action(8, 40'h02_0000_0200, 3, START_IMMEDIATE, 0, 2, 1, 0, 10);
    action(200, 40'h02_0000_0300, 4, START_EXTERNAL, 1, 0, 1, 1, 0);
    for (int i = 0; i < 256; i++)
      if (!(i inside {0, 1, 7, 8, 200})) begin
        wr(REG_ACT_W1, 32'h0);              // disabled
        wr(REG_ACT_COMMIT, 32'(i));
      end
    wr(REG_IRQ_EN, 32'h0000_011F);

    // UTC second
    send({MSG_TYPE_UTC, 32'd1_700_000_000});
    utc_loaded = 1'b1;
    m_utc++;
    rd(REG_UTC_SEC, s0);
    rd(REG_UTC_TICK, t0);
    check(s0 == 32'd1_700_000_000, $sformatf("UTC second %0d", s0));
    begin
      real exp_t;
      exp_t = ($realtime - t_last_end) / 25.0;   // ticks since the frame's parity bit
      // the tick read was latched one bus read earlier, and the receiver
      // reports the frame a few cycles after the parity bit
      check(real'(t0) > exp_t - 80.0 && real'(t0) < exp_t, $sformatf("UTC tick %0d, about %0.0f expected", t0, exp_t));
    end

    // E1
    send(40'h02_0000_0100);
    #5_000;
    check(n_rise[0] == 1 && n_rise[1] == 1, "E1 fired ch0 and ch1");
    check((t_rise[1] - t_rise[0]) > 51.0 * 25.0 - 2.0 && (t_rise[1] - t_rise[0]) < 51.0 * 25.0 + 2.0,
          $sformatf("chained delay %0.1f ns", t_rise[1] - t_rise[0]));
    rd(REG_STAMP_BASE + 0, s0); rd(REG_STAMP_BASE + 1, t0);
    rd(REG_STAMP_BASE + 2, s1); rd(REG_STAMP_BASE + 3, t1);
    check(s0 == 32'd1_700_000_000 && s1 == s0, "time tag seconds");
    check(t1 - t0 == 51, $sformatf("time tags %0d %0d", t0, t1));
    check(irq, "irq from ch0");
    rd(REG_IRQ_STAT, v);
    check(v[4:0] == 5'b00001, $sformatf("irq status %h", v));
    wr(REG_IRQ_STAT, v);
    m_imm++; m_chain++; m_c40++; m_both++; m_fp++;

    // E2 then start 0
    send(40'h02_0000_0200);
    #10_000;
    check(n_rise[3] == 1, "ch3 counted the external clock");
    rd(REG_STATUS, v);
    check(v[2] == 1'b1, "ch2 armed waiting for its start");
    @(negedge clk40); ext_start[0] = 1'b1; #100; ext_start[0] = 1'b0;
    #2_000;
    check(n_rise[2] == 0, "ch2 routed to irq only");
    rd(REG_IRQ_STAT, v);
    check(v[4:0] == 5'b00100, $sformatf("irq status ch2 %h", v));
    wr(REG_IRQ_STAT, v);
    if (n_rise[3] == 1) m_eclk++;
    m_ext++; m_irq++;

    // E3 then start 1
    send(40'h02_0000_0300);
    @(negedge clk40); ext_start[1] = 1'b1; #100; ext_start[1] = 1'b0;
    #2_000;
    check(n_rise[4] == 1, "ch4 fired on start 1");
    rd(REG_STAMP_BASE + 8, s0); rd(REG_STAMP_BASE + 9, t0);
    check(s0 == 32'd1_700_000_000 && t0 != 0, "ch4 time tag");
    rd(REG_IRQ_STAT, v);
    check(v[4] == 1'b1, "ch4 interrupt");
    wr(REG_IRQ_STAT, v);

    // receiver error
    send(40'h02_0000_0100, 1'b1);
    rd(REG_IRQ_STAT, v);
    check(v[8] == 1'b1 && v[0] == 1'b0, $sformatf("parity error flagged, no action %h", v));
    check(irq, "irq from receiver error");
    wr(REG_IRQ_STAT, v);
    if (v[8]) m_rxerr++;

    // JTAG: set TDI, clock, read TDO
    wr(REG_JTAG, 32'h0000_000C);
    wr(REG_JTAG, 32'h0000_000D);
    repeat (4) @(negedge clk40);
    rd(REG_JTAG, v);
    check(v[4:0] == 5'b11101, $sformatf("JTAG read %b", v[4:0]));
    if (v[4]) m_jtag++;

    // HPTDC words
    tdc_on = 1'b1;
    repeat (40) @(negedge clk40);
    rd(REG_TDC_STAT, v);
    check(v[15:0] == 16'd8, $sformatf("TDC FIFO count %0d", v[15:0]));
    for (int i = 0; i < 8; i++) begin
      rd(REG_TDC_DATA, v);
      check(v == 32'h7DC0_0000 + 32'(i), $sformatf("TDC word %h", v));
      m_tdc++;
    end
    rd(REG_TDC_STAT, v);
    check(v[16] == 1'b1, "TDC FIFO empty");

    check(m_ref >= 3, $sformatf("10 kHz edges seen: %0d", m_ref));
    $display("mechanisms: lock %0d utc %0d immediate %0d external %0d chained %0d clk40 %0d extclk %0d fp %0d irq %0d both %0d ref10k %0d rxerr %0d jtag %0d tdc %0d",
             m_lock, m_utc, m_imm, m_ext, m_chain, m_c40, m_eclk, m_fp, m_irq, m_both, m_ref, m_rxerr, m_jtag, m_tdc);
    if (m_lock == 0 || m_utc == 0 || m_imm == 0 || m_ext == 0 || m_chain == 0 || m_c40 == 0 || m_eclk == 0 ||
        m_fp == 0 || m_irq == 0 || m_both == 0 || m_ref == 0 || m_rxerr == 0 || m_jtag == 0 || m_tdc == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
