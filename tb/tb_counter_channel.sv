// tb_counter_channel: self-checking test of one configurable counter.
//
// Exercises every start mode (immediate, each external start, chained to the
// previous counter) and every clock mode (40 MHz, each external clock), with
// the output routed to the front panel, the interrupt, both or neither. For
// each case it checks the cycle of the fire strobe against delay+1 ticks
// after the start, the front-panel pulse width, the interrupt strobe and the
// UTC time tag taken on the fire cycle. Also checks that an armed counter
// does not start on the wrong start input and that a reload restarts it.
module tb_counter_channel;
  import ctrp_pkg::*;
  localparam int unsigned NSTART = 2, NEXTCLK = 2, PULSE_W = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0;
  counter_cfg_t cfg = '0;
  logic [NSTART-1:0]  start_pulse = '0;
  logic [NEXTCLK-1:0] clk_tick = '0;
  logic prev_fire = 1'b0;
  logic [31:0] utc_sec = 32'd1000;
  logic [TICK_W-1:0] utc_tick = '0;
  logic fire, out_fp, irq, armed;
  logic [31:0] stamp_sec;
  logic [TICK_W-1:0] stamp_tick;
  int checks = 0, failures = 0;
  longint cyc = 0, t_fire = -1, t_rise = -1, t_fall = -1, n_irq = 0;
  logic fp_prev = 1'b0;
  int ext_period [NEXTCLK] = '{3, 5};

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    utc_tick <= utc_tick + 1'b1;
  end

  counter_channel #(.NSTART(NSTART), .NEXTCLK(NEXTCLK), .PULSE_W(PULSE_W)) dut (
    .clk, .rst_n, .load, .load_cfg(cfg), .start_pulse, .clk_tick, .prev_fire,
    .utc_sec, .utc_tick, .fire, .out_fp, .irq, .stamp_sec, .stamp_tick, .armed);

  // external clock strobes: clock k ticks every ext_period[k] cycles
  always @(posedge clk) for (int k = 0; k < NEXTCLK; k++) clk_tick[k] <= ((cyc + 1) % ext_period[k] == 0);

  logic [TICK_W-1:0] tick_at_fire;
  always @(negedge clk) if (rst_n) begin
    if (fire) begin t_fire = cyc; tick_at_fire = utc_tick; end
    if (irq) n_irq++;
    if (out_fp && !fp_prev) t_rise = cyc;
    if (!out_fp && fp_prev) t_fall = cyc;
    fp_prev = out_fp;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one case; returns after the output pulse is over
  task automatic run_case(input start_mode_t sm, input int ssel, input int csel,
                          input bit fp, input bit iq, input int delay);
    longint t_start, ticks_needed, irq0;
    counter_cfg_t c;
    c = '0;
    c.start_mode = sm; c.start_sel = 2'(ssel); c.clk_sel = 2'(csel);
    c.out_fp = fp; c.out_irq = iq; c.delay = 32'(delay);
    t_fire = -1; t_rise = -1; t_fall = -1; irq0 = n_irq;
    @(negedge clk);
    load = 1'b1; cfg = c;
    @(negedge clk);
    load = 1'b0;
    check(armed, "armed after load");
    if (sm == START_IMMEDIATE) t_start = cyc - 1;
    else begin
      repeat (7) @(negedge clk);
      check(t_fire < 0, "no fire before start");
      if (sm == START_EXTERNAL) begin
        start_pulse = NSTART'(1) << (1 - ssel);   // the wrong input first
        @(negedge clk); start_pulse = '0;
        repeat (3) @(negedge clk);
        check(t_fire < 0 && armed, "wrong start input ignored");
        start_pulse = NSTART'(1) << ssel;
      end else prev_fire = 1'b1;
      t_start = cyc;
      @(negedge clk); start_pulse = '0; prev_fire = 1'b0;
    end
    // expected fire cycle: the (delay+1)-th selected tick after the start cycle
    begin
      longint t, n;
      t = t_start; n = 0;
      while (n < delay + 1) begin
        t++;
        if (csel == 0 || t % ext_period[csel - 1] == 0) n++;
      end
      ticks_needed = t;
    end
    while (cyc < ticks_needed + PULSE_W + 5) @(negedge clk);
    check(t_fire == ticks_needed, $sformatf("fire at %0d expected %0d (sm %0d clk %0d)", t_fire, ticks_needed, sm, csel));
    check(stamp_tick == tick_at_fire && stamp_sec == utc_sec, "time tag");
    check(!armed, "idle after firing");
    if (fp) check(t_rise == t_fire + 1 && t_fall - t_rise == PULSE_W, $sformatf("pulse %0d..%0d", t_rise, t_fall));
    else    check(t_rise < 0, "no front-panel pulse");
    check(n_irq - irq0 == (iq ? 1 : 0), "interrupt strobe");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_case(START_IMMEDIATE, 0, 0, 1, 0, 0);
    run_case(START_IMMEDIATE, 0, 0, 1, 1, 17);
    run_case(START_EXTERNAL,  0, 0, 0, 1, 9);
    run_case(START_EXTERNAL,  1, 1, 1, 1, 6);
    run_case(START_CHAINED,   0, 2, 1, 0, 4);
    run_case(START_IMMEDIATE, 0, 1, 0, 0, 11);
    for (int k = 0; k < 20; k++)
      run_case(start_mode_t'($urandom_range(2)), $urandom_range(1), $urandom_range(2),
               1'($urandom), 1'($urandom), $urandom_range(60));
    // reload restarts the count
    @(negedge clk);
    cfg = '0; cfg.out_fp = 1'b1; cfg.delay = 100; load = 1'b1;
    @(negedge clk); load = 1'b0; t_fire = -1;
    repeat (50) @(negedge clk);
    cfg.delay = 10; load = 1'b1;
    @(negedge clk); load = 1'b0;
    repeat (30) @(negedge clk);
    check(t_fire == cyc - 30 + 10, $sformatf("reload restart fire %0d", t_fire));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
